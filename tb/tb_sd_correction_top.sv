// tb_sd_correction_top: end-to-end run of the whole correction chain at its
// default sizes.
//
// A 0.2 V sine (DAC range +-0.5 V, fs = 4 MHz, 20 cycles per 4096 samples)
// drives two behavioural 3-bit second-order modulators: an accurate one with
// an ideal thermometer DAC, and an inaccurate one with the analog errors used
// for the evaluation of the scheme (integrator leakage 0.99, 0.09 % gain and
// DAC element errors, 10 % op-amp and comparator offsets, 1 % comparator
// noise) whose DAC elements are chosen by the design's second-order DEM. The
// design's LMS filter maps the inaccurate codes onto the accurate ones and
// the two decimators reduce the corrected stream.
//
// Checked: every sample, the DEM switches on exactly `code` elements; over
// the last 4096 samples the LMS error power is well below the power of the
// reference words (the error of the zero taps it starts from) and below the
// power of the uncorrected difference D - Dideal. Most of what remains is the
// reference modulator's own quantization noise, which no filter of D can
// predict;
// each decimator output equals a direct computation from the recorded
// corrected stream, and the decimators deliver one word per 32 samples.
// Mechanisms counted (each must occur): DEM choosing a new element set for a
// repeated code, tap updates, CIC outputs, FIR outputs.
module tb_sd_correction_top;
  import sd_pkg::*;
  localparam int NS = 16384;
  int checks = 0, failures = 0, bad = 0;
  logic clk = 0, rst_n = 0, en = 0;
  real  u;
  code_t  q_code, q_ideal;
  elsel_t dac_sel, ideal_sel;
  word_t  x, dout, err, cic_dout, fir_dout;
  logic   cic_valid, fir_valid;
  logic signed [TAP_W-1:0] taps [NUM_TAPS];

  sd_correction_top dut (
    .clk, .rst_n, .en_i(en),
    .q_code_i(q_code), .q_ideal_i(q_ideal),
    .dac_sel_o(dac_sel), .x_o(x), .dout_o(dout), .err_o(err), .taps_o(taps),
    .cic_dout_o(cic_dout), .cic_valid_o(cic_valid),
    .fir_dout_o(fir_dout), .fir_valid_o(fir_valid)
  );

  sd2_mod3_model #(
    .LEAK(0.99), .GAIN_ERR(0.0009), .OP_OFFS(0.05), .CMP_OFFS(0.05),
    .CMP_NOISE(0.005), .EL_MISMATCH(0.0009)
  ) u_fast (.clk, .rst_n, .en_i(en), .u_i(u), .sel_i(dac_sel), .code_o(q_code));

  therm_decoder #(.N_BITS(Q_BITS)) u_ideal_dec (.bin_i(q_ideal), .therm_o(ideal_sel));
  sd2_mod3_model u_ref (.clk, .rst_n, .en_i(en), .u_i(u), .sel_i(ideal_sel), .code_o(q_ideal));

  always #5 clk = ~clk;

  longint ys [$];        // corrected stream Dout, one entry per sample
  int n_rot = 0, n_upd = 0, n_cic = 0, n_fir = 0;
  code_t  prev_code;
  elsel_t prev_sel;
  logic signed [TAP_W-1:0] prev_taps [NUM_TAPS];

  // CIC reference: impulse response of 4 cascaded 32-sample moving sums,
  // applied with the 3 samples of integrator latency.
  localparam int HL = CIC_STAGES * (DECIM*CIC_DELAY - 1) + 1;
  longint h_cic [HL];
  initial begin
    longint tmp [HL];
    for (int k = 0; k < HL; k++) h_cic[k] = (k < DECIM*CIC_DELAY) ? 1 : 0;
    for (int s = 1; s < CIC_STAGES; s++) begin
      for (int k = 0; k < HL; k++) begin
        tmp[k] = 0;
        for (int i = 0; i < DECIM*CIC_DELAY; i++) if (k - i >= 0) tmp[k] += h_cic[k-i];
      end
      h_cic = tmp;
    end
  end

  function automatic longint cic_ref(int j);
    longint acc;
    int base;
    base = j*DECIM - 1 - (CIC_STAGES-1);
    acc = 0;
    for (int k = 0; k < HL; k++)
      if (base - k >= 0) acc += h_cic[k] * ys[base - k];
    return acc >>> (CIC_STAGES * $clog2(DECIM*CIC_DELAY));
  endfunction

  function automatic longint fir_ref(int n);
    longint acc, e;
    acc = 0;
    for (int i = 0; i < FIR_TAPS; i++)
      if (n*DECIM - i >= 0) acc += longint'(FIR_COEF[i]) * ys[n*DECIM - i];
    e = (acc + (longint'(1) <<< (COEF_W-2))) >>> (COEF_W-1);
    return e > 2047 ? 2047 : (e < -2048 ? -2048 : e);
  endfunction

  always @(posedge clk) begin
    if (rst_n && cic_valid) begin
      longint e;
      n_cic++;
      begin
        e = cic_ref(n_cic);
        checks++;
        if (longint'(cic_dout) != e) begin failures++; if (bad++ < 5) $display("FAIL CIC out %0d: %0d expected %0d", n_cic, cic_dout, e); end
      end
    end
    if (rst_n && fir_valid) begin
      longint e;
      e = fir_ref(n_fir);
      checks++;
      if (longint'(fir_dout) != e) begin failures++; if (bad++ < 5) $display("FAIL FIR out %0d: %0d expected %0d", n_fir, fir_dout, e); end
      n_fir++;
    end
  end

  initial begin
    real p_early, p_late, p_raw, ph;
    int n_late;
    p_early = 0; p_late = 0; p_raw = 0; n_late = 0;
    u = 0.0; prev_code = '0; prev_sel = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      ph = 2.0 * 3.14159265358979 * 20.0 * real'(n) / 4096.0;
      u = 0.2 * $sin(ph);
      en = 1;
      #1;
      checks++;
      if ($countones(dac_sel) != int'(q_code)) begin
        failures++; if (bad++ < 5) $display("FAIL DEM n=%0d code %0d sel %b", n, q_code, dac_sel);
      end
      if (n > 0 && q_code == prev_code && dac_sel != prev_sel && q_code != 0) n_rot++;
      prev_code = q_code; prev_sel = dac_sel;
      ys.push_back(longint'(dout));
      if (n >= NS - 4096) begin
        p_late  += real'(err) * real'(err);
        p_early += real'(code_to_word(q_ideal)) * real'(code_to_word(q_ideal));
        p_raw   += (real'(code_to_word(q_ideal)) - real'(x)) * (real'(code_to_word(q_ideal)) - real'(x));
        n_late++;
      end
      prev_taps = taps;
      @(posedge clk); #1;
      if (taps != prev_taps) n_upd++;
    end
    en = 0;
    repeat (4) @(posedge clk);
    p_early /= n_late; p_late /= n_late; p_raw /= n_late;
    $display("power over the last 4096 samples (LSB^2): reference %0.1f, uncorrected D - Dideal %0.1f, LMS error %0.1f",
             p_early, p_raw, p_late);
    $display("DEM rotations %0d, tap updates %0d, CIC outputs %0d, FIR outputs %0d", n_rot, n_upd, n_cic, n_fir);
    $write("taps:");
    for (int i = 0; i < NUM_TAPS; i++) $write(" %0d", taps[i]);
    $write("\n");
    checks++;
    if (!(p_late < 0.6 * p_early)) begin failures++; $display("FAIL LMS error not below the zero-tap error"); end
    checks++;
    if (!(p_late < p_raw)) begin failures++; $display("FAIL LMS error not below the uncorrected error"); end
    checks++;
    if (n_cic != NS / DECIM) begin failures++; $display("FAIL CIC output count %0d", n_cic); end
    checks++;
    if (n_fir != NS / DECIM) begin failures++; $display("FAIL FIR output count %0d", n_fir); end
    checks++;
    if (n_rot == 0) begin failures++; $display("FAIL DEM never rotated"); end
    checks++;
    if (n_upd == 0) begin failures++; $display("FAIL taps never updated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
