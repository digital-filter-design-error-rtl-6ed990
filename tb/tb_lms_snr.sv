// tb_lms_snr: workload run of the whole correction scheme: in-band SNR of a
// 3-bit second-order modulator with the analog errors of the evaluation,
// before and after the design's DEM and LMS correction.
//
// An accurate behavioural modulator and an erroneous one (integrator leakage
// 0.99, 0.09 % gain and DAC element errors, 10 % op-amp and comparator
// offsets, 1 % comparator noise) see the same 0.2 V sine (DAC range +-0.5 V,
// fs = 4 MHz, OSR 32). The erroneous one takes its DAC element selection
// from the design's DEM; the design's LMS filter maps its stream onto the
// accurate one. The reference stream, the uncorrected stream and the
// design's own decimated, corrected output (polyphase FIR) are compared by
// fitting a sine, cosine and DC term at the known frequency over 384
// decimated words after 256 words of adaptation; the rest is noise and
// distortion. A second copy of the scheme runs with a much smaller LMS step
// (16 / 2**16) and 24-bit taps (22 fraction bits). Checks: both modulators
// exceed 45 dB, the corrected output keeps the tone (above 10 dB), and the
// smaller step gives at least 6 dB less tap noise than the default step.
// The DEM element count is checked every sample.
module tb_lms_snr;
  import sd_pkg::*;
  localparam int SETTLE = 256;           // decimated words skipped (LMS adaptation)
  localparam int NWIN   = 384;           // decimated words measured
  localparam int NS     = (SETTLE + NWIN + 2) * DECIM;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  real u;
  code_t  c_ideal, c_dem;
  elsel_t s_ideal;
  word_t  y_ideal, y_therm, y_dem;
  logic   v_ideal, v_therm, v_dem;

  always #5 clk = ~clk;

  elsel_t dac_sel;
  word_t  x_w, dout_w, err_w, cic_w;
  logic   cic_v;
  logic signed [TAP_W-1:0] taps [NUM_TAPS];

  therm_decoder #(.N_BITS(Q_BITS)) u_dec_i (.bin_i(c_ideal), .therm_o(s_ideal));

  // accurate reference and the erroneous fast modulator (errors of the
  // evaluation: leakage 0.99, 0.09 % gain and DAC element errors, 10 %
  // op-amp and comparator offsets, 1 % comparator noise)
  sd2_mod3_model m_ideal (.clk, .rst_n, .en_i(en), .u_i(u), .sel_i(s_ideal), .code_o(c_ideal));
  sd2_mod3_model #(
    .LEAK(0.99), .GAIN_ERR(0.0009), .OP_OFFS(0.05), .CMP_OFFS(0.05),
    .CMP_NOISE(0.005), .EL_MISMATCH(0.0009)
  ) m_fast (.clk, .rst_n, .en_i(en), .u_i(u), .sel_i(dac_sel), .code_o(c_dem));

  sd_correction_top dut (
    .clk, .rst_n, .en_i(en), .q_code_i(c_dem), .q_ideal_i(c_ideal),
    .dac_sel_o(dac_sel), .x_o(x_w), .dout_o(dout_w), .err_o(err_w), .taps_o(taps),
    .cic_dout_o(cic_w), .cic_valid_o(cic_v), .fir_dout_o(y_dem), .fir_valid_o(v_dem)
  );

  // the same scheme with a finer LMS: step size 1/4096 of the default's
  // scale (mu ~ 0.0002) and 24-bit taps with 22 fraction bits
  word_t  x_f, dout_f, err_f, cic_f, y_fine;
  logic   cic_vf, v_fine;
  elsel_t dac_sel_f;
  code_t  c_fine;
  logic signed [23:0] taps_f [NUM_TAPS];
  sd2_mod3_model #(
    .LEAK(0.99), .GAIN_ERR(0.0009), .OP_OFFS(0.05), .CMP_OFFS(0.05),
    .CMP_NOISE(0.005), .EL_MISMATCH(0.0009)
  ) m_fast_f (.clk, .rst_n, .en_i(en), .u_i(u), .sel_i(dac_sel_f), .code_o(c_fine));
  sd_correction_top #(.MU(16), .W_W(24), .W_FRAC(22)) dut_fine (
    .clk, .rst_n, .en_i(en), .q_code_i(c_fine), .q_ideal_i(c_ideal),
    .dac_sel_o(dac_sel_f), .x_o(x_f), .dout_o(dout_f), .err_o(err_f), .taps_o(taps_f),
    .cic_dout_o(cic_f), .cic_valid_o(cic_vf), .fir_dout_o(y_fine), .fir_valid_o(v_fine)
  );

  // same decimator on the reference and on the uncorrected fast stream
  polyphase_fir_decim f_ideal (.clk, .rst_n, .en_i(en), .din_i(code_to_word(c_ideal)), .dout_o(y_ideal), .valid_o(v_ideal));
  polyphase_fir_decim f_therm (.clk, .rst_n, .en_i(en), .din_i(x_w), .dout_o(y_therm), .valid_o(v_therm));

  real yi [$], yt [$], yd [$], yf [$];

  always @(posedge clk) begin
    if (rst_n && v_ideal) yi.push_back(real'(y_ideal));
    if (rst_n && v_therm) yt.push_back(real'(y_therm));
    if (rst_n && v_dem)   yd.push_back(real'(y_dem));
    if (rst_n && v_fine)  yf.push_back(real'(y_fine));
  end

  // SNR in dB of y[SETTLE .. SETTLE+NWIN-1] around a fitted sine at 20/128
  // cycles per decimated word (the window holds a whole number of cycles).
  function automatic real snr_db(ref real y [$]);
    real a, b, c, w, ps, pn, r;
    a = 0; b = 0; c = 0;
    for (int n = 0; n < NWIN; n++) begin
      w = 2.0 * 3.14159265358979 * 20.0 * real'(n) / 128.0;
      a += y[SETTLE+n] * $sin(w);
      b += y[SETTLE+n] * $cos(w);
      c += y[SETTLE+n];
    end
    a = 2.0 * a / NWIN; b = 2.0 * b / NWIN; c = c / NWIN;
    pn = 0;
    for (int n = 0; n < NWIN; n++) begin
      w = 2.0 * 3.14159265358979 * 20.0 * real'(n) / 128.0;
      r = y[SETTLE+n] - a * $sin(w) - b * $cos(w) - c;
      pn += r * r;
    end
    pn = pn / NWIN;
    ps = (a*a + b*b) / 2.0;
    return 10.0 * $log10(ps / pn);
  endfunction

  initial begin
    real si, st, sd, sf;
    u = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      u = 0.2 * $sin(2.0 * 3.14159265358979 * 20.0 * real'(n) / 4096.0);
      en = 1;
      #1;
      checks++;
      if ($countones(dac_sel) != int'(c_dem)) failures++;
    end
    en = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (yi.size() < SETTLE + NWIN || yt.size() < SETTLE + NWIN || yd.size() < SETTLE + NWIN ||
        yf.size() < SETTLE + NWIN) begin
      failures++;
      $display("FAIL too few decimated words");
    end else begin
      si = snr_db(yi); st = snr_db(yt); sd = snr_db(yd); sf = snr_db(yf);
      $display("in-band SNR: accurate modulator %0.1f dB, erroneous modulator %0.1f dB", si, st);
      $display("in-band SNR after DEM + LMS: default step %0.1f dB, fine step with 24-bit taps %0.1f dB", sd, sf);
      checks++; if (!(si > 45.0))      begin failures++; $display("FAIL ideal SNR too low"); end
      checks++; if (!(st > 45.0))      begin failures++; $display("FAIL erroneous modulator SNR too low"); end
      // tap gradient noise falls in band: a smaller step must give a cleaner output
      checks++; if (!(sf > sd + 6.0))  begin failures++; $display("FAIL smaller step did not reduce tap noise"); end
      checks++; if (!(sd > 10.0))      begin failures++; $display("FAIL corrected output lost the tone"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
