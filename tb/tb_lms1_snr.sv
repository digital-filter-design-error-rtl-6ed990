// tb_lms1_snr: workload run of the LMS correction on a 1-bit second-order
// modulator: in-band SNR before and after the correction, with the
// non-idealities of the 1-bit evaluation.
//
// An accurate behavioural 1-bit modulator and an erroneous one (20 %
// sampling-capacitor error on both integrator gains, integrator leakage
// 0.99, 10 % op-amp and comparator offsets, 1 % comparator noise, relative
// to the 0.5 V reference) see the same 0.2 V sine (fs = 4 MHz, OSR 32). A
// 1-bit stream enters the correction top as codes 0 and 7 (words -1792 and
// +1792); the element matching logic then switches all or no elements and
// is not exercised. The erroneous stream feeds two copies of the top: one
// with the default LMS (mu = 0.02, 12-bit taps) and one with a much smaller
// step (16 / 2**16) and 24-bit taps (22 fraction bits). The reference and
// the uncorrected stream are decimated by their own polyphase_fir_decim;
// the corrected streams by the tops' own FIR decimators. A sine, cosine and
// DC term are fitted at the known frequency over 384 decimated words after
// 256 words of adaptation; the rest counts as noise and distortion.
// Checks: the reference exceeds 40 dB; every decimated output of the
// default top equals a separate polyphase FIR run on its Dout; the smaller
// step gives at least 3 dB less tap noise in band than the default step.
module tb_lms1_snr;
  import sd_pkg::*;
  localparam int SETTLE = 256;           // decimated words skipped (LMS adaptation)
  localparam int NWIN   = 384;           // decimated words measured
  localparam int NS     = (SETTLE + NWIN + 2) * DECIM;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  real u;
  logic b_ideal, b_fast;
  code_t c_ideal, c_fast;
  word_t y_ideal, y_raw, y_dflt, y_fine, y_chk;
  logic  v_ideal, v_raw, v_dflt, v_fine, v_chk;

  always #5 clk = ~clk;

  assign c_ideal = b_ideal ? code_t'(7) : code_t'(0);
  assign c_fast  = b_fast  ? code_t'(7) : code_t'(0);

  sd2_mod1_model m_ideal (.clk, .rst_n, .en_i(en), .u_i(u), .bit_o(b_ideal));
  sd2_mod1_model #(
    .LEAK(0.99), .GAIN_ERR(0.2), .OP_OFFS(0.05), .CMP_OFFS(0.05), .CMP_NOISE(0.005)
  ) m_fast (.clk, .rst_n, .en_i(en), .u_i(u), .bit_o(b_fast));

  elsel_t sel_d, sel_f;
  word_t  x_d, dout_d, err_d, cic_d, x_f, dout_f, err_f, cic_f;
  logic   cv_d, cv_f;
  logic signed [TAP_W-1:0] taps_d [NUM_TAPS];
  logic signed [23:0]      taps_f [NUM_TAPS];

  sd_correction_top dut (
    .clk, .rst_n, .en_i(en), .q_code_i(c_fast), .q_ideal_i(c_ideal),
    .dac_sel_o(sel_d), .x_o(x_d), .dout_o(dout_d), .err_o(err_d), .taps_o(taps_d),
    .cic_dout_o(cic_d), .cic_valid_o(cv_d), .fir_dout_o(y_dflt), .fir_valid_o(v_dflt)
  );
  sd_correction_top #(.MU(16), .W_W(24), .W_FRAC(22)) dut_fine (
    .clk, .rst_n, .en_i(en), .q_code_i(c_fast), .q_ideal_i(c_ideal),
    .dac_sel_o(sel_f), .x_o(x_f), .dout_o(dout_f), .err_o(err_f), .taps_o(taps_f),
    .cic_dout_o(cic_f), .cic_valid_o(cv_f), .fir_dout_o(y_fine), .fir_valid_o(v_fine)
  );

  polyphase_fir_decim f_ideal (.clk, .rst_n, .en_i(en), .din_i(code_to_word(c_ideal)), .dout_o(y_ideal), .valid_o(v_ideal));
  polyphase_fir_decim f_raw   (.clk, .rst_n, .en_i(en), .din_i(x_d),    .dout_o(y_raw), .valid_o(v_raw));
  polyphase_fir_decim f_chk   (.clk, .rst_n, .en_i(en), .din_i(dout_d), .dout_o(y_chk), .valid_o(v_chk));

  real yi [$], yr [$], yd [$], yf [$];

  always @(posedge clk) begin
    if (rst_n && v_ideal) yi.push_back(real'(y_ideal));
    if (rst_n && v_raw)   yr.push_back(real'(y_raw));
    if (rst_n && v_dflt)  yd.push_back(real'(y_dflt));
    if (rst_n && v_fine)  yf.push_back(real'(y_fine));
    if (rst_n && (v_chk || v_dflt)) begin
      checks++;
      if (v_chk != v_dflt || y_chk != y_dflt) failures++;
    end
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
    real si, sr, sd, sf;
    u = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      u = 0.2 * $sin(2.0 * 3.14159265358979 * 20.0 * real'(n) / 4096.0);
      en = 1;
    end
    @(negedge clk);
    en = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (yi.size() < SETTLE + NWIN || yr.size() < SETTLE + NWIN || yd.size() < SETTLE + NWIN ||
        yf.size() < SETTLE + NWIN) begin
      failures++;
      $display("FAIL too few decimated words");
    end else begin
      si = snr_db(yi); sr = snr_db(yr); sd = snr_db(yd); sf = snr_db(yf);
      $display("in-band SNR: accurate 1-bit modulator %0.1f dB, erroneous %0.1f dB", si, sr);
      $display("in-band SNR after LMS: default step %0.1f dB, fine step with 24-bit taps %0.1f dB", sd, sf);
      checks++; if (!(si > 40.0))     begin failures++; $display("FAIL reference SNR too low"); end
      checks++; if (!(sf > sd + 3.0)) begin failures++; $display("FAIL smaller step did not reduce tap noise"); end
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
