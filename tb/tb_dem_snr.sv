// tb_dem_snr: workload run of the element-matching logic in the modulator
// loop: in-band SNR of a 3-bit second-order modulator whose DAC elements are
// mismatched, with and without the second-order DEM.
//
// Three behavioural modulators see the same 0.2 V sine (DAC range +-0.5 V,
// fs = 4 MHz, 20 cycles per 4096 samples, OSR 32):
//   ideal  - matched DAC, thermometer selection;
//   therm  - DAC elements mismatched by up to +-2 % (a fixed pattern),
//            thermometer selection (no DEM);
//   dem    - the same mismatched DAC, elements chosen by dem2_selector.
// Each code stream is mapped to 12-bit words and decimated by 32 with
// polyphase_fir_decim. Over 384 decimated words (60 signal cycles) the
// testbench fits a sine, cosine and DC term at the known frequency and takes
// everything else as noise and distortion. Checks: the ideal modulator
// reaches more than 45 dB, the element mismatch costs the thermometer DAC at
// least 3 dB, and the DEM wins back at least 3 dB of that. It also checks the
// element count of the DEM every sample.
module tb_dem_snr;
  import sd_pkg::*;
  localparam int SETTLE = 32;            // decimated words skipped
  localparam int NWIN   = 384;           // decimated words measured
  localparam int NS     = (SETTLE + NWIN + 2) * DECIM;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  real u;
  code_t  c_ideal, c_therm, c_dem;
  elsel_t s_ideal, s_therm, s_dem;
  word_t  y_ideal, y_therm, y_dem;
  logic   v_ideal, v_therm, v_dem;

  always #5 clk = ~clk;

  therm_decoder #(.N_BITS(Q_BITS)) u_dec_i (.bin_i(c_ideal), .therm_o(s_ideal));
  therm_decoder #(.N_BITS(Q_BITS)) u_dec_t (.bin_i(c_therm), .therm_o(s_therm));
  dem2_selector u_dem (.clk, .rst_n, .en_i(en), .code_i(c_dem), .sel_o(s_dem));

  sd2_mod3_model                         m_ideal (.clk, .rst_n, .en_i(en), .u_i(u), .sel_i(s_ideal), .code_o(c_ideal));
  sd2_mod3_model #(.EL_MISMATCH(0.02))   m_therm (.clk, .rst_n, .en_i(en), .u_i(u), .sel_i(s_therm), .code_o(c_therm));
  sd2_mod3_model #(.EL_MISMATCH(0.02))   m_dem   (.clk, .rst_n, .en_i(en), .u_i(u), .sel_i(s_dem),   .code_o(c_dem));

  polyphase_fir_decim f_ideal (.clk, .rst_n, .en_i(en), .din_i(code_to_word(c_ideal)), .dout_o(y_ideal), .valid_o(v_ideal));
  polyphase_fir_decim f_therm (.clk, .rst_n, .en_i(en), .din_i(code_to_word(c_therm)), .dout_o(y_therm), .valid_o(v_therm));
  polyphase_fir_decim f_dem   (.clk, .rst_n, .en_i(en), .din_i(code_to_word(c_dem)),   .dout_o(y_dem),   .valid_o(v_dem));

  real yi [$], yt [$], yd [$];

  always @(posedge clk) begin
    if (rst_n && v_ideal) yi.push_back(real'(y_ideal));
    if (rst_n && v_therm) yt.push_back(real'(y_therm));
    if (rst_n && v_dem)   yd.push_back(real'(y_dem));
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
    real si, st, sd;
    u = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      u = 0.2 * $sin(2.0 * 3.14159265358979 * 20.0 * real'(n) / 4096.0);
      en = 1;
      #1;
      checks++;
      if ($countones(s_dem) != int'(c_dem)) failures++;
    end
    en = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (yi.size() < SETTLE + NWIN || yt.size() < SETTLE + NWIN || yd.size() < SETTLE + NWIN) begin
      failures++;
      $display("FAIL too few decimated words");
    end else begin
      si = snr_db(yi); st = snr_db(yt); sd = snr_db(yd);
      $display("in-band SNR: ideal DAC %0.1f dB, mismatched thermometer DAC %0.1f dB, mismatched DAC with 2nd-order DEM %0.1f dB", si, st, sd);
      checks++; if (!(si > 45.0))       begin failures++; $display("FAIL ideal SNR too low"); end
      checks++; if (!(st < si - 3.0))   begin failures++; $display("FAIL mismatch had no effect"); end
      checks++; if (!(sd > st + 3.0))   begin failures++; $display("FAIL DEM did not improve the SNR"); end
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
