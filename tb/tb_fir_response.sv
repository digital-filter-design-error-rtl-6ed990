// tb_fir_response: frequency response of the polyphase FIR decimator with
// its default coefficient set, against the filter's pass and stop edges.
//
// For each test tone (a whole number of cycles in 4096 input samples, fs =
// 4 MHz) the filter is reset and fed a 12-bit sine of amplitude 1500. After
// 4 settling words, 128 decimated words are collected and a sine and cosine
// are fitted at the tone's (aliased) output frequency. The measured
// amplitude is compared with 1500 * |H(f)|, where H is computed in floating
// point directly from sd_pkg::FIR_COEF (tolerance 2 % + 1 LSB). A DC input is
// checked the same way against the coefficient sum.
// Edge checks: at most 1 dB loss at the 25 kHz pass edge, and at least 40 dB
// attenuation for tones at 200 kHz and above. The stop edge at 62.5 kHz is
// not checked: a 64-tap filter cannot reach it (about -6 dB there).
module tb_fir_response;
  import sd_pkg::*;
  localparam int    NW  = 128;           // decimated words per measurement
  localparam int    SKIP = 4;            // settling words
  localparam real   AMP = 1500.0;
  localparam real   PI  = 3.14159265358979;
  localparam int TONE_BIN [7] = '{0, 10, 26, 60, 100, 210, 520};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  word_t din, dout;
  logic  valid;

  always #5 clk = ~clk;

  polyphase_fir_decim dut (.clk, .rst_n, .en_i(en), .din_i(din), .dout_o(dout), .valid_o(valid));

  real ys [$];
  always @(posedge clk) if (rst_n && valid) ys.push_back(real'(dout));

  // |H| at bin b of 4096 (b / 4096 * fs), from the coefficient table
  function automatic real h_mag(int b);
    real re, im, w;
    re = 0; im = 0;
    for (int n = 0; n < FIR_TAPS; n++) begin
      w = 2.0 * PI * real'(b) * real'(n) / 4096.0;
      re += real'(FIR_COEF[n]) * $cos(w);
      im += real'(FIR_COEF[n]) * $sin(w);
    end
    return $sqrt(re*re + im*im) / 32768.0;
  endfunction

  // run one tone at input bin b (b = 0: DC of height AMP); return amplitude
  task automatic measure(input int b, output real amp);
    real a, c, w;
    int  ab;
    ys.delete();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < (SKIP + NW) * DECIM; n++) begin
      @(negedge clk);
      if (b == 0) din = word_t'($rtoi(AMP));
      else        din = word_t'($rtoi($floor(AMP * $sin(2.0 * PI * real'(b) * real'(n) / 4096.0) + 0.5)));
      en = 1;
    end
    @(negedge clk);
    en = 0;
    repeat (3) @(posedge clk);
    if (ys.size() < SKIP + NW) begin
      amp = -1.0;
      return;
    end
    ab = b % NW;                         // alias at the output rate (NW words = 4096 inputs)
    a = 0; c = 0;
    if (b == 0) begin
      for (int n = 0; n < NW; n++) a += ys[SKIP+n];
      amp = a / NW;
    end else begin
      for (int n = 0; n < NW; n++) begin
        w = 2.0 * PI * real'(ab) * real'(n) / real'(NW);
        a += ys[SKIP+n] * $sin(w);
        c += ys[SKIP+n] * $cos(w);
      end
      amp = 2.0 * $sqrt(a*a + c*c) / NW;
    end
  endtask

  initial begin
    real amp, exp_amp, f_khz;
    for (int t = 0; t < 7; t++) begin
      measure(TONE_BIN[t], amp);
      exp_amp = AMP * h_mag(TONE_BIN[t]);
      f_khz = real'(TONE_BIN[t]) * 4000.0 / 4096.0;
      $display("%7.1f kHz: measured %8.2f, expected %8.2f (%0.1f dB)", f_khz, amp, exp_amp,
               20.0 * $log10(exp_amp / AMP));
      checks++;
      if (!(amp >= 0.0 && (amp - exp_amp) <= 0.02 * exp_amp + 1.0 && (exp_amp - amp) <= 0.02 * exp_amp + 1.0)) begin
        failures++;
        $display("FAIL gain at %0.1f kHz", f_khz);
      end
      if (TONE_BIN[t] == 26) begin           // 25.4 kHz, the pass edge
        checks++;
        if (!(amp >= AMP * 0.891)) begin failures++; $display("FAIL pass-edge loss above 1 dB"); end
      end
      if (f_khz >= 200.0) begin
        checks++;
        if (!(amp <= AMP * 0.01)) begin failures++; $display("FAIL stop-band attenuation below 40 dB"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7 * ((SKIP + NW) * DECIM + 20)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
