// tb_cic_response: passband droop of the CIC decimator (N = 4, R = 32,
// M = 1) against the exact CIC response and against the design's table of
// passband attenuation for large rate changes.
//
// For each test tone (a whole number of cycles in 4096 input samples) the
// filter is reset and fed a 12-bit sine of amplitude 1500. After 6 settling
// words, 128 decimated words are collected and a sine and cosine are fitted
// at the tone frequency (the DC term of the fit absorbs the output
// truncation). The measured amplitude is compared with
// 1500 * |sin(pi f R / fs) / (R sin(pi f / fs))|**4 (tolerance 1 % + 2 LSB).
// The tones sit at 1/32, 1/16, 1/8 and 1/4 of the output rate, the relative
// bandwidths of the attenuation table. For N = 4 the table's entries are
// 0.04, 0.24, 0.88 and 3.64 dB (four times the one-stage column: 0.01, 0.06,
// 0.22, 0.91 dB); the measured attenuation must be within 0.05 dB of them.
// A DC input must come out at its own value (unity gain, less the
// truncation of at most one LSB).
module tb_cic_response;
  import sd_pkg::*;
  localparam int    NW  = 128;           // decimated words per measurement
  localparam int    SKIP = 6;            // settling words
  localparam real   AMP = 1500.0;
  localparam real   PI  = 3.14159265358979;
  localparam int  TONE_BIN [5] = '{0, 4, 8, 16, 32};
  localparam real TABLE_DB [5] = '{0.0, 0.04, 0.24, 0.88, 3.64};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  word_t din, dout;
  logic  valid;

  always #5 clk = ~clk;

  cic_decim dut (.clk, .rst_n, .en_i(en), .din_i(din), .dout_o(dout), .valid_o(valid));

  real ys [$];
  always @(posedge clk) if (rst_n && valid) ys.push_back(real'(dout));

  // exact |H| / (R M)**N at bin b of 4096 (b / 4096 * fs)
  function automatic real h_mag(int b);
    real x;
    if (b == 0) return 1.0;
    x = PI * real'(b) / 4096.0;
    return ($sin(x * DECIM) / (DECIM * $sin(x))) ** 4;
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
    real amp, exp_amp, f_khz, att_db;
    for (int t = 0; t < 5; t++) begin
      measure(TONE_BIN[t], amp);
      exp_amp = AMP * h_mag(TONE_BIN[t]);
      f_khz = real'(TONE_BIN[t]) * 4000.0 / 4096.0;
      att_db = (amp > 0.0) ? -20.0 * $log10(amp / AMP) : 99.0;
      $display("%7.2f kHz: measured %8.2f (%0.3f dB down), expected %8.2f", f_khz, amp, att_db, exp_amp);
      checks++;
      if (TONE_BIN[t] == 0) begin
        if (!(amp <= AMP && amp >= AMP - 1.0)) begin failures++; $display("FAIL DC gain"); end
      end else begin
        if (!(amp >= 0.0 && (amp - exp_amp) <= 0.01 * exp_amp + 2.0 && (exp_amp - amp) <= 0.01 * exp_amp + 2.0)) begin
          failures++;
          $display("FAIL gain at %0.2f kHz", f_khz);
        end
        checks++;
        if (!(att_db >= TABLE_DB[t] - 0.05 && att_db <= TABLE_DB[t] + 0.05)) begin
          failures++;
          $display("FAIL attenuation at %0.2f kHz differs from the table (%0.2f dB)", f_khz, TABLE_DB[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * ((SKIP + NW) * DECIM + 20)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
