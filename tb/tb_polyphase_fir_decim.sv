// tb_polyphase_fir_decim: checks the 32-phase, 64-tap polyphase decimator
// against the plain direct-form FIR followed by keeping every 32nd output,
//   y[n] = round( sum_{i=0}^{63} h[i] * x[32n - i] / 2**15 ),
// computed here from the coefficient table. An impulse first shows the
// coefficients themselves at the output (h[32n] for an impulse at sample 0,
// h[32n + 5] for one at sample 27 of the first block); then random data,
// with idle gaps in en, is compared word by word. Rate (one word per 32
// inputs, the first after sample 0) and the one-clock latency are checked.
module tb_polyphase_fir_decim;
  import sd_pkg::*;
  localparam int M = DECIM, P = FIR_TAPS;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  word_t din, dout;
  logic valid;

  polyphase_fir_decim dut (.clk, .rst_n, .en_i(en), .din_i(din), .dout_o(dout), .valid_o(valid));

  always #5 clk = ~clk;

  longint xs [$];
  int nout = 0, bad = 0, cycle = 0, last_edge_cycle = -100;

  always @(posedge clk) begin
    cycle++;
    if (rst_n && valid) begin
      longint acc, e;
      acc = 0;
      for (int i = 0; i < P; i++)
        if (nout*M - i >= 0 && nout*M - i < xs.size()) acc += longint'(FIR_COEF[i]) * xs[nout*M - i];
      e = (acc + (longint'(1) <<< (COEF_W-2))) >>> (COEF_W-1);
      if (e > 2047) e = 2047;
      if (e < -2048) e = -2048;
      checks++;
      if (longint'(dout) != e) begin failures++; if (bad++ < 5) $display("FAIL out %0d: %0d expected %0d", nout, dout, e); end
      checks++;
      // dout/valid change at the first edge after the sample edge and are seen here at the next
      if (cycle - last_edge_cycle != 2) begin failures++; if (bad++ < 5) $display("FAIL latency %0d", cycle - last_edge_cycle); end
      nout++;
    end
  end

  task automatic feed(input longint v, input bit gap);
    @(negedge clk);
    din = word_t'(v); en = 1;
    @(posedge clk);
    #1;
    if (xs.size() % M == 0) last_edge_cycle = cycle;
    xs.push_back(v);
    en = 0;
    if (gap) @(negedge clk);
  endtask

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // impulse of 2047 at sample 0 and of -2048 at sample 27
    for (int n = 0; n < 4*M; n++) feed(n == 0 ? 2047 : (n == 27 ? -2048 : 0), 1'b0);
    for (int n = 0; n < 60*M; n++) feed(longint'($urandom_range(0, 4095)) - 2048, ($urandom_range(0, 5) == 0));
    for (int n = 0; n < 4*M; n++) feed(2047, 1'b0);
    feed(2047, 1'b0);
    repeat (4) @(posedge clk);
    checks++;
    if (nout != (xs.size() + M - 1) / M) begin failures++; $display("FAIL %0d outputs for %0d samples", nout, xs.size()); end
    checks++;
    if (dout < 12'sd2045) begin failures++; $display("FAIL DC gain: %0d", dout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
