// tb_cic_decim: checks the CIC decimator (N=4, R=32, M=1, 12-bit) against a
// direct convolution worked out here. The impulse response of N cascaded
// length-RM moving sums is built by repeated convolution; the expected output
// for the j-th decimated word is
//   y_j = floor( sum_k h[k] * x[jR - 1 - (N-1) - k] / (RM)**N )
// (x counted from 0 after reset, N-1 samples of integrator pipeline latency).
// It also checks the rate (one word per R inputs), the one-clock latency from
// the R-th sample, a full-scale DC input (no wrap error) and idle gaps in en.
module tb_cic_decim;
  import sd_pkg::*;
  localparam int N = CIC_STAGES, R = DECIM, M = CIC_DELAY;
  localparam int HL = N * (R*M - 1) + 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  word_t din, dout;
  logic valid;

  cic_decim dut (.clk, .rst_n, .en_i(en), .din_i(din), .dout_o(dout), .valid_o(valid));

  always #5 clk = ~clk;

  longint h [HL];
  longint xs [$];
  int nsamp = 0, nout = 0, last_edge_cycle = -1, cycle = 0, bad = 0;

  // sample-side bookkeeping and output comparison
  always @(posedge clk) begin
    cycle++;
    if (rst_n && valid) begin
      longint acc, exp_v;
      int j, base;
      j = nout + 1;
      base = j*R - 1 - (N-1);
      acc = 0;
      for (int k = 0; k < HL; k++)
        if (base - k >= 0) acc += h[k] * xs[base - k];
      exp_v = acc >>> (N * $clog2(R*M));
      checks++;
      if (longint'(dout) != exp_v) begin
        failures++; if (bad++ < 5) $display("FAIL out %0d: %0d expected %0d", j, dout, exp_v);
      end
      checks++;
      // dout/valid change at the first edge after the sample edge and are seen here at the next
      if (cycle - last_edge_cycle != 2) begin
        failures++; if (bad++ < 5) $display("FAIL latency %0d", cycle - last_edge_cycle);
      end
      nout++;
    end
  end

  task automatic feed(input longint v, input bit gap);
    @(negedge clk);
    din = word_t'(v); en = 1;
    @(posedge clk);
    #1;
    xs.push_back(v); nsamp++;
    if (nsamp % R == 0) last_edge_cycle = cycle;
    en = 0;
    if (gap) begin @(negedge clk); en = 0; end
  endtask

  initial begin
    longint tmp [HL];
    for (int k = 0; k < HL; k++) h[k] = (k < R*M) ? 1 : 0;
    for (int s = 1; s < N; s++) begin
      for (int k = 0; k < HL; k++) begin
        tmp[k] = 0;
        for (int i = 0; i < R*M; i++) if (k - i >= 0) tmp[k] += h[k-i];
      end
      h = tmp;
    end
    din = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 64*R; n++) feed(longint'($urandom_range(0, 4095)) - 2048, ($urandom_range(0, 7) == 0));
    for (int n = 0; n < 8*R; n++) feed(-2048, 1'b0);  // full-scale negative DC
    for (int n = 0; n < 8*R; n++) feed(2047, 1'b0);   // full-scale positive DC
    repeat (4) @(posedge clk);
    checks++;
    if (nout != nsamp / R) begin failures++; $display("FAIL %0d outputs for %0d samples", nout, nsamp); end
    checks++;
    if (dout != 12'sd2046 && dout != 12'sd2047) begin failures++; $display("FAIL DC output %0d", dout); end
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
