// tb_lms_adf: end-to-end check of the 20-tap LMS adaptive filter.
//
// The reference word is made from the input by a known FIR,
//   d[n] = 0.5 x[n] - 0.25 x[n-3] + 0.125 x[n-11] + 0.0625 x[n-19],
// which spans all four sections. The testbench runs its own integer model of
// the LMS recursion (Q1.11 words, Q2.10 taps, mu = 1311/65536, round to
// nearest, saturation) and compares Dout, the error and all 20 taps with it
// every sample. After adaptation the taps must be near the known FIR (512,
// -256, 128, 64 in Q2.10, zero elsewhere) and the mean square error must have
// fallen by more than 20 times. "Near" is loose on purpose: with 12-bit taps
// and mu = 0.02 an update smaller than half a tap LSB rounds to zero, so the
// adaptation stalls once |e*x| drops below about 2**27/1311 (a dead zone of
// the word lengths, not a fault); the taps then stay some tens of LSB off.
module tb_lms_adf;
  import sd_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  word_t x, d, dout, err;
  logic signed [TAP_W-1:0] taps [NUM_TAPS];

  lms_adf dut (.clk, .rst_n, .en_i(en), .x_i(x), .d_i(d), .dout_o(dout), .err_o(err), .taps_o(taps));

  always #5 clk = ~clk;

  longint hist [NUM_TAPS];
  longint w [NUM_TAPS];
  longint xs [32];

  function automatic longint sat(longint v, int bits);
    longint mx = (longint'(1) <<< (bits-1)) - 1;
    longint mn = -(longint'(1) <<< (bits-1));
    return v > mx ? mx : (v < mn ? mn : v);
  endfunction

  function automatic longint rsh(longint v, int s);  // round to nearest, ties up
    return (v + (longint'(1) <<< (s-1))) >>> s;
  endfunction

  initial begin
    longint acc, ym, em, tgt;
    real mse_early, mse_late;
    int mismatches;
    mse_early = 0; mse_late = 0; mismatches = 0;
    for (int i = 0; i < NUM_TAPS; i++) begin hist[i] = 0; w[i] = 0; end
    for (int i = 0; i < 32; i++) xs[i] = 0;
    x = '0; d = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      for (int i = 31; i > 0; i--) xs[i] = xs[i-1];
      xs[0] = longint'($urandom_range(0, 2047)) - 1024;
      x = word_t'(xs[0]);
      d = word_t'(sat(rsh(xs[0] * 8 - xs[3] * 4 + xs[11] * 2 + xs[19], 4), DATA_W));
      en = 1;
      // reference model
      for (int i = NUM_TAPS-1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = xs[0];
      acc = 0;
      for (int i = 0; i < NUM_TAPS; i++) acc += w[i] * hist[i];
      ym = sat(rsh(acc, TAP_FRAC), DATA_W);
      em = sat(longint'(d) - ym, DATA_W);
      #1;
      checks++;
      if (longint'(dout) != ym || longint'(err) != em) begin
        failures++;
        if (mismatches++ < 5) $display("FAIL n=%0d dout %0d/%0d err %0d/%0d", n, dout, ym, err, em);
      end
      for (int i = 0; i < NUM_TAPS; i++)
        w[i] = sat(w[i] + rsh(em * hist[i] * MU_Q, 2*(DATA_W-1) + MU_FRAC - TAP_FRAC), TAP_W);
      if (n < 200) mse_early += real'(em * em);
      if (n >= 7800) mse_late += real'(em * em);
      @(posedge clk); #1;
      checks++;
      for (int i = 0; i < NUM_TAPS; i++)
        if (longint'(taps[i]) != w[i]) begin
          failures++;
          if (mismatches++ < 5) $display("FAIL n=%0d tap %0d: %0d expected %0d", n, i, taps[i], w[i]);
          break;
        end
    end
    en = 0;
    for (int i = 0; i < NUM_TAPS; i++) begin
      tgt = (i == 0) ? 512 : (i == 3) ? -256 : (i == 11) ? 128 : (i == 19) ? 64 : 0;
      checks++;
      if (taps[i] - tgt > 96 || tgt - taps[i] > 96) begin
        failures++; $display("FAIL converged tap %0d = %0d, expected about %0d", i, taps[i], tgt);
      end
    end
    checks++;
    if (mse_late / 200.0 > 0.05 * mse_early / 200.0) begin
      failures++; $display("FAIL mse early %f late %f", mse_early / 200.0, mse_late / 200.0);
    end
    $display("mse early %f late %f", mse_early / 200.0, mse_late / 200.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
