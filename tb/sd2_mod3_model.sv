// sd2_mod3_model: behavioural (non-synthesizable) model of a 3-bit
// second-order switched-capacitor sigma-delta modulator, used only by the
// testbenches to drive the digital correction logic with realistic codes.
//
// Loop: two delaying integrators with gains G1 = G2 = 0.5 (the second fed
// with the first integrator minus the DAC level), a 3-bit quantizer on four
// times the second integrator and an 8-element unit DAC spanning -0.5 .. +0.5:
//   v      = sum_i sel_i * (1 + eps_i) / 7 - 0.5
//   i1    <= LEAK*i1 + G1*(u + OP_OFFS - v)
//   i2    <= LEAK*i2 + G2*(i1 - v)
//   code  <= clamp(round(7*(4*i2 + CMP_OFFS + noise) + 3.5), 0, 7)
// With the ideal settings this gives V = z^-2 U + (1 - z^-1)^2 E. The
// non-idealities are parameters: integrator leakage, gain (capacitor)
// error, op-amp and comparator offsets, comparator noise (uniform, peak
// CMP_NOISE) and DAC element mismatch (a fixed, zero-sum pattern of relative
// element errors between -EL_MISMATCH and +EL_MISMATCH).
// sel_i is the DAC element enable word, which the caller derives from code_o
// (directly or through element-matching logic) in the same sample.
// Timing: on a clock edge with en_i high the loop advances one sample.
module sd2_mod3_model #(
  parameter real LEAK        = 1.0,
  parameter real GAIN_ERR    = 0.0,
  parameter real OP_OFFS     = 0.0,
  parameter real CMP_OFFS    = 0.0,
  parameter real CMP_NOISE   = 0.0,
  parameter real EL_MISMATCH = 0.0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en_i,
  input  real        u_i,
  input  logic [7:0] sel_i,
  output logic [2:0] code_o
);
  real i1, i2, k [8];
  real g1, g2;

  function automatic real urand_pm1();
    return (real'($urandom_range(0, 1000000)) / 500000.0) - 1.0;
  endfunction

  initial begin
    g1 = 0.5 * (1.0 - GAIN_ERR);
    g2 = 0.5 * (1.0 - GAIN_ERR);
    // fixed, zero-sum mismatch pattern so that runs are repeatable
    k[0] = 1.0 + EL_MISMATCH *  1.0;  k[1] = 1.0 - EL_MISMATCH * 0.6;
    k[2] = 1.0 + EL_MISMATCH *  0.3;  k[3] = 1.0 - EL_MISMATCH * 1.0;
    k[4] = 1.0 + EL_MISMATCH *  0.8;  k[5] = 1.0 - EL_MISMATCH * 0.2;
    k[6] = 1.0 + EL_MISMATCH *  0.5;  k[7] = 1.0 - EL_MISMATCH * 0.8;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1 <= 0.0; i2 <= 0.0; code_o <= 3'd3;
    end else if (en_i) begin
      real v, i1n, i2n, w;
      int c;
      v = 0.0;
      for (int i = 0; i < 8; i++) if (sel_i[i]) v += k[i];
      v = v / 7.0 - 0.5;
      i1n = LEAK * i1 + g1 * (u_i + OP_OFFS - v);
      i2n = LEAK * i2 + g2 * (i1 - v);
      w = 4.0 * i2n + CMP_OFFS + CMP_NOISE * urand_pm1();
      c = $rtoi($floor(7.0 * w + 3.5 + 0.5));
      if (c < 0) c = 0;
      if (c > 7) c = 7;
      i1 <= i1n; i2 <= i2n; code_o <= 3'(c);
    end
  end
endmodule
