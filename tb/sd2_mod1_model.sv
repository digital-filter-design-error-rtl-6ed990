// sd2_mod1_model: behavioural (non-synthesizable) model of a 1-bit
// second-order switched-capacitor sigma-delta modulator, used only by the
// testbenches to drive the digital correction logic with realistic bits.
//
// Loop: two delaying integrators with gains G1 = G2 = 0.5 (the second fed
// with the first integrator minus the DAC level), a comparator on the second
// integrator and a 1-bit DAC at +-0.5:
//   v      = bit ? +0.5 : -0.5
//   i1    <= LEAK*i1 + G1*(u + OP_OFFS - v)
//   i2    <= LEAK*i2 + G2*(i1 - v)
//   bit   <= (i2 + CMP_OFFS + noise) >= 0
// With the ideal settings this gives V = z^-2 U + (1 - z^-1)^2 E. The
// non-idealities are parameters: integrator leakage, sampling-capacitor
// (gain) error on both integrators, op-amp and comparator offsets and
// comparator noise (uniform, peak CMP_NOISE).
// Timing: on a clock edge with en_i high the loop advances one sample.
module sd2_mod1_model #(
  parameter real LEAK      = 1.0,
  parameter real GAIN_ERR  = 0.0,
  parameter real OP_OFFS   = 0.0,
  parameter real CMP_OFFS  = 0.0,
  parameter real CMP_NOISE = 0.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en_i,
  input  real  u_i,
  output logic bit_o
);
  real i1, i2;
  real g1, g2;

  function automatic real urand_pm1();
    return (real'($urandom_range(0, 1000000)) / 500000.0) - 1.0;
  endfunction

  initial begin
    g1 = 0.5 * (1.0 - GAIN_ERR);
    g2 = 0.5 * (1.0 - GAIN_ERR);
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1 <= 0.0; i2 <= 0.0; bit_o <= 1'b0;
    end else if (en_i) begin
      real v, i1n, i2n;
      v = bit_o ? 0.5 : -0.5;
      i1n = LEAK * i1 + g1 * (u_i + OP_OFFS - v);
      i2n = LEAK * i2 + g2 * (i1 - v);
      i1 <= i1n; i2 <= i2n;
      bit_o <= (i2n + CMP_OFFS + CMP_NOISE * urand_pm1()) >= 0.0;
    end
  end
endmodule
