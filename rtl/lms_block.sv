// lms_block: one 5-tap section ("main block") of the LMS adaptive filter.
//
// The section holds a piece of the input delay line, one tap register per
// tap, a tap multiplier per tap, a chain of adders for the partial sum and a
// tap-update multiplier per tap, as in the design's main-block drawing. The
// first section of the filter has no D0 register (its first tap uses x
// directly), so it carries BLK_TAPS-1 delay registers; the others carry
// BLK_TAPS. x_o is the oldest sample of this section, which the next section
// registers in its own D0.
//
// Arithmetic (word formats are this design's choice): x and the error are
// Q1.11, taps are TAP_W bits with TAP_FRAC fraction bits, the step size mu is
// MU_Q / 2**MU_FRAC. The update is w_j += mu * err * x_j (Widrow-Hoff with the
// constant 2 folded into mu), rounded to the tap LSB and saturated. The partial
// sum is kept at full precision, y_o = y_i + sum_j w_j * x_j, with
// DATA_W-1+TAP_FRAC fraction bits; the filter top scales it back to 12 bits.
//
// Timing: y_o is combinational in x_i, y_i and the registers. On a clock edge
// with en_i high the delay line shifts and every tap takes its update, using
// the err_i of the same sample.
module lms_block
  import sd_pkg::*;
#(
  parameter int unsigned D_W     = DATA_W,
  parameter int unsigned W_W     = TAP_W,
  parameter int unsigned W_FRAC  = TAP_FRAC,
  parameter int unsigned N_TAP   = BLK_TAPS,
  parameter int unsigned MU      = MU_Q,
  parameter int unsigned M_FRAC  = MU_FRAC,
  parameter int unsigned ACC_W   = D_W + W_W + 5,
  parameter bit          FIRST   = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en_i,
  input  logic signed [D_W-1:0]   x_i,
  input  logic signed [D_W-1:0]   err_i,
  input  logic signed [ACC_W-1:0] y_i,
  output logic signed [ACC_W-1:0] y_o,
  output logic signed [D_W-1:0]   x_o,
  output logic signed [W_W-1:0]   w_o [N_TAP]
);
  localparam int unsigned NREG  = FIRST ? N_TAP - 1 : N_TAP;
  localparam int unsigned UPD_W = 2*D_W + $clog2(MU+1) + 2;
  localparam int unsigned SHIFT = 2*(D_W-1) + M_FRAC - W_FRAC;
  localparam logic signed [W_W:0] WMAX = (W_W+1)'((1 <<< (W_W-1)) - 1);
  localparam logic signed [W_W:0] WMIN = -(W_W+1)'(1 <<< (W_W-1));

  logic signed [D_W-1:0] dl  [NREG];   // D0..D4 (D1..D4 in the first block)
  logic signed [D_W-1:0] xt  [N_TAP];  // sample seen by each tap
  logic signed [W_W-1:0] w   [N_TAP];  // tap registers
  logic signed [W_W:0]   w_nx[N_TAP];

  always_comb begin
    for (int j = 0; j < N_TAP; j++) begin
      if (FIRST) xt[j] = (j == 0) ? x_i : dl[(j == 0) ? 0 : j-1];
      else       xt[j] = dl[j];
    end
  end

  // Tap multipliers and the sum chain.
  always_comb begin
    logic signed [ACC_W-1:0] acc;
    acc = y_i;
    for (int j = 0; j < N_TAP; j++)
      acc = acc + ACC_W'(xt[j] * w[j]);
    y_o = acc;
  end

  // Tap-update multipliers: w + round(mu * err * x), saturated.
  always_comb begin
    for (int j = 0; j < N_TAP; j++) begin
      logic signed [UPD_W-1:0] p;
      logic signed [UPD_W-1:0] d;
      p = UPD_W'(err_i * xt[j]) * UPD_W'(signed'({1'b0, MU}));
      d = (p + (UPD_W'(1) <<< (SHIFT-1))) >>> SHIFT;
      if (UPD_W'(w[j]) + d > UPD_W'(WMAX))      w_nx[j] = WMAX;
      else if (UPD_W'(w[j]) + d < UPD_W'(WMIN)) w_nx[j] = WMIN;
      else                                      w_nx[j] = (W_W+1)'(UPD_W'(w[j]) + d);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NREG; j++)  dl[j] <= '0;
      for (int j = 0; j < N_TAP; j++) w[j]  <= '0;
    end else if (en_i) begin
      dl[0] <= x_i;
      for (int j = 1; j < NREG; j++) dl[j] <= dl[j-1];
      for (int j = 0; j < N_TAP; j++) w[j] <= w_nx[j][W_W-1:0];
    end
  end

  assign x_o = xt[N_TAP-1];
  assign w_o = w;

endmodule
