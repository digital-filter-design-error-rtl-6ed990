// lms_adf: 20-tap LMS adaptive digital filter for background error correction.
//
// The filter takes the word x of the fast, inaccurate converter and the word
// d of the slow, accurate reference converter for the same input. It forms
// Dout = sum_i w_i * x[n-i] over 20 taps and the error e = d - Dout, and
// adapts every tap by w_i += mu * e * x[n-i] (mu = 0.02), so that Dout
// converges on the accurate output. As in the design, the 20 taps are four
// 5-tap sections chained through the delayed x and the partial sum; the first
// section has only four delay registers, the last one has no partial sum
// coming in (its input is tied to zero).
//
// The design draws the reference word d going into the tap-update
// multipliers; since the taps are driven by the error e = d - Dout, this
// implementation computes e once here and hands it to all sections.
// Word formats: x, d, Dout and e are signed 12-bit Q1.11; the partial sums
// between sections are kept at full precision (this design's choice) and
// Dout is rounded and saturated to 12 bits only here.
//
// Timing: one sample per clock edge with en_i high. dout_o and err_o are
// combinational in the current x_i, d_i and the registered state; the taps
// take their update at the same edge that shifts x_i into the delay line.
module lms_adf
  import sd_pkg::*;
#(
  parameter int unsigned D_W    = DATA_W,
  parameter int unsigned W_W    = TAP_W,
  parameter int unsigned W_FRAC = TAP_FRAC,
  parameter int unsigned N_BLK  = NUM_TAPS / BLK_TAPS,
  parameter int unsigned B_TAP  = BLK_TAPS,
  parameter int unsigned MU     = MU_Q,
  parameter int unsigned M_FRAC = MU_FRAC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en_i,
  input  logic signed [D_W-1:0]  x_i,     // inaccurate converter output D
  input  logic signed [D_W-1:0]  d_i,     // accurate converter output Dideal
  output logic signed [D_W-1:0]  dout_o,  // corrected output Dout
  output logic signed [D_W-1:0]  err_o,   // e = Dideal - Dout
  output logic signed [W_W-1:0]  taps_o [N_BLK*B_TAP]
);
  localparam int unsigned ACC_W = D_W + W_W + 5;
  localparam logic signed [ACC_W-1:0] DMAX = ACC_W'((1 <<< (D_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] DMIN = -ACC_W'(1 <<< (D_W-1));

  logic signed [D_W-1:0]   xc [N_BLK+1];  // x chain between sections
  logic signed [ACC_W-1:0] yc [N_BLK+1];  // partial sums, yc[N_BLK] = 0
  logic signed [ACC_W-1:0] y_round;

  assign xc[0]     = x_i;
  assign yc[N_BLK] = '0;

  for (genvar b = 0; b < N_BLK; b++) begin : g_blk
    logic signed [W_W-1:0] wb [B_TAP];
    lms_block #(
      .D_W(D_W), .W_W(W_W), .W_FRAC(W_FRAC), .N_TAP(B_TAP),
      .MU(MU), .M_FRAC(M_FRAC), .ACC_W(ACC_W), .FIRST(b == 0)
    ) u_blk (
      .clk, .rst_n, .en_i,
      .x_i  (xc[b]),
      .err_i(err_o),
      .y_i  (yc[b+1]),
      .y_o  (yc[b]),
      .x_o  (xc[b+1]),
      .w_o  (wb)
    );
    for (genvar j = 0; j < B_TAP; j++) begin : g_tap
      assign taps_o[b*B_TAP + j] = wb[j];
    end
  end

  // Scale Q(D_W-1+W_FRAC) back to Q1.11 with rounding, then saturate.
  always_comb begin
    logic signed [ACC_W:0] e;
    y_round = (yc[0] + (ACC_W'(1) <<< (W_FRAC-1))) >>> W_FRAC;
    if (y_round > DMAX)      dout_o = D_W'(DMAX);
    else if (y_round < DMIN) dout_o = D_W'(DMIN);
    else                     dout_o = D_W'(y_round);
    e = (ACC_W+1)'(d_i) - (ACC_W+1)'(dout_o);
    if (e > (ACC_W+1)'(DMAX))      err_o = D_W'(DMAX);
    else if (e < (ACC_W+1)'(DMIN)) err_o = D_W'(DMIN);
    else                           err_o = D_W'(e);
  end

endmodule
