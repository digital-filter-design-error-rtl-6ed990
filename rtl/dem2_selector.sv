// dem2_selector: second-order dynamic element matching for a unit-element DAC.
//
// The quantizer code d (0..NUM_EL-1) says how many of the NUM_EL equal DAC
// elements must be switched on; this block decides which ones, so that the
// error caused by element mismatch is pushed out of the signal band with a
// second-order shaping, E(z) = (1 - z^-1)^2 * (bounded sequence), as the
// design asks of its "second order DEM logic".
//
// How it works (this design's own realisation; the design description gives
// the shaping target, not a circuit). Every element i keeps a small integer
// state q_i. Per sample the usage error of element i, scaled by NUM_EL, is
//   u_i = NUM_EL*s_i - d        (s_i = 1 when element i is on)
// and the block forces u_i(k) = q_i(k) - 2 q_i(k-1) + q_i(k-2). With the
// prediction x_i = 2 q_i(k-1) - q_i(k-2) this is q_i(k) = u_i(k) + x_i; the
// state stays small when the d elements with the lowest x_i are switched on.
// The elements are ranked by x_i (ties go to the lower index), the code is
// expanded to a thermometer word in rank order, and element i takes the
// thermometer bit of its rank: a sorting network in place of the random
// butterfly of a plain randomiser. The states saturate at Q_W bits; with
// Q_W = 10 (+-511) they did not reach the limit in a million samples of
// uniformly random codes (largest magnitude seen about 230), so in practice
// the shaping is exact.
//
// Interface and timing: sel_o follows code_i combinationally (the DAC must
// see the selection in the same sample); the states advance on a clock edge
// with en_i high (one sample of the modulator clock). rst_n clears the states,
// which makes the first selection the plain thermometer code.
module dem2_selector
  import sd_pkg::*;
#(
  parameter int unsigned N_BITS = Q_BITS,
  parameter int unsigned Q_W    = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en_i,
  input  logic [N_BITS-1:0]        code_i,
  output logic [(1<<N_BITS)-1:0]   sel_o
);
  localparam int unsigned NE = 1 << N_BITS;
  localparam int unsigned RW = $clog2(NE);
  localparam int signed   QMAX = (1 <<< (Q_W-1)) - 1;
  localparam int signed   QMIN = -(1 <<< (Q_W-1));

  typedef logic signed [Q_W-1:0] st_t;

  st_t  q1 [NE];   // q_i(k-1)
  st_t  q2 [NE];   // q_i(k-2)
  logic signed [Q_W+1:0] x [NE];
  logic [RW-1:0] rank [NE];
  logic [NE-1:0] therm;

  therm_decoder #(.N_BITS(N_BITS)) u_therm (.bin_i(code_i), .therm_o(therm));

  always_comb begin
    for (int i = 0; i < NE; i++)
      x[i] = 2 * (Q_W+2)'(q1[i]) - (Q_W+2)'(q2[i]);
    for (int i = 0; i < NE; i++) begin
      rank[i] = '0;
      for (int j = 0; j < NE; j++)
        if ((x[j] < x[i]) || ((x[j] == x[i]) && (j < i)))
          rank[i] = rank[i] + 1'b1;
    end
    for (int i = 0; i < NE; i++)
      sel_o[i] = therm[rank[i]];
  end

  function automatic st_t sat(input logic signed [Q_W+3:0] v);
    if (v > (Q_W+4)'(QMAX))      return st_t'(QMAX);
    else if (v < (Q_W+4)'(QMIN)) return st_t'(QMIN);
    else               return st_t'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NE; i++) begin
        q1[i] <= '0;
        q2[i] <= '0;
      end
    end else if (en_i) begin
      for (int i = 0; i < NE; i++) begin
        q1[i] <= sat((Q_W+4)'(x[i])
                     + (sel_o[i] ? (Q_W+4)'(NE) : '0)
                     - (Q_W+4)'({1'b0, code_i}));
        q2[i] <= q1[i];
      end
    end
  end

  // The number of elements switched on always equals the code.
  assert property (@(posedge clk) disable iff (!rst_n) $countones(sel_o) == int'(code_i));

endmodule
