// polyphase_fir_decim: M-phase, P-tap polyphase FIR decimation filter.
//
// Computes y[n] = sum_{i=0}^{P-1} h[i] * x[n*M - i], i.e. a P-tap low-pass
// FIR followed by keeping one output in M, without computing the outputs that
// would be thrown away. The impulse response is split into M polyphase
// components e_k[j] = h[j*M + k], each a (P/M)-tap filter running at fs/M.
// An input commutator steps through the phases 0, M-1, M-2, ..., 1, 0, ...:
// sample number m after reset goes to phase k = (M - m mod M) mod M and is
// shifted into that phase's delay line of P/M registers (P registers in all).
// When a phase-0 sample has arrived, every delay line holds its newest P/M
// samples and one output is formed as the sum of all P products.
// Defaults follow the design: M = 32 phases, P = 64 taps, 12-bit input.
// The coefficients are sd_pkg::FIR_COEF (see there for how they were made);
// the output has the input's word length: the Q(COEF_W-1) sum is rounded and
// saturated back to the input scale (this design's choice).
//
// Timing: en_i marks an input sample. The 1st, (M+1)-th, (2M+1)-th ... sample
// after reset is a phase-0 sample; one clock after the edge that takes it,
// dout_o holds the new output and valid_o is high for one clock.
module polyphase_fir_decim
  import sd_pkg::*;
#(
  parameter int unsigned IN_W   = DATA_W,
  parameter int unsigned M      = DECIM,
  parameter int unsigned P      = FIR_TAPS,
  parameter int unsigned C_W    = COEF_W,
  parameter int unsigned OUT_W  = IN_W,
  parameter logic signed [C_W-1:0] COEF [P] = FIR_COEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en_i,
  input  logic signed [IN_W-1:0]  din_i,
  output logic signed [OUT_W-1:0] dout_o,
  output logic                    valid_o
);
  localparam int unsigned L     = P / M;                 // taps per phase
  localparam int unsigned PH_W  = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned ACC_W = IN_W + C_W + $clog2(P) + 1;
  localparam logic signed [ACC_W-1:0] OMAX = ACC_W'((1 <<< (OUT_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] OMIN = -ACC_W'(1 <<< (OUT_W-1));

  logic signed [IN_W-1:0] line [M][L];  // line[k][j] = x[(n-j)M - k]
  logic [PH_W-1:0]        phase;        // commutator position
  logic                   fire;         // a phase-0 sample was just taken
  logic signed [ACC_W-1:0] acc, acc_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < M; k++)
        for (int j = 0; j < L; j++) line[k][j] <= '0;
      phase <= '0;
      fire  <= 1'b0;
    end else begin
      fire <= en_i && (phase == '0);
      if (en_i) begin
        line[phase][0] <= din_i;
        for (int j = 1; j < L; j++) line[phase][j] <= line[phase][j-1];
        // counter-clockwise commutator: 0, M-1, M-2, ..., 1, 0, ...
        phase <= (phase == '0) ? PH_W'(M-1) : phase - 1'b1;
      end
    end
  end

  // Sum of the M polyphase sub-filters.
  always_comb begin
    acc = '0;
    for (int k = 0; k < M; k++)
      for (int j = 0; j < L; j++)
        acc = acc + ACC_W'(line[k][j] * COEF[j*M + k]);
    acc_r = (acc + (ACC_W'(1) <<< (C_W-2))) >>> (C_W-1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_o  <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= fire;
      if (fire) begin
        if (acc_r > OMAX)      dout_o <= OUT_W'(OMAX);
        else if (acc_r < OMIN) dout_o <= OUT_W'(OMIN);
        else                   dout_o <= OUT_W'(acc_r);
      end
    end
  end

endmodule
