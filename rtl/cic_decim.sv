// cic_decim: cascaded integrator-comb decimation filter.
//
// N integrators run at the input rate fs, a rate switch keeps every R-th
// output of the last integrator, and N combs with a differential delay of M
// samples run at fs/R. The transfer function referred to fs is
//   H(z) = ((1 - z^-RM) / (1 - z^-1))^N,
// a cascade of N length-RM moving sums with DC gain (R*M)**N. The design
// uses N = 4, R = 32, M = 1 and a 12-bit input, which sets the internal width
// to N*log2(R*M) + B_in = 32 bits; all registers use this width and wrap in
// two's complement, which the CIC structure tolerates as long as the final
// result fits. As in the design, the output word has the input's length: it
// is the top OUT_W bits of the comb result, i.e. the result divided by
// (R*M)**N when R*M is a power of two (truncated towards minus infinity).
//
// The integrators are registered, each adding the previous stage's value of
// the last sample, so the integrator section delays the signal by N-1 samples
// on top of the filter itself (a pure latency, the response is unchanged).
//
// Timing: en_i marks an input sample. The R-th, 2R-th, ... sample after reset
// completes an output: dout_o takes it and valid_o is high for one clock, one
// clock after the edge that takes that sample.
// en_i may be high on every clock.
module cic_decim
  import sd_pkg::*;
#(
  parameter int unsigned IN_W   = DATA_W,
  parameter int unsigned N      = CIC_STAGES,
  parameter int unsigned R      = DECIM,
  parameter int unsigned M      = CIC_DELAY,
  parameter int unsigned OUT_W  = IN_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en_i,
  input  logic signed [IN_W-1:0]  din_i,
  output logic signed [OUT_W-1:0] dout_o,
  output logic                    valid_o
);
  localparam int unsigned ACC_W = N * $clog2(R*M) + IN_W;
  localparam int unsigned CNT_W = (R > 1) ? $clog2(R) : 1;

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t integ [N];          // integrator section, at fs
  acc_t comb_dly [N][M];    // comb delay lines, at fs/R
  acc_t comb_out [N+1];
  logic [CNT_W-1:0] cnt;
  logic             dec;    // this input sample completes an output

  assign dec = en_i && (cnt == CNT_W'(R-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) integ[i] <= '0;
      cnt <= '0;
    end else if (en_i) begin
      integ[0] <= integ[0] + ACC_W'(din_i);
      for (int i = 1; i < N; i++) integ[i] <= integ[i] + integ[i-1];
      cnt <= dec ? '0 : cnt + 1'b1;
    end
  end

  // The rate switch samples the integrator section after its update; the
  // simplest exact way is to take the registered last integrator one clock
  // later, which is what the pipeline below does.
  logic dec_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dec_q <= 1'b0;
    else        dec_q <= dec;
  end

  always_comb begin
    comb_out[0] = integ[N-1];
    for (int i = 0; i < N; i++)
      comb_out[i+1] = comb_out[i] - comb_dly[i][M-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int k = 0; k < M; k++) comb_dly[i][k] <= '0;
      dout_o  <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= dec_q;
      if (dec_q) begin
        for (int i = 0; i < N; i++) begin
          comb_dly[i][0] <= comb_out[i];
          for (int k = 1; k < M; k++) comb_dly[i][k] <= comb_dly[i][k-1];
        end
        dout_o <= comb_out[N][ACC_W-1 -: OUT_W];
      end
    end
  end

endmodule
