// therm_decoder: binary to thermometer code decoder for a unit-element DAC.
//
// A code b in 0 .. 2**N_BITS-1 switches on the b lowest outputs, so t[i] is
// 1 exactly when i < b. For the 3-bit case this gives the 3-to-8 decoder of
// the unit-element DAC: "001" -> 00000001, "111" -> 01111111 (the top output
// of the 8 is never set by a 3-bit code). Purely combinational, no clock.
module therm_decoder #(
  parameter int unsigned N_BITS = 3
) (
  input  logic [N_BITS-1:0]      bin_i,
  output logic [(1<<N_BITS)-1:0] therm_o
);
  always_comb begin
    for (int unsigned i = 0; i < (1 << N_BITS); i++)
      therm_o[i] = (i < bin_i);
  end
endmodule
