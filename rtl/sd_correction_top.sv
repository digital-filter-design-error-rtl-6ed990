// sd_correction_top: digital error correction around a 3-bit second-order
// sigma-delta converter.
//
// Two modulators convert the same held input: a fast one whose analog parts
// are imperfect (gain and capacitor errors, integrator leakage, offsets, DAC
// element mismatch) and an accurate reference. This top holds the digital
// parts of that arrangement:
//  * dem2_selector - the second-order dynamic element matching logic in the
//    fast modulator's feedback path: it turns the 3-bit quantizer code into
//    the enables of the 8 unit DAC elements (dac_sel_o), so that element
//    mismatch is shaped out of the signal band;
//  * lms_adf       - the 20-tap LMS adaptive filter: it filters the fast
//    converter's words (D) towards the reference words (Dideal) and reports
//    Dout and the error e = Dideal - Dout that drives its adaptation;
//  * cic_decim and polyphase_fir_decim - the two decimation filters (CIC,
//    N=4, R=32; polyphase FIR, 32 phases, 64 taps), both run on Dout and
//    reduce 4 MHz to 125 kHz; their outputs are brought out side by side.
// The analog parts (track-and-hold, integrators, quantizers, resistor DAC
// and the whole reference modulator) are outside: the quantizer codes come
// in as ports and the DAC element enables go out.
//
// Both codes are turned into 12-bit words with sd_pkg::code_to_word (a level
// mapping of this design's own; the design only says the filter words are
// 12 bits). Running both decimators in parallel on Dout is also this
// design's choice: they are presented as two alternative decimation filters.
//
// Timing: en_i is the modulator sample strobe (fs = 4 MHz; it may be high on
// every clock). dac_sel_o follows q_code_i in the same clock, dout_o and
// err_o follow the codes combinationally, and the decimators emit one word per
// 32 samples with their own valid strobes.
//
// Parameters MU, W_W and W_FRAC (LMS step size, tap width, tap fraction
// bits) default to the LMS filter's own defaults (mu = 0.02, 12-bit taps).
// The low 8 bits of x_o are always zero, because every code maps to a
// multiple of 256.
module sd_correction_top
  import sd_pkg::*;
#(
  parameter int unsigned MU     = MU_Q,      // LMS step size, MU / 2**MU_FRAC
  parameter int unsigned W_W    = TAP_W,     // LMS tap width
  parameter int unsigned W_FRAC = TAP_FRAC   // LMS tap fraction bits
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en_i,
  input  code_t  q_code_i,     // quantizer code of the fast (inaccurate) modulator
  input  code_t  q_ideal_i,    // code of the accurate reference modulator
  output elsel_t dac_sel_o,    // unit DAC element enables (t0..t7)
  output word_t  x_o,          // D: fast converter word fed to the filter
  output word_t  dout_o,       // corrected output Dout
  output word_t  err_o,        // e = Dideal - Dout
  output logic signed [W_W-1:0] taps_o [NUM_TAPS],
  output word_t  cic_dout_o,
  output logic   cic_valid_o,
  output word_t  fir_dout_o,
  output logic   fir_valid_o
);
  word_t d_ideal;

  dem2_selector u_dem (
    .clk, .rst_n, .en_i,
    .code_i(q_code_i),
    .sel_o (dac_sel_o)
  );

  assign x_o     = code_to_word(q_code_i);
  assign d_ideal = code_to_word(q_ideal_i);

  lms_adf #(.W_W(W_W), .W_FRAC(W_FRAC), .MU(MU)) u_lms (
    .clk, .rst_n, .en_i,
    .x_i   (x_o),
    .d_i   (d_ideal),
    .dout_o(dout_o),
    .err_o (err_o),
    .taps_o(taps_o)
  );

  cic_decim u_cic (
    .clk, .rst_n, .en_i,
    .din_i  (dout_o),
    .dout_o (cic_dout_o),
    .valid_o(cic_valid_o)
  );

  polyphase_fir_decim u_fir (
    .clk, .rst_n, .en_i,
    .din_i  (dout_o),
    .dout_o (fir_dout_o),
    .valid_o(fir_valid_o)
  );

endmodule
