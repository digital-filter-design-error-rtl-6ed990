// sd_pkg: constants and types shared by the sigma-delta error-correction blocks.
//
// The converter runs at fs = 4 MHz with an oversampling ratio of 32; the
// modulator has a 3-bit quantizer feeding a unit-element DAC of 8 elements;
// the adaptive filter works on 12-bit words. These numbers follow the design
// description. The 64 decimation-filter coefficients below are this design's
// own: the original coefficients came from a filter-design tool and were not
// published. They are a Hamming-windowed sinc low-pass,
//   h[n] = w[n] * sin(2*pi*fc/fs*m) / (pi*m),  m = n - 31.5,
//   w[n] = 0.54 - 0.46*cos(2*pi*n/63),  fc = 43.75 kHz (midway between the
//   25 kHz pass edge and the 62.5 kHz stop edge), fs = 4 MHz,
// scaled so that the coefficients sum to 32768 (DC gain 1.0 in Q1.15) and
// rounded to integers. With 64 taps the response is -0.9 dB at 25 kHz but
// only about -6 dB at 62.5 kHz; it falls below -48 dB from 200 kHz on.
package sd_pkg;

  // Modulator / DAC geometry
  localparam int unsigned Q_BITS  = 3;             // quantizer bits
  localparam int unsigned NUM_EL  = 1 << Q_BITS;   // unit DAC elements (t0..t7)

  // Adaptive filter word sizes
  localparam int unsigned DATA_W   = 12;  // x, d, y words (Q1.11)
  localparam int unsigned TAP_W    = 12;  // tap registers
  localparam int unsigned TAP_FRAC = 10;  // tap fraction bits (Q2.10)
  localparam int unsigned MU_FRAC  = 16;  // step-size fraction bits
  localparam int unsigned MU_Q     = 1311; // round(0.02 * 2**16)
  localparam int unsigned NUM_TAPS = 20;
  localparam int unsigned BLK_TAPS = 5;

  // Decimation
  localparam int unsigned DECIM      = 32;   // rate change (OSR)
  localparam int unsigned FIR_TAPS   = 64;
  localparam int unsigned COEF_W     = 16;
  localparam int unsigned CIC_STAGES = 4;
  localparam int unsigned CIC_DELAY  = 1;

  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic [Q_BITS-1:0]        code_t;
  typedef logic [NUM_EL-1:0]        elsel_t;

  localparam coef_t FIR_COEF [FIR_TAPS] = '{
    16'sd33, 16'sd37, 16'sd43, 16'sd52, 16'sd63, 16'sd79, 16'sd98, 16'sd120,
    16'sd147, 16'sd178, 16'sd213, 16'sd251, 16'sd294, 16'sd339, 16'sd388, 16'sd439,
    16'sd492, 16'sd547, 16'sd602, 16'sd657, 16'sd712, 16'sd766, 16'sd817, 16'sd866,
    16'sd911, 16'sd953, 16'sd989, 16'sd1021, 16'sd1046, 16'sd1066, 16'sd1079, 16'sd1086,
    16'sd1086, 16'sd1079, 16'sd1066, 16'sd1046, 16'sd1021, 16'sd989, 16'sd953, 16'sd911,
    16'sd866, 16'sd817, 16'sd766, 16'sd712, 16'sd657, 16'sd602, 16'sd547, 16'sd492,
    16'sd439, 16'sd388, 16'sd339, 16'sd294, 16'sd251, 16'sd213, 16'sd178, 16'sd147,
    16'sd120, 16'sd98, 16'sd79, 16'sd63, 16'sd52, 16'sd43, 16'sd37, 16'sd33
  };

  // Quantizer code to a signed Q1.11 word: the 2**Q_BITS levels sit
  // symmetrically around zero, word = (2*code - (NUM_EL-1)) * 2**(DATA_W-1-Q_BITS),
  // so the 3-bit codes 0..7 map to -7/8 .. +7/8 of full scale in steps of 1/4.
  function automatic word_t code_to_word(input code_t c);
    logic signed [DATA_W:0] v;
    v = (DATA_W+1)'(2 * int'(c) - int'(NUM_EL - 1));
    return word_t'(v <<< (DATA_W - 1 - Q_BITS));
  endfunction

endpackage
