// dwt_pkg: types and constants shared by the Booth multiplier and the (9,7)
// wavelet datapath.
//
// booth_sel_t carries the three select lines of one radix-4 Booth digit
// (NEG, 2X, 1X), as in the Booth encoder truth table. The wavelet filter
// constants are the CDF (9,7) analysis coefficients h0..h4 (lowpass, 9 taps)
// and g0..g3 (highpass, 7 taps), normalised so that sum(h) = sqrt(2), rounded
// to signed Q1.14. The synthesis (inverse) sets follow from them: the
// synthesis lowpass is (-1)^j g_j and the synthesis highpass is (-1)^j h_j.
// Coefficient values, their scaling and the fixed-point formats are choices of
// this design; the filter structure they feed is the folded (9,7) filter.
package dwt_pkg;

  typedef struct packed {
    logic neg;  // negate the selected multiple
    logic two;  // select 2X
    logic one;  // select 1X
  } booth_sel_t;

  // Multiplier operand width (16 x 16 signed, 8 Booth digits).
  localparam int unsigned MULT_W = 16;

  // Coefficient format: signed 16-bit, 14 fraction bits.
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 14;

  // One coefficient per tap distance j = 0..4 from the filter centre.
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t [4:0] coef5_t;   // index j = distance from the centre tap

  // Forward DWT. Even centres use the lowpass h, odd centres the highpass g
  // (g has no tap at distance 4).
  localparam coef5_t DWT_C_EVEN = '{16'sd620,  -16'sd391, -16'sd1812,  16'sd6183, 16'sd13971};
  localparam coef5_t DWT_C_ODD  = '{16'sd0,     16'sd1057, -16'sd667,  -16'sd6850, 16'sd12919};

  // Inverse DWT on the interleaved L/H stream. For an even output position
  // tap j multiplies a lowpass coefficient when j is even (weight g_j) and a
  // highpass one when j is odd (weight -h_j); for an odd position the roles
  // swap (weights h_j for even j, -g_j for odd j).
  localparam coef5_t IDWT_C_EVEN = '{16'sd0,    16'sd391,  -16'sd667,  -16'sd6183, 16'sd12919};
  localparam coef5_t IDWT_C_ODD  = '{16'sd620, -16'sd1057, -16'sd1812,  16'sd6850, 16'sd13971};

  // Fraction bits of the wavelet coefficients passed between DWT, fusion
  // and IDWT (signed 16-bit, Q11.4).
  localparam int unsigned BAND_W    = 16;
  localparam int unsigned BAND_FRAC = 4;

  // Pixel width of one colour plane.
  localparam int unsigned PIX_W = 8;

endpackage
