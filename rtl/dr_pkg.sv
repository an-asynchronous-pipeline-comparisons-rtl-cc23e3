// dr_pkg: shared types and constants of the dual-rail (1-of-2) QDI matrix-vector
// multiplier.
//
// A dual-rail bit is a pair of wires {t, f}: {1,0} carries a 1, {0,1} carries a 0
// and {0,0} is the neutral (reset) state that separates two tokens in the
// four-phase handshake. {1,1} is illegal. The helper functions below encode,
// decode and test such bits. The package also holds the default word sizes and
// the hard-wired coefficients of the DCT matrix as signed-digit sums
//   a = 2^-2 + 2^-4 + 2^-5 + 2^-7 + 2^-9   ~ 0.3535 (1/(2*sqrt 2))
//   c = 2^-1 - 2^-5 - 2^-7 + 2^-10         ~ 0.4619 (cos(pi/8)/sqrt 2)
//   f = 2^-3 + 2^-4 + 2^-8 - 2^-14         ~ 0.1913 (cos(3pi/8)/sqrt 2)
// written as the bit positions of their terms after scaling by 2^14 plus a
// mask of the subtracted terms, so that a*2^14 = 5792, c*2^14 = 7568 and
// f*2^14 = 3135. The terms and the 22-bit adder width are the published
// design's; the signs are the ones that make each sum match its DCT cosine
// (to within 4e-5); the 8-bit input width is this implementation's choice.
package dr_pkg;

  typedef struct packed {
    logic t;  // true rail
    logic f;  // false rail
  } dr_t;


  // Default sizes.
  localparam int unsigned X_W_DEF  = 8;   // input word x_j, two's complement
  localparam int unsigned W_DEF    = 22;  // adder / accumulator width
  localparam int unsigned FRAC     = 14;  // fraction bits of the coefficients

  // Coefficient term positions (LSB = 2^-14). Unused slots hold -1. Bit k of
  // the NEG mask marks term k as subtracted.
  typedef int coef_terms_t [5];
  localparam coef_terms_t COEF_A = '{12, 10, 9, 7, 5};
  localparam coef_terms_t COEF_C = '{13, 9, 7, 4, -1};
  localparam coef_terms_t COEF_F = '{11, 10, 6, 0, -1};
  localparam logic [4:0]  NEG_A  = 5'b00000;
  localparam logic [4:0]  NEG_C  = 5'b00110;
  localparam logic [4:0]  NEG_F  = 5'b01000;

  function automatic dr_t dr_enc(input logic b);
    return '{t: b, f: ~b};
  endfunction

  function automatic logic dr_valid(input dr_t d);
    return d.t | d.f;
  endfunction

  function automatic logic dr_bit(input dr_t d);
    return d.t;
  endfunction

  // Integer value of a coefficient, scaled by 2^FRAC.
  function automatic int coef_value(input coef_terms_t c, input logic [4:0] neg);
    int v = 0;
    for (int k = 0; k < 5; k++)
      if (c[k] >= 0) v += neg[k] ? -(1 << c[k]) : (1 << c[k]);
    return v;
  endfunction

  function automatic int coef_nneg(input coef_terms_t c, input logic [4:0] neg);
    int n = 0;
    for (int k = 0; k < 5; k++) if (c[k] >= 0 && neg[k]) n++;
    return n;
  endfunction

  function automatic int coef_nterms(input coef_terms_t c);
    int n = 0;
    for (int k = 0; k < 5; k++) if (c[k] >= 0) n++;
    return n;
  endfunction

endpackage
