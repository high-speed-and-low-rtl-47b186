// Shared types and constants of the 2-D DWT / IDWT processors.
//
// A filter coefficient is held as up to three signed power-of-two terms
// (sum of +/- 2^-sh), which is what lets every product be formed by three
// shifters, a carry-save adder and one adder. The four low-pass taps a(0..3)
// are a 4-tap Daubechies filter rounded to such terms; the high-pass taps
// follow the quadrature-mirror rule b(k) = (-1)^k a(3-k). The exact rounding
// is this design's choice: the original work states only that the
// coefficients are quantized to a shift-and-add form.
//
//   a0 =  2^-1 - 2^-5 - 2^-10  =  0.467773   (exact  0.482963)
//   a1 =  2^0  - 2^-3 - 2^-5   =  0.843750   (exact  0.836516)
//   a2 =  2^-2 - 2^-6 - 2^-8   =  0.230469   (exact  0.224144)
//   a3 = -2^-3 - 2^-8 + 2^-10  = -0.127930   (exact -0.129410)
//
// The rounding was chosen to keep the two perfect-reconstruction
// conditions, sum a(k)^2 = 1 and a0*a2 + a1*a3 = 0, within 4e-4 together,
// rather than to put each tap nearest its exact value.
//
// Samples are DW-bit two's complement words with FRAC fractional bits.
package dwt_pkg;

  localparam int unsigned DW   = 20;  // data word width
  localparam int unsigned FRAC = 6;   // fractional bits of a data word
  localparam int unsigned PW   = 8;   // input pixel width (unsigned)

  // One signed power-of-two term: value = (neg ? -1 : +1) * 2^-sh when en.
  typedef struct packed {
    logic       en;
    logic       neg;
    logic [3:0] sh;
  } sd_term_t;

  typedef sd_term_t [2:0] sd_coef_t;

  // Build a coefficient from three (sign, shift) pairs; sign is -1, 0 or +1.
  function automatic sd_coef_t mk_coef(input int s0, input int h0,
                                       input int s1, input int h1,
                                       input int s2, input int h2);
    sd_coef_t c;
    c[0] = '{en: (s0 != 0), neg: (s0 < 0), sh: h0[3:0]};
    c[1] = '{en: (s1 != 0), neg: (s1 < 0), sh: h1[3:0]};
    c[2] = '{en: (s2 != 0), neg: (s2 < 0), sh: h2[3:0]};
    return c;
  endfunction

  localparam sd_coef_t A0 = mk_coef( 1, 1, -1, 5, -1, 10);
  localparam sd_coef_t A1 = mk_coef( 1, 0, -1, 3, -1,  5);
  localparam sd_coef_t A2 = mk_coef( 1, 2, -1, 6, -1,  8);
  localparam sd_coef_t A3 = mk_coef(-1, 3, -1, 8,  1, 10);
  localparam sd_coef_t B0 = A3;
  localparam sd_coef_t B1 = mk_coef(-1, 2,  1, 6,  1,  8);  // -a2
  localparam sd_coef_t B2 = A1;
  localparam sd_coef_t B3 = mk_coef(-1, 1,  1, 5,  1, 10);  // -a0

endpackage
