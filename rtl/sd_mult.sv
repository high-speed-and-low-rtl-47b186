// Multiplierless constant multiplier: y = COEF * x.
//
// COEF is a sum of at most three signed power-of-two terms (dwt_pkg). Each
// term is an arithmetic right shift of x, negated where the term is negative;
// the three terms are reduced to a sum and a carry word by a 3:2 carry-save
// adder, and one carry-propagate adder gives the product. Shifting truncates
// toward minus infinity. Purely combinational; the result wraps modulo 2^W,
// so W must leave head room for the coefficient's gain (below 1 for every
// tap used here). The CSA-plus-adder structure follows the original
// processing element; the term encoding is this design's own.
module sd_mult
  import dwt_pkg::*;
#(
  parameter int unsigned W    = DW,
  parameter sd_coef_t    COEF = A0
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] t [3];
  logic        [W-1:0] s, c;

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      if (!COEF[i].en)       t[i] = '0;
      else if (COEF[i].neg)  t[i] = -(x >>> COEF[i].sh);
      else                   t[i] =  (x >>> COEF[i].sh);
    end
    // 3:2 carry-save reduction
    s = t[0] ^ t[1] ^ t[2];
    c = ((t[0] & t[1]) | (t[0] & t[2]) | (t[1] & t[2])) << 1;
    // carry-propagate adder
    y = signed'(s + c);
  end

endmodule
