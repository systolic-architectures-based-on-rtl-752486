// csd_recoder -- canonical signed digit (CSD) recoding of one coefficient.
//
// Turns the CW-bit two's complement coefficient coef (Q2.13, see bsac_pkg)
// into the BSAC digits (k, a) of its CSD form: the signed-digit code with no
// two adjacent nonzero digits, which has the fewest nonzero digits and so
// needs the fewest BSAC cells.  The digits come out most significant first in
// digits[0..NDIG-1]; when the coefficient has more than NDIG nonzero digits
// the least significant ones are dropped, which is how a short array
// truncates a coefficient.  Unused entries are zero digits.
//
// How: with m = |coef|, h = m >> 1, t = m + h and c = h ^ t, the bits of t & c
// are the +1 digits and those of h & c the -1 digits of the CSD form of m
// (a carry-free identity); a negative coefficient swaps the two sets.  A scan
// from the top bit then picks the first NDIG nonzero positions.
//
// Outputs: ndigits is the number of nonzero digits of the full code; err is
// set when a digit falls above the exponent A_MAX (the magnitude is too
// large for the cell), in which case that digit is left out.
// Purely combinational.  The recoding rule is the original paper's; the formats and
// the truncation from the least significant end are its stated approach.
module csd_recoder
  import bsac_pkg::*;
#(
  parameter int NDIG = MAXD
) (
  input  logic signed [CW-1:0] coef,
  output csd_digit_t           digits [NDIG],
  output logic [4:0]           ndigits,
  output logic                 err
);

  localparam int W    = CW + 3;
  localparam int PTOP = CF + A_MAX;   // highest usable bit position

  logic [W-1:0] m, h, t, c, pmask, nmask;

  always_comb begin
    m = coef[CW-1] ? W'(-(W'(signed'(coef)))) : W'(coef);
    h = m >> 1;
    t = m + h;
    c = h ^ t;
    pmask = coef[CW-1] ? (h & c) : (t & c);
    nmask = coef[CW-1] ? (t & c) : (h & c);
  end

  always_comb begin
    int n;
    n = 0;
    err = 1'b0;
    ndigits = '0;
    for (int d = 0; d < NDIG; d++) digits[d] = DIGIT_ZERO;
    for (int p = W - 1; p >= 0; p--) begin
      if (pmask[p] || nmask[p]) begin
        ndigits = ndigits + 5'd1;
        if (p > PTOP) begin
          err = 1'b1;
        end else if (n < NDIG) begin
          digits[n].k = pmask[p] ? DIG_POS : DIG_NEG;
          digits[n].a = AW'(p - CF);
          n = n + 1;
        end
      end
    end
  end

endmodule
