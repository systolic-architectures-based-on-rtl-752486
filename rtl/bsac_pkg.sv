// bsac_pkg -- shared types and constants of the barrel-shifter/accumulator
// (BSAC) systolic arrays.
//
// A BSAC cell replaces the multiplier of a multiply-accumulate cell by a
// barrel shifter: one cell adds k * 2^a * x to the running sum, with the
// signed digit k in {-1, 0, +1} and the exponent a in [A_MIN, A_MAX].  A
// coefficient A is the sum of the digits of its canonical signed digit (CSD)
// form, so one multiplication takes as many cells as A has nonzero digits.
//
// Number formats (the 16-bit sample, the -13..+1 exponent range and the
// 32-bit result follow the original paper; the fixed-point scaling is this
// design's choice):
//   x : XW-bit two's complement sample.
//   y : YW-bit two's complement sum, in units of 2^A_MIN sample LSBs, so
//       k * 2^a * x is exact: it is x shifted left by a - A_MIN bits.
//   coefficient value : CW-bit two's complement with CF = -A_MIN fraction
//       bits (Q2.13); bit p of it has weight 2^(p - CF).
// The sum wraps modulo 2^YW; a final result that fits in YW bits is exact.
package bsac_pkg;

  localparam int XW     = 16;          // sample width
  localparam int YW     = 32;          // partial-sum width
  localparam int A_MIN  = -13;         // smallest shift exponent
  localparam int A_MAX  = 1;           // largest shift exponent
  localparam int AW     = 5;           // width of the signed exponent field
  localparam int SHW    = 4;           // width of the shift amount a - A_MIN
  localparam int CW     = 16;          // coefficient width
  localparam int CF     = -A_MIN;      // coefficient fraction bits
  localparam int MAXD   = 8;           // most nonzero CSD digits a CW-bit coefficient can need

  // Signed digit of a CSD code.
  typedef enum logic [1:0] {
    DIG_ZERO = 2'b00,
    DIG_POS  = 2'b01,
    DIG_NEG  = 2'b11
  } csd_sign_e;

  // One BSAC coefficient: the digit k and the exponent a.
  typedef struct packed {
    csd_sign_e          k;
    logic signed [AW-1:0] a;
  } csd_digit_t;

  localparam csd_digit_t DIGIT_ZERO = '{k: DIG_ZERO, a: '0};

  // Arrays that can be addressed by the coefficient loader.
  typedef enum logic [1:0] {
    TGT_FIR_CASC = 2'd0,
    TGT_FIR_PAR  = 2'd1,
    TGT_IIR      = 2'd2,
    TGT_DFT      = 2'd3
  } ld_target_e;

endpackage
