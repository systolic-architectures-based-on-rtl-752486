// bsac_cell -- the barrel-shifter/accumulator basic cell.
//
// Computes  x_out = x_in,  y_out = y_in + k * 2^a * x_in,  the cell of the original
// paper's Eq. (2), with k in {-1, 0, +1} and A_MIN <= a <= A_MAX.  The digit
// (k, a) sits in a coefficient register written through ld / ld_digit (the original
// paper says the digits are computed beforehand and preloaded).  Inside,
// the barrel shifter forms x * 2^a and one adder adds, subtracts or skips it.
//
// Timing: with REGISTERED = 1 (the systolic cell) x_out and y_out are
// registers that load on every clock with en = 1 and hold otherwise, so data
// advances one cell per enabled clock.  REGISTERED = 0 gives the same
// arithmetic with no registers; the IIR array uses it for the cell whose
// result is needed within the cycle; clk, rst and en then only serve the
// digit register, and en is unused.  rst (synchronous, active high) clears
// the data registers and the digit; a ld in the same cycle as rst is lost.
// The enable, the reset and the load port are this design's choices.
module bsac_cell
  import bsac_pkg::*;
#(
  parameter bit REGISTERED = 1'b1,
  parameter int YW_P       = YW
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic                   ld,
  input  csd_digit_t             ld_digit,
  input  logic signed [XW-1:0]   x_in,
  input  logic signed [YW_P-1:0] y_in,
  output logic signed [XW-1:0]   x_out,
  output logic signed [YW_P-1:0] y_out,
  output csd_digit_t             digit
);

  logic        [SHW-1:0]  sh;
  logic signed [YW_P-1:0] shifted;
  logic signed [YW_P-1:0] y_next;

  always_ff @(posedge clk) begin
    if (rst)     digit <= DIGIT_ZERO;
    else if (ld) digit <= ld_digit;
  end

  always_comb sh = SHW'(int'(digit.a) - A_MIN);

  barrel_shifter #(.XW(XW), .YW(YW_P), .SHW(SHW), .SH_MAX(A_MAX - A_MIN)) u_bs (
    .x (x_in),
    .sh(sh),
    .y (shifted)
  );

  always_comb begin
    unique case (digit.k)
      DIG_POS: y_next = y_in + shifted;
      DIG_NEG: y_next = y_in - shifted;
      default: y_next = y_in;
    endcase
  end

  if (REGISTERED) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst) begin
        x_out <= '0;
        y_out <= '0;
      end else if (en) begin
        x_out <= x_in;
        y_out <= y_next;
      end
    end
  end else begin : g_comb
    always_comb begin
      x_out = x_in;
      y_out = y_next;
    end
  end

  // A loaded digit must be a CSD digit with an exponent in range.
  always_ff @(posedge clk)
    if (!rst && ld)
      assert (ld_digit.k inside {DIG_ZERO, DIG_POS, DIG_NEG} &&
              int'(ld_digit.a) >= A_MIN && int'(ld_digit.a) <= A_MAX)
        else $error("bsac_cell: bad digit k=%b a=%0d", ld_digit.k, ld_digit.a);

endmodule
