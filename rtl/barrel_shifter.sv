// barrel_shifter -- one-cycle ("flash") shifter of the BSAC cell.
//
// Places the XW-bit signed sample x into a YW-bit word, sign extended, and
// shifts it left by sh bits, 0 <= sh <= SH_MAX.  With sh = a - A_MIN this is
// x * 2^a in the partial-sum format of bsac_pkg, so the 16-bit-in, 32-bit-out
// shifter of the original paper covers exponents -13..+1 with no bits lost.
// It is built as a logarithmic shifter: stage i shifts by 2^i when bit i of
// sh is set, so the delay is $clog2 stages of 2:1 multiplexers whatever the
// shift.  Purely combinational.  Shifts above SH_MAX never occur: the cell
// accepts only exponents A_MIN..A_MAX.  An elaboration check makes sure
// that x * 2^SH_MAX fits in YW bits.
module barrel_shifter #(
  parameter int XW     = 16,
  parameter int YW     = 32,
  parameter int SHW    = 4,
  parameter int SH_MAX = 14
) (
  input  logic signed [XW-1:0]  x,
  input  logic        [SHW-1:0] sh,
  output logic signed [YW-1:0]  y
);

  if (XW + SH_MAX > YW) begin : g_bad
    $error("barrel_shifter: x * 2^%0d does not fit in %0d bits", SH_MAX, YW);
  end

  logic signed [YW-1:0] stage [SHW+1];

  always_comb begin
    stage[0] = YW'(x);                       // sign extension
    for (int i = 0; i < SHW; i++)
      stage[i+1] = sh[i] ? (stage[i] <<< (1 << i)) : stage[i];
    y = stage[SHW];
  end


endmodule
