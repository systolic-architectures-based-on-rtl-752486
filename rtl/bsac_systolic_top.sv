// bsac_systolic_top -- the BSAC systolic arrays side by side on one sample
// stream, with a coefficient loader that does the CSD recoding.
//
// The four arrays are the structures built from barrel-shifter/accumulator
// cells in place of multiply-accumulate cells:
//   cascaded FIR (Type I)  bsac_fir_cascaded, 3 taps with 2, 4, 3 cells
//   parallel FIR (Type II) bsac_fir_parallel, 3 taps, 4 cells per tap
//   IIR                    bsac_iir, 3 + 2 coefficients, 2 cells each
//   DFT                    bsac_dft, 4 points, up to 3 cells per twiddle part
// All take the same sample x_in when en = 1 and produce one result per
// enabled clock; en = 0 freezes every array.
//
// Coefficient loading: the host writes one binary coefficient per clock,
// ld_coef in Q2.13 (value = ld_coef / 2^13), with ld_valid = 1, the target
// array in ld_target and the coefficient number in ld_index (numbering as
// documented in each array).  csd_recoder turns the value into CSD digits,
// most significant first, and the array keeps as many as it has cells for,
// dropping the least significant ones; ld_ndigits tells how many nonzero
// digits the full CSD form has.  ld_err reports a value whose CSD
// form needs an exponent above +1, or an index beyond the target's
// coefficients (nothing is written then).  Loading may happen while the
// arrays run; it takes effect on the next clock.  The arrays' set and sizes
// follow the original paper's examples; the shared stream, enable and loader are
// this design's choices.
module bsac_systolic_top
  import bsac_pkg::*;
#(
  parameter int          CASC_TAPS          = 3,
  parameter int unsigned CASC_DIGITS [CASC_TAPS] = '{2, 4, 3},
  parameter int          PAR_TAPS           = 3,
  parameter int          PAR_NBS            = 4,
  parameter int          IIR_NA             = 3,
  parameter int          IIR_NB             = 2,
  parameter int          IIR_NROWS          = 2,
  parameter int          DFT_N              = 4,
  parameter int          DFT_NBS            = 3,
  parameter int          IDXW               = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic signed [XW-1:0]     x_in,
  // coefficient loader
  input  logic                     ld_valid,
  input  ld_target_e               ld_target,
  input  logic [IDXW-1:0]          ld_index,
  input  logic signed [CW-1:0]     ld_coef,
  output logic                     ld_err,
  output logic [4:0]               ld_ndigits,
  // cascaded FIR
  output logic signed [YW-1:0]     casc_y,
  output logic                     casc_valid,
  // parallel FIR
  output logic signed [YW-1:0]     par_y,
  output logic signed [YW-1:0]     par_y_trunc,
  output logic                     par_valid,
  // IIR
  output logic signed [YW-1:0]     iir_y,
  output logic signed [XW-1:0]     iir_y_sample,
  output logic                     iir_valid,
  // DFT
  output logic signed [YW-1:0]     dft_re [DFT_N],
  output logic signed [YW-1:0]     dft_im [DFT_N],
  output logic                     dft_valid
);

  csd_digit_t digits [MAXD];
  logic       rec_err;
  logic       idx_ok;
  logic       ld_go;

  csd_recoder #(.NDIG(MAXD)) u_rec (
    .coef   (ld_coef),
    .digits (digits),
    .ndigits(ld_ndigits),
    .err    (rec_err)
  );

  always_comb begin
    unique case (ld_target)
      TGT_FIR_CASC: idx_ok = int'(ld_index) < CASC_TAPS;
      TGT_FIR_PAR:  idx_ok = int'(ld_index) < PAR_TAPS;
      TGT_IIR:      idx_ok = int'(ld_index) < IIR_NA + IIR_NB;
      default:      idx_ok = int'(ld_index) < 2 * DFT_N * DFT_N;
    endcase
    ld_go  = ld_valid && idx_ok;
    ld_err = ld_valid && (rec_err || !idx_ok);
  end

  bsac_fir_cascaded #(.TAPS(CASC_TAPS), .DIGITS(CASC_DIGITS)) u_casc (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .x_in     (x_in),
    .ld_en    (ld_go && ld_target == TGT_FIR_CASC),
    .ld_coef  (($clog2(CASC_TAPS+1))'(ld_index)),
    .ld_digits(digits),
    .y_out    (casc_y),
    .y_valid  (casc_valid)
  );

  bsac_fir_parallel #(.TAPS(PAR_TAPS), .NBS(PAR_NBS)) u_par (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .x_in     (x_in),
    .ld_en    (ld_go && ld_target == TGT_FIR_PAR),
    .ld_coef  (($clog2(PAR_TAPS+1))'(ld_index)),
    .ld_digits(digits),
    .y_out    (par_y),
    .y_trunc  (par_y_trunc),
    .y_valid  (par_valid)
  );

  bsac_iir #(.NA(IIR_NA), .NB(IIR_NB), .NROWS(IIR_NROWS)) u_iir (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .x_in     (x_in),
    .ld_en    (ld_go && ld_target == TGT_IIR),
    .ld_coef  (($clog2(IIR_NA+IIR_NB+1))'(ld_index)),
    .ld_digits(digits),
    .y_out    (iir_y),
    .y_sample (iir_y_sample),
    .y_valid  (iir_valid)
  );

  bsac_dft #(.N(DFT_N), .NBS(DFT_NBS)) u_dft (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .x_in     (x_in),
    .ld_en    (ld_go && ld_target == TGT_DFT),
    .ld_index (($clog2(2*DFT_N*DFT_N+1))'(ld_index)),
    .ld_digits(digits),
    .x_re     (dft_re),
    .x_im     (dft_im),
    .valid    (dft_valid)
  );

endmodule
