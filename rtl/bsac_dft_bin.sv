// bsac_dft_bin -- one output X(K) of an N-point DFT as a BSAC systolic array.
//
// Computes  X(K) = sum_{m=0..N-1} x(t+m) * W^(mK),  W = exp(-j 2 pi / N),
// over the latest N real samples, one new window per clock.  As in the original
// paper's Fig. 6 the twiddle factors W^0, W^K, W^2K, ... W^(N-1)K sit in a
// chain of N stages that the sample stream passes while the partial sum
// moves from stage to stage; the chain is the FIR sum with coefficients
// A(j) = W^((N-1-j)K).  Each twiddle factor is complex and the sample real,
// so the bin is two such chains: one holds the CSD digits of cos(2 pi m K/N)
// and gives Re X(K), the other those of -sin(2 pi m K/N) and gives Im X(K).
//
// Each chain is the cascaded array (bsac_fir_cascaded) with NBS cells per
// twiddle factor.  A factor that needs fewer digits is loaded with zero
// digits in its spare cells, so the loaded digit counts may differ between
// factors (the nonuniform, "cascaded" assignment of the original paper) while the
// structure stays uniform; NBS is the largest count allowed.  The real-only
// input and the two-chain split are this design's choices.
//
// Coefficients: ld_en writes ld_digits into twiddle factor W^(m K),
// m = ld_stage, real part when ld_im = 0 and imaginary part when ld_im = 1.
// Timing: the window x(t)..x(t+N-1) gives X(K) on x_re / x_im LATENCY =
// N*NBS - N + 1 enabled clocks after x(t+N-1) entered; valid as in
// bsac_fir_cascaded.  For a block DFT read the outputs once every N samples.
module bsac_dft_bin
  import bsac_pkg::*;
#(
  parameter int N    = 4,
  parameter int NBS  = 3,
  parameter int YW_P = YW
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [XW-1:0]    x_in,
  input  logic                    ld_en,
  input  logic [$clog2(N+1)-1:0]  ld_stage,
  input  logic                    ld_im,
  input  csd_digit_t              ld_digits [MAXD],
  output logic signed [YW_P-1:0]  x_re,
  output logic signed [YW_P-1:0]  x_im,
  output logic                    valid
);

  localparam int unsigned DIG [N] = '{default: NBS};
  localparam int LATENCY = N * NBS - N + 1;

  // stage m of the transform is coefficient j = N-1-m of the chain
  logic [$clog2(N+1)-1:0] ld_coef;
  logic                   valid_im;
  assign ld_coef = ($clog2(N+1))'(N - 1) - ld_stage;

  bsac_fir_cascaded #(.TAPS(N), .DIGITS(DIG), .YW_P(YW_P)) u_re (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .x_in     (x_in),
    .ld_en    (ld_en && !ld_im),
    .ld_coef  (ld_coef),
    .ld_digits(ld_digits),
    .y_out    (x_re),
    .y_valid  (valid)
  );

  bsac_fir_cascaded #(.TAPS(N), .DIGITS(DIG), .YW_P(YW_P)) u_im (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .x_in     (x_in),
    .ld_en    (ld_en && ld_im),
    .ld_coef  (ld_coef),
    .ld_digits(ld_digits),
    .y_out    (x_im),
    .y_valid  (valid_im)
  );

  // both chains fill in step
  always_ff @(posedge clk)
    if (!rst) assert (valid_im == valid) else $error("bsac_dft_bin: chains out of step");

endmodule
