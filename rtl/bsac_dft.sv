// bsac_dft -- N-point DFT built from N BSAC bin arrays.
//
// Bin K (bsac_dft_bin) produces X(K) for the latest N real samples, so N bins
// side by side give the whole transform X(0)..X(N-1) of that window, a new
// window every clock.  All bins take the same sample stream and fill in
// step.  The original paper draws the array of one bin (Fig. 6, N = 4); placing one
// bin per K is this design's choice.
//
// Coefficients: ld_en writes ld_digits into twiddle factor
// W^(m K) of bin K, part p (0 real, 1 imaginary), with
// ld_index = (K * N + m) * 2 + p.
// Timing: that of bsac_dft_bin; x_re[K], x_im[K] are X(K) of the window
// whose last sample entered LATENCY = N*NBS - N + 1 enabled clocks before.
module bsac_dft
  import bsac_pkg::*;
#(
  parameter int N    = 4,
  parameter int NBS  = 3,
  parameter int YW_P = YW
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         en,
  input  logic signed [XW-1:0]         x_in,
  input  logic                         ld_en,
  input  logic [$clog2(2*N*N+1)-1:0]   ld_index,
  input  csd_digit_t                   ld_digits [MAXD],
  output logic signed [YW_P-1:0]       x_re [N],
  output logic signed [YW_P-1:0]       x_im [N],
  output logic                         valid
);

  localparam int IW = $clog2(N + 1);

  logic [N-1:0] bin_valid;
  logic [IW-1:0] ld_stage;
  logic          ld_im;
  int            ld_bin;

  always_comb begin
    ld_im    = ld_index[0];
    ld_stage = IW'((int'(ld_index) >> 1) % N);
    ld_bin   = (int'(ld_index) >> 1) / N;
  end

  for (genvar k = 0; k < N; k++) begin : g_bin
    bsac_dft_bin #(.N(N), .NBS(NBS), .YW_P(YW_P)) u_bin (
      .clk      (clk),
      .rst      (rst),
      .en       (en),
      .x_in     (x_in),
      .ld_en    (ld_en && ld_bin == k),
      .ld_stage (ld_stage),
      .ld_im    (ld_im),
      .ld_digits(ld_digits),
      .x_re     (x_re[k]),
      .x_im     (x_im[k]),
      .valid    (bin_valid[k])
    );
  end

  assign valid = bin_valid[0];

  always_ff @(posedge clk)
    if (!rst) assert (bin_valid == '0 || bin_valid == '1) else $error("bsac_dft: bins out of step");

endmodule
