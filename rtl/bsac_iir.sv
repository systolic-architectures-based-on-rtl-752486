// bsac_iir -- BSAC systolic IIR filter (the variation of the original paper's Fig. 5).
//
// Computes  y(n) = sum_{k=0..NA-1} a(k) x(n-k) + sum_{k=1..NB} b(k) y(n-k)
// with one output per clock.  Every coefficient a(k), b(k) is cut to NROWS
// CSD digits and the array has NROWS identical rows; row r holds digit r of
// every coefficient:
//
//   x(n) --+------+------+             y (fed back) --+-------+
//          v      v      v                            v       v
//   0 -> [a(2)]->[a(1)]->[a(0)] --------------------> [b(2)]->[b(1)] --+
//                                                                      |
//   (one such row per digit)                    sum of all rows' b(1) -+-> y(n)
//
// The a cells form a broadcast-input FIR like the parallel FIR.  The
// partial sum then passes the feedback cells b(NB) .. b(2), which are
// ordinary registered cells fed with the registered output, so each adds
// b(k) y(n-k) at the clock when the output register holds y(n-k).  Cell b(1)
// must use y(n-1) in the very clock that y(n) is formed, so it has no
// registers (bsac_cell with REGISTERED = 0); the NROWS b(1) results are added
// and registered as y(n) (the summing b(1,1) cell of Fig. 5).  The loop thus
// holds one shifter and one add/subtract per row plus the row sum.
//
// Feedback format (this design's choice): the YW-bit sum is turned back into
// an XW-bit sample, y_sample = saturate(floor(y_out / 2^CF)), and that sample
// is both the filter's sample output and the value fed back, as in a filter
// with XW-bit input and output.  y_out is the full-precision sum.
//
// Coefficients: ld_en writes ld_digits[0..NROWS-1] into coefficient ld_coef:
// indexes 0..NA-1 are a(0)..a(NA-1), NA..NA+NB-1 are b(1)..b(NB).
// Timing: x(n) presented with en = 1 gives y(n) LATENCY = NB + 1 enabled
// clocks later; en = 0 freezes the filter, y_valid rises LATENCY samples
// after rst.  Reset, enable, valid and load port are this design's choices.
module bsac_iir
  import bsac_pkg::*;
#(
  parameter int NA    = 3,
  parameter int NB    = 2,
  parameter int NROWS = 2,
  parameter int YW_P  = YW
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          en,
  input  logic signed [XW-1:0]          x_in,
  input  logic                          ld_en,
  input  logic [$clog2(NA+NB+1)-1:0]    ld_coef,
  input  csd_digit_t                    ld_digits [MAXD],
  output logic signed [YW_P-1:0]        y_out,
  output logic signed [XW-1:0]          y_sample,
  output logic                          y_valid
);

  localparam int LATENCY = NB + 1;
  localparam int NC      = NA + NB;          // cells per row
  localparam logic signed [YW_P-1:0] SMAX = YW_P'((1 <<< (XW - 1)) - 1);
  localparam logic signed [YW_P-1:0] SMIN = -YW_P'(1 <<< (XW - 1));

  if (NROWS < 1 || NROWS > MAXD || NA < 1 || NB < 1) begin : g_bad
    $error("bsac_iir: need 1 <= NROWS <= %0d, NA >= 1, NB >= 1", MAXD);
  end

  logic signed [YW_P-1:0] y_q;              // y(n) register
  logic signed [YW_P-1:0] y_floor;
  logic signed [XW-1:0]   y_fb;             // fed-back sample
  logic signed [YW_P-1:0] row_b1 [NROWS];   // b(1) results of the rows
  logic signed [YW_P-1:0] y_sum;

  always_comb begin
    y_floor = y_q >>> CF;
    if (y_floor > SMAX)      y_fb = SMAX[XW-1:0];
    else if (y_floor < SMIN) y_fb = SMIN[XW-1:0];
    else                     y_fb = y_floor[XW-1:0];
  end

  for (genvar r = 0; r < NROWS; r++) begin : g_row
    logic signed [YW_P-1:0] ys [NC];
    for (genvar c = 0; c < NC; c++) begin : g_cell
      // cells 0..NA-1: a(NA-1)..a(0); cells NA..NC-1: b(NB)..b(1)
      localparam int  IDX  = (c < NA) ? (NA - 1 - c) : (NA + (NC - 1 - c));
      localparam bit  FEED = (c >= NA);
      localparam bit  REG  = (c != NC - 1);
      logic signed [YW_P-1:0] y_src;
      logic signed [XW-1:0]   x_src;
      logic signed [XW-1:0]   unused_x;
      csd_digit_t             unused_digit;
      if (c == 0) begin : g_y0
        assign y_src = '0;
      end else begin : g_yc
        assign y_src = ys[c-1];
      end
      if (FEED) begin : g_xfb
        assign x_src = y_fb;
      end else begin : g_xin
        assign x_src = x_in;
      end
      bsac_cell #(.REGISTERED(REG), .YW_P(YW_P)) u_cell (
        .clk     (clk),
        .rst     (rst),
        .en      (en),
        .ld      (ld_en && int'(ld_coef) == IDX),
        .ld_digit(ld_digits[r]),
        .x_in    (x_src),
        .y_in    (y_src),
        .x_out   (unused_x),
        .y_out   (ys[c]),
        .digit   (unused_digit)
      );
    end
    assign row_b1[r] = ys[NC-1];
  end

  always_comb begin
    y_sum = '0;
    for (int r = 0; r < NROWS; r++) y_sum += row_b1[r];
  end

  always_ff @(posedge clk) begin
    if (rst)     y_q <= '0;
    else if (en) y_q <= y_sum;
  end

  assign y_out    = y_q;
  assign y_sample = y_fb;

  logic [$clog2(LATENCY+1)-1:0] fill;
  always_ff @(posedge clk) begin
    if (rst)                              fill <= '0;
    else if (en && int'(fill) < LATENCY)  fill <= fill + 1'b1;
  end
  assign y_valid = (int'(fill) == LATENCY);

endmodule
