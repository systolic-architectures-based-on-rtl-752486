// bsac_fir_parallel -- Type II ("parallel") BSAC systolic FIR filter.
//
// Computes y(n) = sum_j A(j) * x(n-j), j = 0..TAPS-1, one output per clock.
// Every coefficient gets the same number NBS of BSAC cells, arranged as NBS
// identical rows (original paper, Fig. 3): row r holds CSD digit r of every
// coefficient, cells ordered A(TAPS-1) .. A(0).  The sample is broadcast to
// all cells of all rows at once and each row's partial sum moves one cell per
// clock, so the row output is the filter with only digit r of each
// coefficient.  A pipelined binary adder tree, one register level per tree
// level, adds the NBS row outputs.
//
// y_trunc is the sum of the first half of the rows only (the dashed Y0 output
// of Fig. 3): the same filter with each coefficient cut to its NBS/2 most
// significant digits, delayed so that it lines up with y_out.  With NBS = 1
// both outputs carry the single row.  Unused cells hold zero digits, which
// is the redundancy the original paper mentions for coefficients with fewer digits.
//
// Coefficients: ld_en writes digits ld_digits[0..NBS-1] of coefficient
// j = ld_coef into column j of the rows; further digits are dropped.
// Timing: x(n) with en = 1 gives y(n) LATENCY = 1 + clog2(NBS) enabled clocks
// later (3 for NBS = 4).  en = 0 freezes the array; y_valid rises after
// TAPS + clog2(NBS) samples since rst.  Adder-tree pipelining, reset, enable,
// valid and load port are this design's choices.
module bsac_fir_parallel
  import bsac_pkg::*;
#(
  parameter int TAPS = 3,
  parameter int NBS  = 4,
  parameter int YW_P = YW
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  logic signed [XW-1:0]      x_in,
  input  logic                      ld_en,
  input  logic [$clog2(TAPS+1)-1:0] ld_coef,
  input  csd_digit_t                ld_digits [MAXD],
  output logic signed [YW_P-1:0]    y_out,
  output logic signed [YW_P-1:0]    y_trunc,
  output logic                      y_valid
);

  localparam int LEVELS  = $clog2(NBS);
  localparam int NP      = 1 << LEVELS;       // rows padded to a power of two
  localparam int LATENCY = 1 + LEVELS;

  if (NBS < 1 || NBS > MAXD) begin : g_bad
    $error("bsac_fir_parallel: NBS must be 1..%0d", MAXD);
  end

  logic signed [YW_P-1:0] row_out [NP];

  for (genvar r = 0; r < NP; r++) begin : g_row
    if (r < NBS) begin : g_live
      logic signed [YW_P-1:0] ys [TAPS];
      for (genvar c = 0; c < TAPS; c++) begin : g_cell
        localparam int J = TAPS - 1 - c;
        logic signed [YW_P-1:0] y_src;
        logic signed [XW-1:0]   unused_x;
        csd_digit_t             unused_digit;
        if (c == 0) begin : g_y0
          assign y_src = '0;
        end else begin : g_yc
          assign y_src = ys[c-1];
        end
        bsac_cell #(.REGISTERED(1'b1), .YW_P(YW_P)) u_cell (
          .clk     (clk),
          .rst     (rst),
          .en      (en),
          .ld      (ld_en && int'(ld_coef) == J),
          .ld_digit(ld_digits[r]),
          .x_in    (x_in),
          .y_in    (y_src),
          .x_out   (unused_x),
          .y_out   (ys[c]),
          .digit   (unused_digit)
        );
      end
      assign row_out[r] = ys[TAPS-1];
    end else begin : g_pad
      assign row_out[r] = '0;
    end
  end

  if (LEVELS == 0) begin : g_single
    assign y_out   = row_out[0];
    assign y_trunc = row_out[0];
  end else begin : g_tree
    // node[l][i] is the registered sum of rows i*2^l .. (i+1)*2^l - 1.
    logic signed [YW_P-1:0] node [1:LEVELS][NP/2];
    logic signed [YW_P-1:0] trunc_d;
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int l = 1; l <= LEVELS; l++)
          for (int i = 0; i < NP/2; i++) node[l][i] <= '0;
        trunc_d <= '0;
      end else if (en) begin
        for (int i = 0; i < NP/2; i++)
          node[1][i] <= row_out[2*i] + row_out[2*i+1];
        for (int l = 2; l <= LEVELS; l++)
          for (int i = 0; i < (NP >> l); i++)
            node[l][i] <= node[l-1][2*i] + node[l-1][2*i+1];
        trunc_d <= node[LEVELS-1 > 0 ? LEVELS-1 : 1][0];
      end
    end
    assign y_out = node[LEVELS][0];
    if (LEVELS == 1) begin : g_t1
      // two rows: the first half is row 0 alone, one clock ahead of the sum
      logic signed [YW_P-1:0] row0_d;
      always_ff @(posedge clk) begin
        if (rst)     row0_d <= '0;
        else if (en) row0_d <= row_out[0];
      end
      assign y_trunc = row0_d;
    end else begin : g_tn
      assign y_trunc = trunc_d;
    end
  end

  logic [$clog2(TAPS+LEVELS+1)-1:0] fill;
  always_ff @(posedge clk) begin
    if (rst)                                  fill <= '0;
    else if (en && int'(fill) < TAPS + LEVELS) fill <= fill + 1'b1;
  end
  assign y_valid = (int'(fill) == TAPS + LEVELS);

endmodule
