// bsac_fir_cascaded -- Type I ("cascaded") BSAC systolic FIR filter.
//
// Computes y(n) = sum_j A(j) * x(n-j), j = 0..TAPS-1, one output per clock.
// Each coefficient A(j) gets DIGITS[j] BSAC cells in series, one per CSD
// digit, so coefficients may use different numbers of cells.  The chain
// starts with the cells of A(TAPS-1) and ends with those of A(0); the partial
// sum enters the first cell as zero and moves one cell per clock.
//
// Sample routing (original paper, Fig. 2): inside a coefficient's group each cell
// takes x from the cell before it, so the sum and its sample travel
// together.  The first cell of the next group needs the next, one clock
// newer, sample; it therefore takes x from the last-but-one cell of the
// previous group instead of the last.  In general cell i of group g must see
// the input delayed by i - g registers, and it is fed from the nearest
// earlier cell whose output has exactly that delay (x_in itself for delay
// 0).  For the original paper's example, DIGITS = {2, 4, 3} for A(0), A(1), A(2),
// this gives nine cells and the taps of Fig. 2.  The critical path is that of
// one cell, whatever the coefficients.
//
// Coefficients: ld_en writes CSD digits ld_digits[0..DIGITS[j]-1] (most
// significant first) of coefficient j = ld_coef into its cells; digits past
// the group's length are ignored, which truncates the coefficient.
//
// Timing: sample x(n) presented with en = 1 gives y(n) on y_out LATENCY =
// NCELLS - TAPS + 1 enabled clocks later (7 for the example).  en = 0 freezes
// the array.  y_valid rises once NCELLS samples have entered since rst, when
// every sample in the window was entered after reset.  Reset, enable, valid
// and load port are this design's choices.
module bsac_fir_cascaded
  import bsac_pkg::*;
#(
  parameter int          TAPS           = 3,
  parameter int unsigned DIGITS [TAPS]  = '{2, 4, 3},
  parameter int          YW_P           = YW
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          en,
  input  logic signed [XW-1:0]          x_in,
  input  logic                          ld_en,
  input  logic [$clog2(TAPS+1)-1:0]     ld_coef,
  input  csd_digit_t                    ld_digits [MAXD],
  output logic signed [YW_P-1:0]        y_out,
  output logic                          y_valid
);

  function automatic int count_cells();
    int s = 0;
    for (int j = 0; j < TAPS; j++) s += int'(DIGITS[j]);
    return s;
  endfunction

  localparam int NCELLS  = count_cells();
  localparam int LATENCY = NCELLS - TAPS + 1;

  // Group (0 = coefficient TAPS-1) that chain cell i belongs to.
  function automatic int group_of(input int i);
    int first = 0;
    for (int g = 0; g < TAPS; g++) begin
      if (i < first + int'(DIGITS[TAPS-1-g])) return g;
      first += int'(DIGITS[TAPS-1-g]);
    end
    return TAPS - 1;
  endfunction

  // Position of cell i inside its group (0 = most significant digit).
  function automatic int digit_of(input int i);
    int first = 0;
    for (int g = 0; g < TAPS; g++) begin
      if (i < first + int'(DIGITS[TAPS-1-g])) return i - first;
      first += int'(DIGITS[TAPS-1-g]);
    end
    return 0;
  endfunction

  // Cell whose x output feeds cell i; -1 means x_in.
  function automatic int x_source(input int i);
    int need = i - group_of(i) - 1;    // delay of the wanted register output
    if (need < 0) return -1;
    for (int s = i - 1; s >= 0; s--)
      if (s - group_of(s) == need) return s;
    return -1;
  endfunction

  for (genvar j = 0; j < TAPS; j++) begin : g_check
    if (DIGITS[j] < 1 || DIGITS[j] > MAXD) begin : g_bad
      $error("bsac_fir_cascaded: DIGITS[%0d] must be 1..%0d", j, MAXD);
    end
  end

  logic signed [XW-1:0]   xs [NCELLS];
  logic signed [YW_P-1:0] ys [NCELLS];

  for (genvar i = 0; i < NCELLS; i++) begin : g_cell
    localparam int G   = group_of(i);
    localparam int J   = TAPS - 1 - G;
    localparam int D   = digit_of(i);
    localparam int SRC = x_source(i);

    logic signed [XW-1:0]   x_src;
    logic signed [YW_P-1:0] y_src;
    csd_digit_t             unused_digit;

    if (SRC < 0) begin : g_xin
      assign x_src = x_in;
    end else begin : g_xtap
      assign x_src = xs[SRC];
    end
    if (i == 0) begin : g_y0
      assign y_src = '0;
    end else begin : g_yc
      assign y_src = ys[i-1];
    end

    bsac_cell #(.REGISTERED(1'b1), .YW_P(YW_P)) u_cell (
      .clk     (clk),
      .rst     (rst),
      .en      (en),
      .ld      (ld_en && int'(ld_coef) == J),
      .ld_digit(ld_digits[D]),
      .x_in    (x_src),
      .y_in    (y_src),
      .x_out   (xs[i]),
      .y_out   (ys[i]),
      .digit   (unused_digit)
    );
  end

  assign y_out = ys[NCELLS-1];

  // Fill counter for y_valid.
  logic [$clog2(NCELLS+1)-1:0] fill;
  always_ff @(posedge clk) begin
    if (rst)                               fill <= '0;
    else if (en && int'(fill) < NCELLS)    fill <= fill + 1'b1;
  end
  assign y_valid = (int'(fill) == NCELLS);

endmodule
