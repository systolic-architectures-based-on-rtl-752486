// tb_bsac_fir_cascaded_uneven -- the cascaded FIR with uneven digit counts,
// including single-cell coefficients: 4 taps with 1, 1, 3 and 2 cells for
// A(0)..A(3).  A group of one cell has no last-but-one cell, so the next
// group's first cell must be fed from further back (or from the input);
// this checks that routing.  Outputs are compared with the FIR sum of the
// truncated coefficients on random samples with random stalls, with latency
// cells - taps + 1 = 4, and the sample held by each cell with the delay the
// routing rule gives: 0, 1, 1, 2, 3, 3, 3.
module tb_bsac_fir_cascaded_uneven;
  import bsac_pkg::*;
  import tb_bsac_pkg::*;
  localparam int TAPS = 4;
  localparam int unsigned DIGITS [TAPS] = '{1, 1, 3, 2};
  localparam int NCELLS = 7;
  localparam int LAT = NCELLS - TAPS + 1;

  logic clk = 0, rst = 1, en = 0, ld_en = 0;
  logic [2:0] ld_coef;
  csd_digit_t ld_digits [MAXD];
  logic signed [15:0] x_in;
  logic signed [31:0] y_out;
  logic y_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsac_fir_cascaded #(.TAPS(TAPS), .DIGITS(DIGITS)) dut (.clk, .rst, .en, .x_in, .ld_en, .ld_coef, .ld_digits, .y_out, .y_valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // delay, in samples, of the x register of each cell (timing table)
  localparam int XDELAY [NCELLS] = '{0, 1, 1, 2, 3, 3, 3};
  logic signed [15:0] cell_x [NCELLS];
  for (genvar i = 0; i < NCELLS; i++) begin : g_probe
    assign cell_x[i] = dut.xs[i];
  end

  longint av [TAPS];
  int xs [$];

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (sample %0d)", what, got, exp, xs.size());
    end
  endtask

  task automatic run_set(input int set);
    digvec_t d;
    int v, s;
    longint acc;
    rst = 1; en = 0; ld_en = 0;
    @(posedge clk); #1 rst = 0;
    for (int j = 0; j < TAPS; j++) begin
      v = (set == 0 && j == 1) ? 6765 : rand_coef();   // 6765: many CSD digits
      void'(csd_digits(v, int'(DIGITS[j]), d));
      av[j] = digits_value(d, int'(DIGITS[j]));
      ld_en = 1; ld_coef = 3'(j); ld_digits = d;
      @(posedge clk); #1;
    end
    ld_en = 0;
    xs.delete();
    for (int t = 0; t < 400; t++) begin
      en   = ($urandom_range(0, 9) < 8);
      x_in = 16'(rand_sample());
      @(posedge clk);
      if (en) xs.push_back(int'(x_in));
      #1;
      s = xs.size();
      expect_eq(y_valid, s >= NCELLS, "y_valid");
      for (int i = 0; i < NCELLS; i++)
        if (s > XDELAY[i]) expect_eq(cell_x[i], xs[s - 1 - XDELAY[i]], $sformatf("x held by cell %0d", i + 1));
      if (s >= NCELLS) begin
        acc = 0;
        for (int j = 0; j < TAPS; j++) acc += av[j] * longint'(xs[s - LAT - j]);
        expect_eq(y_out, longint'(wrap32(acc)), "y_out");
      end
    end
  endtask

  initial begin
    x_in = '0; ld_coef = '0;
    for (int i = 0; i < MAXD; i++) ld_digits[i] = DIGIT_ZERO;
    for (int set = 0; set < 3; set++) run_set(set);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
