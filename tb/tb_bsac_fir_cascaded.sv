// tb_bsac_fir_cascaded -- runs the Type I FIR of the worked example (taps
// A(0), A(1), A(2) with 2, 4 and 3 cells) on random samples with random
// stalls, and compares every output with the FIR sum of the truncated CSD
// coefficients.  Output k clocks after the sample must be exactly
// LATENCY = cells - taps + 1 = 7 samples late, y_valid must rise after 9
// samples, and the array must hold still while en = 0.  Three coefficient
// sets are run, each after a reset.  The sample held by each of the nine
// cells is also compared with the timing table of the worked example: after
// sample T has entered, cells 1..9 hold x(T), x(T-1), x(T-2), x(T-2),
// x(T-3), x(T-4), x(T-5), x(T-5), x(T-6).
module tb_bsac_fir_cascaded;
  import bsac_pkg::*;
  import tb_bsac_pkg::*;
  localparam int TAPS = 3;
  localparam int unsigned DIGITS [TAPS] = '{2, 4, 3};
  localparam int NCELLS = 9;
  localparam int LAT = NCELLS - TAPS + 1;

  logic clk = 0, rst = 1, en = 0, ld_en = 0;
  logic [1:0] ld_coef;
  csd_digit_t ld_digits [MAXD];
  logic signed [15:0] x_in;
  logic signed [31:0] y_out;
  logic y_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsac_fir_cascaded dut (.clk, .rst, .en, .x_in, .ld_en, .ld_coef, .ld_digits, .y_out, .y_valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // delay, in samples, of the x register of each cell (timing table)
  localparam int XDELAY [NCELLS] = '{0, 1, 2, 2, 3, 4, 5, 5, 6};
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
      ld_en = 1; ld_coef = 2'(j); ld_digits = d;
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
