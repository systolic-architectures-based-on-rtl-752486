// tb_bsac_iir -- runs the second-order IIR (a(0..2), b(1..2), two digit rows)
// on random samples with random stalls and compares every output with the
// recursion y(n) = sum a(k) x(n-k) + sum b(k) ys(n-k), where the coefficients
// are cut to two CSD digits and ys is the saturated 16-bit sample of y.  The
// output must appear NB + 1 = 3 samples after its input sample.  One set
// uses feedback gains large enough to drive the sample into saturation.
module tb_bsac_iir;
  import bsac_pkg::*;
  import tb_bsac_pkg::*;
  localparam int NA = 3, NB = 2, NROWS = 2;
  localparam int LAT = NB + 1;

  logic clk = 0, rst = 1, en = 0, ld_en = 0;
  logic [2:0] ld_coef;
  csd_digit_t ld_digits [MAXD];
  logic signed [15:0] x_in, y_sample;
  logic signed [31:0] y_out;
  logic y_valid;
  int checks = 0, failures = 0, sat_seen = 0;

  always #5 clk = ~clk;

  bsac_iir dut (.clk, .rst, .en, .x_in, .ld_en, .ld_coef, .ld_digits, .y_out, .y_sample, .y_valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint aq [NA], bq [NB+1];
  int xs [$];
  int ys [$];     // reference sample outputs y(0), y(1), ...
  int yf [$];     // reference full sums

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (sample %0d)", what, got, exp, xs.size());
    end
  endtask

  function automatic int sat16(input int v);
    int f = v >>> CF;
    if (f > 32767) return 32767;
    if (f < -32768) return -32768;
    return f;
  endfunction

  // Extends the reference outputs up to y(n).
  task automatic model_to(input int n);
    longint acc;
    while (ys.size() <= n) begin
      int m = ys.size();
      acc = 0;
      for (int k = 0; k < NA; k++) if (m - k >= 0) acc += aq[k] * longint'(xs[m - k]);
      for (int k = 1; k <= NB; k++) if (m - k >= 0) acc += bq[k] * longint'(ys[m - k]);
      yf.push_back(wrap32(acc));
      ys.push_back(sat16(wrap32(acc)));
      if (sat16(wrap32(acc)) == 32767 || sat16(wrap32(acc)) == -32768) sat_seen++;
    end
  endtask

  task automatic run_set(input int set);
    digvec_t d;
    int v, s;
    rst = 1; en = 0; ld_en = 0;
    @(posedge clk); #1 rst = 0;
    for (int c = 0; c < NA + NB; c++) begin
      if (c < NA) v = rand_coef() / 2;
      else        v = (set == 2) ? 12000 : rand_coef() / 4;   // set 2: strong feedback
      void'(csd_digits(v, MAXD, d));
      if (c < NA) aq[c] = digits_value(d, NROWS);
      else        bq[c - NA + 1] = digits_value(d, NROWS);
      ld_en = 1; ld_coef = 3'(c); ld_digits = d;
      @(posedge clk); #1;
    end
    ld_en = 0;
    xs.delete(); ys.delete(); yf.delete();
    for (int t = 0; t < 400; t++) begin
      en   = ($urandom_range(0, 9) < 8);
      x_in = 16'(rand_sample());
      @(posedge clk);
      if (en) xs.push_back(int'(x_in));
      #1;
      s = xs.size();
      expect_eq(y_valid, s >= LAT, "y_valid");
      if (s >= LAT) begin
        model_to(s - LAT);
        expect_eq(y_out, yf[s - LAT], "y_out");
        expect_eq(y_sample, ys[s - LAT], "y_sample");
      end
    end
  endtask

  initial begin
    x_in = '0; ld_coef = '0;
    for (int i = 0; i < MAXD; i++) ld_digits[i] = DIGIT_ZERO;
    for (int set = 0; set < 3; set++) run_set(set);
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL: saturation of the fed-back sample never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
