// tb_bsac_fir_parallel -- runs the Type II FIR (3 taps, 4 digit rows) on
// random samples with random stalls.  y_out must equal the FIR sum with each
// coefficient cut to 4 CSD digits, y_trunc the same with 2 digits, both
// LATENCY = 3 samples after the input, with y_valid after 5 samples.
module tb_bsac_fir_parallel;
  import bsac_pkg::*;
  import tb_bsac_pkg::*;
  localparam int TAPS = 3;
  localparam int NBS  = 4;
  localparam int LAT  = 3;

  logic clk = 0, rst = 1, en = 0, ld_en = 0;
  logic [1:0] ld_coef;
  csd_digit_t ld_digits [MAXD];
  logic signed [15:0] x_in;
  logic signed [31:0] y_out, y_trunc;
  logic y_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsac_fir_parallel dut (.clk, .rst, .en, .x_in, .ld_en, .ld_coef, .ld_digits, .y_out, .y_trunc, .y_valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint af [TAPS], ah [TAPS];
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
    longint acc, acch;
    rst = 1; en = 0; ld_en = 0;
    @(posedge clk); #1 rst = 0;
    for (int j = 0; j < TAPS; j++) begin
      v = (set == 0) ? 6765 - 2000 * j : rand_coef();
      void'(csd_digits(v, MAXD, d));
      af[j] = digits_value(d, NBS);
      ah[j] = digits_value(d, NBS / 2);
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
      expect_eq(y_valid, s >= TAPS + 2, "y_valid");
      if (s >= TAPS + 2) begin
        acc = 0; acch = 0;
        for (int j = 0; j < TAPS; j++) begin
          acc  += af[j] * longint'(xs[s - LAT - j]);
          acch += ah[j] * longint'(xs[s - LAT - j]);
        end
        expect_eq(y_out, longint'(wrap32(acc)), "y_out");
        expect_eq(y_trunc, longint'(wrap32(acch)), "y_trunc");
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
