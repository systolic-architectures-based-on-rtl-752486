// tb_bsac_cell -- checks the registered BSAC cell: x_out = x_in and
// y_out = y_in + k * 2^a * x_in one clock later, the digit load, the hold
// with en = 0 and the reset.
module tb_bsac_cell;
  import bsac_pkg::*;
  logic clk = 0, rst = 1, en = 0, ld = 0;
  csd_digit_t ld_digit, digit;
  logic signed [15:0] x_in, x_out;
  logic signed [31:0] y_in, y_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsac_cell dut (.clk, .rst, .en, .ld, .ld_digit, .x_in, .y_in, .x_out, .y_out, .digit);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int k, a, xv, yv;
    longint term;
    ld_digit = DIGIT_ZERO; x_in = '0; y_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    expect_eq(y_out, 0, "reset y");
    expect_eq(x_out, 0, "reset x");
    for (int t = 0; t < 600; t++) begin
      k  = int'($urandom_range(0, 2)) - 1;
      a  = int'($urandom_range(0, 14)) + A_MIN;
      xv = int'($urandom_range(0, 65535)) - 32768;
      yv = int'($urandom);
      // load the digit
      ld = 1;
      ld_digit.k = (k > 0) ? DIG_POS : (k < 0) ? DIG_NEG : DIG_ZERO;
      ld_digit.a = AW'(a);
      @(posedge clk);
      #1 ld = 0;
      // one enabled clock
      x_in = 16'(xv); y_in = yv; en = 1;
      @(posedge clk);
      #1 en = 0;
      term = longint'(k) * longint'(xv) * (longint'(1) << (a - A_MIN));
      expect_eq(y_out, longint'(int'(longint'(yv) + term)), "y_out");
      expect_eq(x_out, xv, "x_out");
      // a disabled clock holds both registers
      x_in = ~x_in; y_in = ~y_in;
      @(posedge clk);
      #1;
      expect_eq(y_out, longint'(int'(longint'(yv) + term)), "hold y");
      expect_eq(x_out, xv, "hold x");
    end
    rst = 1;
    @(posedge clk);
    #1 rst = 0;
    expect_eq(y_out, 0, "second reset");
    expect_eq(digit, 0, "digit reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
