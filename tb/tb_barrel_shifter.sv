// tb_barrel_shifter -- checks the one-cycle shifter against x * 2^sh for
// every shift amount 0..14 with random and extreme samples.
module tb_barrel_shifter;
  logic signed [15:0] x;
  logic        [3:0]  sh;
  logic signed [31:0] y;
  int checks = 0, failures = 0;

  barrel_shifter dut (.x(x), .sh(sh), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int xv, input int s);
    longint exp;
    x  = 16'(xv);
    sh = 4'(s);
    #1;
    exp = longint'(xv) * (longint'(1) << s);
    checks++;
    if (longint'(y) != exp) begin
      failures++;
      $display("FAIL x=%0d sh=%0d y=%0d expected %0d", xv, s, y, exp);
    end
  endtask

  initial begin
    for (int s = 0; s <= 14; s++) begin
      check(32767, s);
      check(-32768, s);
      check(1, s);
      check(-1, s);
      check(0, s);
      for (int i = 0; i < 40; i++) check(int'($urandom_range(0, 65535)) - 32768, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
