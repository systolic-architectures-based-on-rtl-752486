// tb_bsac_dft -- loads all twiddle factors of the 4-point DFT (3 CSD digits
// per real or imaginary part) and checks every bin of every window of random
// samples against the direct DFT sum with the same truncated factors, with
// the latency of 9 samples after the window's last sample.
module tb_bsac_dft;
  import bsac_pkg::*;
  import tb_bsac_pkg::*;
  localparam int N = 4, NBS = 3;
  localparam int LAT = N * NBS - N + 1;

  logic clk = 0, rst = 1, en = 0, ld_en = 0;
  logic [5:0] ld_index;
  csd_digit_t ld_digits [MAXD];
  logic signed [15:0] x_in;
  logic signed [31:0] x_re [N], x_im [N];
  logic valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsac_dft dut (.clk, .rst, .en, .x_in, .ld_en, .ld_index, .ld_digits, .x_re, .x_im, .valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cr [N][N], ci [N][N];     // [K][m]
  int xs [$];

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (sample %0d)", what, got, exp, xs.size());
    end
  endtask

  initial begin
    digvec_t d;
    int s, t0;
    longint ar, ai;
    real ph;
    x_in = '0; ld_index = '0;
    for (int i = 0; i < MAXD; i++) ld_digits[i] = DIGIT_ZERO;
    @(posedge clk); #1 rst = 0;
    for (int k = 0; k < N; k++)
      for (int m = 0; m < N; m++) begin
        ph = 2.0 * 3.14159265358979 * real'(m * k) / real'(N);
        void'(csd_digits(int'($rtoi($floor($cos(ph) * 8192.0 + 0.5))), MAXD, d));
        cr[k][m] = digits_value(d, NBS);
        ld_en = 1; ld_index = 6'((k * N + m) * 2); ld_digits = d;
        @(posedge clk); #1;
        void'(csd_digits(int'($rtoi($floor(-$sin(ph) * 8192.0 + 0.5))), MAXD, d));
        ci[k][m] = digits_value(d, NBS);
        ld_index = 6'((k * N + m) * 2 + 1); ld_digits = d;
        @(posedge clk); #1;
      end
    ld_en = 0;
    for (int t = 0; t < 500; t++) begin
      en   = ($urandom_range(0, 9) < 8);
      x_in = 16'(rand_sample());
      @(posedge clk);
      if (en) xs.push_back(int'(x_in));
      #1;
      s = xs.size();
      expect_eq(valid, s >= LAT + N - 1, "valid");
      if (s >= LAT + N - 1) begin
        t0 = s - LAT - (N - 1);
        for (int k = 0; k < N; k++) begin
          ar = 0; ai = 0;
          for (int m = 0; m < N; m++) begin
            ar += cr[k][m] * longint'(xs[t0 + m]);
            ai += ci[k][m] * longint'(xs[t0 + m]);
          end
          expect_eq(x_re[k], longint'(wrap32(ar)), $sformatf("re X(%0d)", k));
          expect_eq(x_im[k], longint'(wrap32(ai)), $sformatf("im X(%0d)", k));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
