// tb_bsac_dft_bin -- loads the twiddle factors of bin K = 1 of a 4-point DFT
// (real and imaginary parts cut to 3 CSD digits) and checks Re and Im X(1)
// of every window of random samples against the direct sum, LATENCY =
// N*NBS - N + 1 = 9 samples after the window's last sample.  A cosine of
// period 4 must then give its energy in this bin.
module tb_bsac_dft_bin;
  import bsac_pkg::*;
  import tb_bsac_pkg::*;
  localparam int N = 4, NBS = 3, K = 1;
  localparam int LAT = N * NBS - N + 1;

  logic clk = 0, rst = 1, en = 0, ld_en = 0, ld_im = 0;
  logic [2:0] ld_stage;
  csd_digit_t ld_digits [MAXD];
  logic signed [15:0] x_in;
  logic signed [31:0] x_re, x_im;
  logic valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsac_dft_bin dut (.clk, .rst, .en, .x_in, .ld_en, .ld_stage, .ld_im, .ld_digits, .x_re, .x_im, .valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cr [N], ci [N];
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
    x_in = '0; ld_stage = '0;
    for (int i = 0; i < MAXD; i++) ld_digits[i] = DIGIT_ZERO;
    @(posedge clk); #1 rst = 0;
    for (int m = 0; m < N; m++) begin
      ph = 2.0 * 3.14159265358979 * real'(m * K) / real'(N);
      void'(csd_digits(int'($rtoi($floor($cos(ph) * 8192.0 + 0.5))), NBS, d));
      cr[m] = digits_value(d, NBS);
      ld_en = 1; ld_im = 0; ld_stage = 3'(m); ld_digits = d;
      @(posedge clk); #1;
      void'(csd_digits(int'($rtoi($floor(-$sin(ph) * 8192.0 + 0.5))), NBS, d));
      ci[m] = digits_value(d, NBS);
      ld_im = 1; ld_digits = d;
      @(posedge clk); #1;
    end
    ld_en = 0;
    for (int t = 0; t < 600; t++) begin
      en = ($urandom_range(0, 9) < 8);
      // first random samples, then a cosine of period N/K
      x_in = (t < 400) ? 16'(rand_sample()) : ((xs.size() % 4 == 0) ? 16'sd1000 : (xs.size() % 4 == 2) ? -16'sd1000 : 16'sd0);
      @(posedge clk);
      if (en) xs.push_back(int'(x_in));
      #1;
      s = xs.size();
      expect_eq(valid, s >= LAT + N - 1, "valid");
      if (s >= LAT + N - 1) begin
        t0 = s - LAT - (N - 1);            // first sample of the window
        ar = 0; ai = 0;
        for (int m = 0; m < N; m++) begin
          ar += cr[m] * longint'(xs[t0 + m]);
          ai += ci[m] * longint'(xs[t0 + m]);
        end
        expect_eq(x_re, longint'(wrap32(ar)), "re");
        expect_eq(x_im, longint'(wrap32(ai)), "im");
      end
    end
    // the last window is pure cosine: |X(1)| = 2 * 1000 (times 2^13)
    checks++;
    if (!((x_re == 2000 * 8192 || x_re == -2000 * 8192) && x_im == 0) &&
        !((x_im == 2000 * 8192 || x_im == -2000 * 8192) && x_re == 0)) begin
      failures++;
      $display("FAIL cosine bin: re=%0d im=%0d", x_re, x_im);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
