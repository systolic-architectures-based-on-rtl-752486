// tb_workload_dft256 -- one bin of the 256-point DFT example.
//
// A bsac_dft_bin with N = 256 and up to 3 cells per twiddle part is loaded
// with the factors of bin K (cos and -sin of 2 pi m K / 256 in Q2.13, cut to
// 3 CSD digits) and fed the test signal x(n) = 1000 cos(2 pi n / 32) with
// random stalls.  Every output is checked bit-exact against the direct sum
// with the same truncated factors (latency 513 samples after the window's
// last sample).  For K = 8, where the cosine sits, the result must be within
// 2 % of the exact 128000 (times 2^13); for K = 5 it must be below 2 % of
// that.  The run is repeated for both bins after a reset and a reload.
module tb_workload_dft256;
  import bsac_pkg::*;
  import tb_bsac_pkg::*;
  localparam int N = 256, NBS = 3;
  localparam int LAT = N * NBS - N + 1;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst = 1, en = 0, ld_en = 0, ld_im = 0;
  logic [8:0] ld_stage;
  csd_digit_t ld_digits [MAXD];
  logic signed [15:0] x_in;
  logic signed [31:0] x_re, x_im;
  logic valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsac_dft_bin #(.N(N), .NBS(NBS)) dut (.clk, .rst, .en, .x_in, .ld_en, .ld_stage, .ld_im, .ld_digits,
                                        .x_re, .x_im, .valid);

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic run_bin(input int k);
    digvec_t d;
    int s, t0, used;
    longint ar, ai;
    real ph, mag, ref_mag;
    rst = 1; en = 0; ld_en = 0;
    @(posedge clk); #1 rst = 0;
    used = 0;
    for (int m = 0; m < N; m++) begin
      ph = 2.0 * PI * real'(m * k) / real'(N);
      used += (csd_digits($rtoi($floor($cos(ph) * 8192.0 + 0.5)), NBS, d) > NBS) ? NBS
              : csd_digits($rtoi($floor($cos(ph) * 8192.0 + 0.5)), NBS, d);
      cr[m] = digits_value(d, NBS);
      ld_en = 1; ld_im = 0; ld_stage = 9'(m); ld_digits = d;
      @(posedge clk); #1;
      used += (csd_digits($rtoi($floor(-$sin(ph) * 8192.0 + 0.5)), NBS, d) > NBS) ? NBS
              : csd_digits($rtoi($floor(-$sin(ph) * 8192.0 + 0.5)), NBS, d);
      ci[m] = digits_value(d, NBS);
      ld_im = 1; ld_digits = d;
      @(posedge clk); #1;
    end
    ld_en = 0;
    $display("bin %0d: %0.2f nonzero digits per twiddle part on average", k, real'(used) / (2.0 * N));
    xs.delete();
    while (xs.size() < N + LAT + 40) begin
      en = ($urandom_range(0, 9) < 9);
      x_in = 16'($rtoi($floor(1000.0 * $cos(2.0 * PI * real'(xs.size()) / 32.0) + 0.5)));
      @(posedge clk);
      if (en) xs.push_back(int'(x_in));
      #1;
      s = xs.size();
      expect_eq(valid, s >= LAT + N - 1, "valid");
      if (s >= LAT + N - 1) begin
        t0 = s - LAT - (N - 1);
        ar = 0; ai = 0;
        for (int m = 0; m < N; m++) begin
          ar += cr[m] * longint'(xs[t0 + m]);
          ai += ci[m] * longint'(xs[t0 + m]);
        end
        expect_eq(x_re, wrap32(ar), "re");
        expect_eq(x_im, wrap32(ai), "im");
      end
    end
    mag = $sqrt(real'(x_re) * real'(x_re) + real'(x_im) * real'(x_im)) / 8192.0;
    ref_mag = (k == 8) ? 128000.0 : 0.0;
    $display("bin %0d: |X| = %0.1f, exact %0.1f, error %0.4f %%", k, mag, ref_mag,
             100.0 * (mag - ref_mag) / 128000.0);
    checks++;
    if (mag - ref_mag > 2560.0 || ref_mag - mag > 2560.0) begin
      failures++;
      $display("FAIL bin %0d magnitude", k);
    end
  endtask

  initial begin
    x_in = '0; ld_stage = '0;
    for (int i = 0; i < MAXD; i++) ld_digits[i] = DIGIT_ZERO;
    run_bin(8);
    run_bin(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
