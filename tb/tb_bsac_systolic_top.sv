// tb_bsac_systolic_top -- end-to-end test of all arrays at their default
// sizes.  Coefficients go in as binary Q2.13 values through the loader, so
// the CSD recoding and the per-array truncation are part of what is checked.
// Each phase resets the design, loads a random coefficient set into every
// array and runs a random sample stream with random stalls, checking on every
// clock the cascaded FIR, the full and truncated parallel FIR outputs, the
// IIR sum and sample, and all four DFT bins against reference models with
// their latencies (7, 3, 3 and 9 samples).  It also checks the loader's error
// flag and digit count.  Each mechanism must occur at least once: stall,
// digit truncation in the loader, a truncated parallel output that differs
// from the full one, IIR feedback saturation, a rejected load of each kind.
module tb_bsac_systolic_top;
  import bsac_pkg::*;
  import tb_bsac_pkg::*;

  localparam int unsigned CDIG [3] = '{2, 4, 3};
  localparam int N = 4;

  logic clk = 0, rst = 1, en = 0;
  logic signed [15:0] x_in;
  logic ld_valid = 0;
  ld_target_e ld_target;
  logic [7:0] ld_index;
  logic signed [15:0] ld_coef;
  logic ld_err;
  logic [4:0] ld_ndigits;
  logic signed [31:0] casc_y, par_y, par_y_trunc, iir_y;
  logic signed [15:0] iir_y_sample;
  logic casc_valid, par_valid, iir_valid, dft_valid;
  logic signed [31:0] dft_re [N], dft_im [N];
  int checks = 0, failures = 0;
  int n_stall = 0, n_trunc_load = 0, n_par_trunc_diff = 0, n_iir_sat = 0;
  int n_err_range = 0, n_err_index = 0, n_load = 0;

  always #5 clk = ~clk;

  bsac_systolic_top dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ca [3], pf [3], ph [3], ia [3], ib [3], dr [N][N], di [N][N];
  int xs [$], iys [$], iyf [$];

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (sample %0d)", what, got, exp, xs.size());
    end
  endtask

  // Writes one coefficient through the loader; returns the value of its
  // first nd digits and checks the loader's flags.
  task automatic load(input ld_target_e tg, input int idx, input int v, input int nd,
                      output longint q);
    digvec_t d;
    int cnt;
    cnt = csd_digits(v, MAXD, d);
    q = digits_value(d, nd);
    ld_valid = 1; ld_target = tg; ld_index = 8'(idx); ld_coef = 16'(v);
    #1;
    expect_eq(ld_err, 0, "ld_err");
    expect_eq(ld_ndigits, cnt, "ld_ndigits");
    if (cnt > nd) n_trunc_load++;
    n_load++;
    @(posedge clk); #1;
    ld_valid = 0;
  endtask

  function automatic int sat16(input int v);
    int f = v >>> CF;
    if (f > 32767) return 32767;
    if (f < -32768) return -32768;
    return f;
  endfunction

  task automatic iir_model_to(input int n);
    longint acc;
    while (iys.size() <= n) begin
      int m = iys.size();
      acc = 0;
      for (int k = 0; k < 3; k++) if (m - k >= 0) acc += ia[k] * longint'(xs[m - k]);
      for (int k = 1; k <= 2; k++) if (m - k >= 0) acc += ib[k] * longint'(iys[m - k]);
      iyf.push_back(wrap32(acc));
      iys.push_back(sat16(wrap32(acc)));
      if (iys[m] == 32767 || iys[m] == -32768) n_iir_sat++;
    end
  endtask

  task automatic run_phase(input int phase);
    int s, t0;
    longint acc, acch, ar, ai;
    real phs;
    rst = 1; en = 0;
    @(posedge clk); #1 rst = 0;
    // a value whose CSD form needs 2^2 is flagged, so is a bad index
    ld_valid = 1; ld_target = TGT_FIR_PAR; ld_index = 8'd0; ld_coef = 16'sh7fff;
    #1 checks++; if (!ld_err) begin failures++; $display("FAIL range error not flagged"); end
    else n_err_range++;
    ld_target = TGT_IIR; ld_index = 8'd5; ld_coef = 16'sd100;
    #1 checks++; if (!ld_err) begin failures++; $display("FAIL index error not flagged"); end
    else n_err_index++;
    @(posedge clk); #1 ld_valid = 0;
    for (int j = 0; j < 3; j++) load(TGT_FIR_CASC, j, rand_coef(), int'(CDIG[j]), ca[j]);
    for (int j = 0; j < 3; j++) begin
      int v = rand_coef();
      load(TGT_FIR_PAR, j, v, 4, pf[j]);
      begin digvec_t d; void'(csd_digits(v, MAXD, d)); ph[j] = digits_value(d, 2); end
    end
    for (int j = 0; j < 3; j++) load(TGT_IIR, j, rand_coef() / 2, 2, ia[j]);
    for (int j = 1; j <= 2; j++) load(TGT_IIR, 2 + j, (phase == 1) ? 12000 : rand_coef() / 4, 2, ib[j]);
    for (int k = 0; k < N; k++)
      for (int m = 0; m < N; m++) begin
        phs = 2.0 * 3.14159265358979 * real'(m * k) / real'(N);
        load(TGT_DFT, (k * N + m) * 2,     int'($rtoi($floor( $cos(phs) * 8192.0 + 0.5))), 3, dr[k][m]);
        load(TGT_DFT, (k * N + m) * 2 + 1, int'($rtoi($floor(-$sin(phs) * 8192.0 + 0.5))), 3, di[k][m]);
      end
    xs.delete(); iys.delete(); iyf.delete();
    for (int t = 0; t < 300; t++) begin
      en   = ($urandom_range(0, 9) < 8);
      x_in = 16'(rand_sample());
      @(posedge clk);
      if (en) xs.push_back(int'(x_in));
      else if (xs.size() > 9) n_stall++;
      #1;
      s = xs.size();
      // cascaded FIR, 9 cells, latency 7
      expect_eq(casc_valid, s >= 9, "casc_valid");
      if (s >= 9) begin
        acc = 0;
        for (int j = 0; j < 3; j++) acc += ca[j] * longint'(xs[s - 7 - j]);
        expect_eq(casc_y, wrap32(acc), "casc_y");
      end
      // parallel FIR, latency 3
      expect_eq(par_valid, s >= 5, "par_valid");
      if (s >= 5) begin
        acc = 0; acch = 0;
        for (int j = 0; j < 3; j++) begin
          acc  += pf[j] * longint'(xs[s - 3 - j]);
          acch += ph[j] * longint'(xs[s - 3 - j]);
        end
        expect_eq(par_y, wrap32(acc), "par_y");
        expect_eq(par_y_trunc, wrap32(acch), "par_y_trunc");
        if (wrap32(acc) != wrap32(acch)) n_par_trunc_diff++;
      end
      // IIR, latency 3
      expect_eq(iir_valid, s >= 3, "iir_valid");
      if (s >= 3) begin
        iir_model_to(s - 3);
        expect_eq(iir_y, iyf[s - 3], "iir_y");
        expect_eq(iir_y_sample, iys[s - 3], "iir_y_sample");
      end
      // DFT, latency 9 after the window's last sample
      expect_eq(dft_valid, s >= 12, "dft_valid");
      if (s >= 12) begin
        t0 = s - 12;
        for (int k = 0; k < N; k++) begin
          ar = 0; ai = 0;
          for (int m = 0; m < N; m++) begin
            ar += dr[k][m] * longint'(xs[t0 + m]);
            ai += di[k][m] * longint'(xs[t0 + m]);
          end
          expect_eq(dft_re[k], wrap32(ar), "dft_re");
          expect_eq(dft_im[k], wrap32(ai), "dft_im");
        end
      end
    end
  endtask

  task automatic need(input int count, input string what);
    $display("mechanism %-28s seen %0d times", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    x_in = '0; ld_index = '0; ld_coef = '0; ld_target = TGT_FIR_CASC;
    for (int p = 0; p < 3; p++) run_phase(p);
    need(n_stall, "stall (en = 0)");
    need(n_load, "coefficient load");
    need(n_trunc_load, "digit truncation on load");
    need(n_par_trunc_diff, "truncated output differs");
    need(n_iir_sat, "IIR feedback saturation");
    need(n_err_range, "range error flagged");
    need(n_err_index, "index error flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
