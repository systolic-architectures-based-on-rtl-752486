// tb_workload_fir121 -- the 121st-order highpass FIR example on both FIR
// structures.
//
// The filter: 121 taps, h(n) = ideal highpass with cutoff 0.39 cycles per
// sample, centred on tap 60, times a Hamming window, quantized to Q2.13.
// (The taps, cutoff and window are chosen here to resemble the example's
// response; its coefficients are not published.)
//   * parallel structure, 3 CSD digits per coefficient (y_out) and the same
//     array's 2-digit truncated output (y_trunc);
//   * cascaded structure, each coefficient cut to its digits of weight
//     2^-T or more (at most 3), T being the finest cut that leaves at most
//     1.35 nonzero digits per coefficient on average (the example reports
//     about 1.3); a coefficient left with no digit keeps one zero cell.
// Checks: every output bit-exact against the FIR sum of the truncated
// coefficients (random input, random stalls), with latencies 3 and 243; then
// the gain at 0.10, 0.20, 0.30 and 0.45 cycles/sample measured by correlating
// the output with the input sinusoid over whole periods, against the gain
// the truncated coefficients must have.  The measured gains of each version
// are printed next to the unquantized filter's.
module tb_workload_fir121;
  import bsac_pkg::*;
  import tb_bsac_pkg::*;
  localparam int T    = 121;
  localparam int NBS  = 3;
  localparam int unsigned CD [T] = '{default: NBS};
  localparam int LATP = 3;
  localparam int LATC = T * NBS - T + 1;
  localparam real PI  = 3.14159265358979;

  logic clk = 0, rst = 1, en = 0, ld_p = 0, ld_c = 0;
  logic [6:0] ld_coef;
  csd_digit_t dig_p [MAXD], dig_c [MAXD];
  logic signed [15:0] x_in;
  logic signed [31:0] yp, ypt, yc;
  logic vp, vc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsac_fir_parallel #(.TAPS(T), .NBS(NBS)) u_par (
    .clk, .rst, .en, .x_in, .ld_en(ld_p), .ld_coef, .ld_digits(dig_p),
    .y_out(yp), .y_trunc(ypt), .y_valid(vp));
  bsac_fir_cascaded #(.TAPS(T), .DIGITS(CD)) u_casc (
    .clk, .rst, .en, .x_in, .ld_en(ld_c), .ld_coef, .ld_digits(dig_c),
    .y_out(yc), .y_valid(vc));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real    h [T];
  int     hv [T];
  longint qp [T], qpt [T], qc [T];
  int xs [$];

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (sample %0d)", what, got, exp, xs.size());
    end
  endtask

  // Keeps the digits of weight 2^-thr or more, at most NBS of them.
  function automatic int cut(input digvec_t d, input int thr, output digvec_t o);
    int n = 0;
    for (int i = 0; i < MAXD; i++) o[i] = DIGIT_ZERO;
    for (int i = 0; i < MAXD && n < NBS; i++)
      if (d[i].k != DIG_ZERO && int'(d[i].a) >= -thr) begin
        o[n] = d[i];
        n++;
      end
    return n;
  endfunction

  function automatic real gain(input longint q [T], input real f, input real scale);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < T; n++) begin
      re += real'(q[n]) / scale * $cos(2.0 * PI * f * n);
      im -= real'(q[n]) / scale * $sin(2.0 * PI * f * n);
    end
    return $sqrt(re * re + im * im);
  endfunction

  function automatic real gain_ideal(input real f);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < T; n++) begin
      re += h[n] * $cos(2.0 * PI * f * n);
      im -= h[n] * $sin(2.0 * PI * f * n);
    end
    return $sqrt(re * re + im * im);
  endfunction

  initial begin
    digvec_t d, dc;
    int thr, used;
    real avg;
    real freqs [4] = '{0.10, 0.20, 0.30, 0.45};
    x_in = '0; ld_coef = '0;
    for (int i = 0; i < MAXD; i++) begin dig_p[i] = DIGIT_ZERO; dig_c[i] = DIGIT_ZERO; end
    // filter design
    for (int n = 0; n < T; n++) begin
      real w;
      w = 0.54 - 0.46 * $cos(2.0 * PI * n / (T - 1));
      if (n == 60) h[n] = 1.0 - 2.0 * 0.39;
      else         h[n] = -$sin(2.0 * PI * 0.39 * (n - 60)) / (PI * (n - 60));
      h[n] = h[n] * w;
      hv[n] = $rtoi($floor(h[n] * 8192.0 + 0.5));
    end
    // threshold for the cascaded version: the most precise one averaging <= 1.35 digits
    for (thr = 13; thr >= 0; thr--) begin
      used = 0;
      for (int n = 0; n < T; n++) begin
        void'(csd_digits(hv[n], MAXD, d));
        used += cut(d, thr, dc);
      end
      if (real'(used) / T <= 1.35) break;
    end
    avg = real'(used) / T;
    $display("cascaded version: digits of weight >= 2^-%0d, average %0.2f per coefficient", thr, avg);
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < T; n++) begin
      void'(csd_digits(hv[n], MAXD, d));
      void'(cut(d, thr, dc));
      qp[n]  = digits_value(d, NBS);
      qpt[n] = digits_value(d, 2);
      qc[n]  = digits_value(dc, NBS);
      ld_coef = 7'(n); dig_p = d; dig_c = dc; ld_p = 1; ld_c = 1;
      @(posedge clk); #1;
    end
    ld_p = 0; ld_c = 0;
    // bit-exact run on random samples
    for (int t = 0; t < 700; t++) begin
      int s;
      longint ap, apt, ac;
      en = ($urandom_range(0, 9) < 8);
      x_in = 16'(rand_sample());
      @(posedge clk);
      if (en) xs.push_back(int'(x_in));
      #1;
      s = xs.size();
      expect_eq(vc, s >= T * NBS, "cascaded valid");
      if (s >= T + 2) begin
        ap = 0; apt = 0;
        for (int j = 0; j < T; j++) begin
          ap  += qp[j]  * longint'(xs[s - LATP - j]);
          apt += qpt[j] * longint'(xs[s - LATP - j]);
        end
        expect_eq(yp,  wrap32(ap),  "parallel 3 digits");
        expect_eq(ypt, wrap32(apt), "parallel 2 digits");
      end
      if (s >= T * NBS) begin
        ac = 0;
        for (int j = 0; j < T; j++) ac += qc[j] * longint'(xs[s - LATC - j]);
        expect_eq(yc, wrap32(ac), "cascaded");
      end
    end
    // frequency response
    en = 1;
    foreach (freqs[fi]) begin
      real f, cp, sp, ct, st, cc, sc, g3, g2, gc, e3, e2, ec;
      f = freqs[fi];
      cp = 0; sp = 0; ct = 0; st = 0; cc = 0; sc = 0;
      for (int t = 0; t < 400 + 200; t++) begin
        x_in = 16'($rtoi($floor(8000.0 * $cos(2.0 * PI * f * real'(t)) + 0.5)));
        @(posedge clk);
        xs.push_back(int'(x_in));
        #1;
        if (t >= 400) begin
          // output now belongs to input sample t - latency
          cp += real'(yp)  * $cos(2.0 * PI * f * real'(t - LATP));
          sp += real'(yp)  * $sin(2.0 * PI * f * real'(t - LATP));
          ct += real'(ypt) * $cos(2.0 * PI * f * real'(t - LATP));
          st += real'(ypt) * $sin(2.0 * PI * f * real'(t - LATP));
          cc += real'(yc)  * $cos(2.0 * PI * f * real'(t - LATC));
          sc += real'(yc)  * $sin(2.0 * PI * f * real'(t - LATC));
        end
      end
      g3 = 2.0 * $sqrt(cp * cp + sp * sp) / (200.0 * 8000.0 * 8192.0);
      g2 = 2.0 * $sqrt(ct * ct + st * st) / (200.0 * 8000.0 * 8192.0);
      gc = 2.0 * $sqrt(cc * cc + sc * sc) / (200.0 * 8000.0 * 8192.0);
      e3 = gain(qp, f, 8192.0); e2 = gain(qpt, f, 8192.0); ec = gain(qc, f, 8192.0);
      $display("f=%0.2f  ideal %0.4f | parallel 3 digits %0.4f | 2 digits %0.4f | cascaded avg %0.2f: %0.4f",
               f, gain_ideal(f), g3, g2, avg, gc);
      checks += 3;
      // the rounding of the 16-bit input sinusoid limits the agreement
      if ((g3 - e3 > 0.002 || e3 - g3 > 0.002)) begin failures++; $display("FAIL gain 3 digits: %f vs %f", g3, e3); end
      if ((g2 - e2 > 0.002 || e2 - g2 > 0.002)) begin failures++; $display("FAIL gain 2 digits: %f vs %f", g2, e2); end
      if ((gc - ec > 0.002 || ec - gc > 0.002)) begin failures++; $display("FAIL gain cascaded: %f vs %f", gc, ec); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
