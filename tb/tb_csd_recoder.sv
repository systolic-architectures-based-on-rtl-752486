// tb_csd_recoder -- compares the recoder with the reference digit loop for
// every coefficient value, and checks the truncated form, the nonzero digit
// count, the no-two-adjacent-digits rule and the range flag.
module tb_csd_recoder;
  import bsac_pkg::*;
  import tb_bsac_pkg::*;
  localparam int ND = 3;
  logic signed [15:0] coef;
  csd_digit_t digits [ND];
  csd_digit_t full [MAXD];
  logic [4:0] ndigits, ndf;
  logic err, errf;
  int checks = 0, failures = 0;

  csd_recoder #(.NDIG(ND))   dut  (.coef(coef), .digits(digits), .ndigits(ndigits), .err(err));
  csd_recoder #(.NDIG(MAXD)) dutf (.coef(coef), .digits(full), .ndigits(ndf), .err(errf));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    digvec_t ref_d;
    int cnt;
    bit bad, too_big;
    for (int v = -32768; v <= 32767; v++) begin
      coef = 16'(v);
      #1;
      cnt = csd_digits(v, MAXD, ref_d);
      too_big = 0;
      for (int i = 0; i < cnt && i < MAXD; i++) if (int'(ref_d[i].a) > A_MAX) too_big = 1;
      bad = (int'(ndf) != cnt) || (errf != too_big);
      if (!too_big) begin
        for (int i = 0; i < MAXD; i++) if (full[i] != ref_d[i]) bad = 1;
        for (int i = 0; i < ND; i++)   if (digits[i] != ref_d[i]) bad = 1;
        if (digits_value(full, MAXD) != longint'(v)) bad = 1;
      end
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL coef=%0d count=%0d/%0d err=%0b", v, ndf, cnt, errf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
