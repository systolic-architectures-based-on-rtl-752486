// tb_bsac_pkg -- reference arithmetic shared by the BSAC testbenches.
//
// Gives an independent canonical-signed-digit recoder (the textbook digit by
// digit loop: an odd remainder n gets digit 2 - (n mod 4), which is +1 or
// -1, and is then halved), the value of a truncated digit list, and random
// coefficient and sample generators.  Coefficient values are integers in
// units of 2^-13 (Q2.13); a partial sum is in units of 2^-13 sample LSBs, so
// the exact product of a coefficient value v and a sample x is v * x.
package tb_bsac_pkg;
  import bsac_pkg::*;

  typedef csd_digit_t digvec_t [MAXD];

  // CSD digits of v, most significant first, keeping the first nd nonzero
  // digits.  Returns the number of nonzero digits of the full code.
  function automatic int csd_digits(input int v, input int nd, output digvec_t d);
    int n, p, cnt;
    int dig_p [$];
    int dig_k [$];
    for (int i = 0; i < MAXD; i++) d[i] = DIGIT_ZERO;
    n = v;
    p = 0;
    while (n != 0) begin
      if (n % 2 != 0) begin
        int r = ((n % 4) + 4) % 4;           // 1 or 3
        int k = (r == 1) ? 1 : -1;
        dig_p.push_front(p);
        dig_k.push_front(k);
        n = n - k;
      end
      n = n / 2;
      p++;
    end
    cnt = dig_p.size();
    for (int i = 0; i < cnt && i < nd && i < MAXD; i++) begin
      d[i].k = (dig_k[i] > 0) ? DIG_POS : DIG_NEG;
      d[i].a = AW'(dig_p[i] - CF);
    end
    return cnt;
  endfunction

  // Value (units of 2^-13) of the first nd digits of d.
  function automatic longint digits_value(input digvec_t d, input int nd);
    longint s = 0;
    for (int i = 0; i < nd && i < MAXD; i++) begin
      if (d[i].k == DIG_POS) s += longint'(1) << (int'(d[i].a) + CF);
      if (d[i].k == DIG_NEG) s -= longint'(1) << (int'(d[i].a) + CF);
    end
    return s;
  endfunction

  // Random coefficient with |v| <= 2^14 (|A| <= 2), so every CSD digit has
  // an exponent of at most +1.
  function automatic int rand_coef();
    int v = int'($urandom_range(0, 1 << 15)) - (1 << 14);
    return v;
  endfunction

  function automatic int rand_sample();
    return int'($urandom_range(0, 65535)) - 32768;
  endfunction

  // Wrap to the 32-bit partial-sum width.
  function automatic int wrap32(input longint v);
    return int'(v);
  endfunction

endpackage
