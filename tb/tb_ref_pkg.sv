// tb_ref_pkg: reference models used by the testbenches, written with plain
// integer arithmetic and independently of the RTL structure.
package tb_ref_pkg;

  // position of the most significant one (x > 0)
  function automatic int msb(input longint unsigned x);
    int k = 0;
    for (int i = 0; i < 64; i++) if (x >= (64'd1 << i)) k = i;
    return k;
  endfunction

  // round a value to the nearest power of two, ties of the form 1.5*2^k
  // going up; zero stays zero
  function automatic longint unsigned round_pow2(input longint unsigned x);
    int k;
    if (x == 0) return 0;
    k = msb(x);
    if (k >= 1 && x >= (longint'(3) << (k - 1))) return 64'd1 << (k + 1);
    return 64'd1 << k;
  endfunction

  // compensated logarithmic product:
  // 2^(k1+k2) + round(max(qa,qb)) * min(qa,qb) + qa*2^k2 + qb*2^k1
  function automatic longint unsigned log_ref(input longint unsigned a,
                                              input longint unsigned b,
                                              input bit compensate = 1'b1);
    int k1, k2;
    longint unsigned qa, qb, hi, lo, r;
    if (a == 0 || b == 0) return 0;
    k1 = msb(a);
    k2 = msb(b);
    qa = a - (64'd1 << k1);
    qb = b - (64'd1 << k2);
    hi = (qa > qb) ? qa : qb;
    lo = (qa > qb) ? qb : qa;
    r  = compensate ? round_pow2(hi) * lo : 0;
    return (64'd1 << (k1 + k2)) + r + (qa << k2) + (qb << k1);
  endfunction

endpackage
