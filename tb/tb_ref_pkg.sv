// tb_ref_pkg: reference models for the testbenches, written independently
// of the RTL (bit-serial CRC register, real-number floating point).
package tb_ref_pkg;
  // Bit-serial CRC: feed the 12 message bits MSB first into an 11-bit
  // shift register with feedback taps of x^11+x^9+x^7+x^6+x^5+x+1.
  function automatic logic [10:0] crc_ref(logic [11:0] m);
    logic [10:0] r;
    logic        fb;
    r = '0;
    for (int i = 11; i >= 0; i--) begin
      fb = m[i] ^ r[10];
      r  = {r[9:0], 1'b0};
      if (fb) r = r ^ 11'h2E3;   // low 11 bits of AE3h
    end
    return r;
  endfunction

  // Remainder of an arbitrary 23-bit word modulo g(x), by long division on
  // integers.
  function automatic logic [10:0] rem23_ref(logic [22:0] w);
    longint unsigned d;
    d = longint'(w);
    for (int b = 22; b >= 11; b--)
      if (((d >> b) & 1) != 0) d = d ^ (longint'(12'hAE3) << (b - 11));
    return d[10:0];
  endfunction

  // Number of subtractions the leading-one division needs.
  function automatic int subs_ref(logic [22:0] w);
    longint unsigned d;
    int n;
    d = longint'(w);
    n = 0;
    for (int b = 22; b >= 11; b--)
      if (((d >> b) & 1) != 0) begin
        d = d ^ (longint'(12'hAE3) << (b - 11));
        n++;
      end
    return n;
  endfunction

  function automatic logic [23:0] golay24_ref(logic [11:0] m);
    logic [22:0] c;
    c = {m, crc_ref(m)};
    return {c, ^c};
  endfunction

  // ---- floating point: {S, E[4:0], M[5:0]}, bias 15 ----
  function automatic real pow2(int e);
    real v;
    v = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++)  v = v * 2.0;
    else        for (int i = 0; i < -e; i++) v = v / 2.0;
    return v;
  endfunction

  function automatic real fp_to_real(logic [11:0] x);
    real v;
    if (x[10:6] == 0) return 0.0;
    v = (1.0 + real'(x[5:0]) / 64.0) * pow2(int'(x[10:6]) - 15);
    return x[11] ? -v : v;
  endfunction

  // Pack a real, truncating toward zero; underflow flushes to signed
  // zero, overflow saturates.
  function automatic logic [11:0] real_to_fp(real r);
    logic s;
    real  a, m;
    int   e;
    if (r == 0.0) return 12'h000;
    s = (r < 0.0);
    a = s ? -r : r;
    e = 15;
    while (a >= pow2(e - 14)) e++;
    while (a <  pow2(e - 15)) e--;
    if (e < 1)  return {s, 11'h000};
    if (e > 31) return {s, 5'd31, 6'h3F};
    m = (a / (pow2(e - 15)) - 1.0) * 64.0;
    return {s, 5'(e), 6'(int'($floor(m)))};
  endfunction
endpackage
