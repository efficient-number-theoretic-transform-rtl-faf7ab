// tb_ref_pkg: reference arithmetic for the testbenches, written with plain
// integer modular arithmetic (no K-RED, no pre-scaled constants), following
// the Kyber reference NTT/INTT loops.
package tb_ref_pkg;
  localparam int QQ = 3329;
  typedef int poly_t [256];

  function automatic int md(input longint v);
    longint r = v % QQ;
    if (r < 0) r += QQ;
    return int'(r);
  endfunction

  function automatic int pw(input int b, input int e);
    longint r = 1;
    for (int i = 0; i < e; i++) r = (r * b) % QQ;
    return int'(r);
  endfunction

  function automatic int inv(input int x);
    return pw(md(x), QQ - 2);
  endfunction

  function automatic int brv7(input int k);
    int r = 0;
    for (int i = 0; i < 7; i++) if (k & (1 << i)) r |= 1 << (6 - i);
    return r;
  endfunction

  function automatic int kyber_zeta(input int k);
    return pw(17, brv7(k));
  endfunction

  // forward NTT, Kyber order, output reduced
  function automatic poly_t ntt(input poly_t a_in);
    poly_t r;
    int k = 1, z, t;
    for (int i = 0; i < 256; i++) r[i] = md(a_in[i]);
    for (int len = 128; len >= 2; len >>= 1)
      for (int s = 0; s < 256; s = s + 2 * len) begin
        z = kyber_zeta(k); k++;
        for (int j = s; j < s + len; j++) begin
          t = md(longint'(z) * r[j + len]);
          r[j + len] = md(r[j] - t);
          r[j] = md(r[j] + t);
        end
      end
    return r;
  endfunction

  // inverse NTT including the final 128^-1 scaling
  function automatic poly_t intt(input poly_t a_in);
    poly_t r;
    int k = 127, z, t;
    int f = inv(128);
    for (int i = 0; i < 256; i++) r[i] = md(a_in[i]);
    for (int len = 2; len <= 128; len <<= 1)
      for (int s = 0; s < 256; s = s + 2 * len) begin
        z = kyber_zeta(k); k--;
        for (int j = s; j < s + len; j++) begin
          t = r[j];
          r[j] = md(t + r[j + len]);
          r[j + len] = md(longint'(z) * md(r[j + len] - t));
        end
      end
    for (int i = 0; i < 256; i++) r[i] = md(longint'(r[i]) * f);
    return r;
  endfunction
endpackage
