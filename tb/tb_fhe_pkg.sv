// tb_fhe_pkg: reference arithmetic for the testbenches, written independently
// of the RTL: modular operations on 64-bit integers, the 512-point negacyclic
// NTT/INTT (textbook Cooley-Tukey / Gentleman-Sande loops over a flat array),
// schoolbook negacyclic multiplication and the twiddle tables.
// The test modulus is q = 3*2^30 + 1 (prime, 1024 divides q-1) with
// psi = 5^((q-1)/1024), a primitive 1024-th root of unity.
package tb_fhe_pkg;
  localparam longint unsigned Q   = 64'd3221225473;
  localparam int               N   = 512;

  function automatic longint unsigned madd(longint unsigned a, longint unsigned b, longint unsigned m);
    return (a + b) % m;
  endfunction
  function automatic longint unsigned msub(longint unsigned a, longint unsigned b, longint unsigned m);
    return (a + m - b) % m;
  endfunction
  function automatic longint unsigned mmul(longint unsigned a, longint unsigned b, longint unsigned m);
    return (a * b) % m;
  endfunction
  function automatic longint unsigned mpow(longint unsigned b, longint unsigned e, longint unsigned m);
    longint unsigned r = 1;
    b = b % m;
    while (e != 0) begin
      if (e[0]) r = mmul(r, b, m);
      b = mmul(b, b, m);
      e = e >> 1;
    end
    return r;
  endfunction
  function automatic int bitrev9(int k);
    int r = 0;
    for (int i = 0; i < 9; i++) r |= ((k >> i) & 1) << (8 - i);
    return r;
  endfunction
  function automatic longint unsigned psi();
    return mpow(5, (Q - 1) / 1024, Q);
  endfunction
  function automatic longint unsigned zeta(int k);     // psi^bitrev(k)
    return mpow(psi(), longint'(bitrev9(k)), Q);
  endfunction
  function automatic longint unsigned zinv(int k);     // psi^-bitrev(k)
    return mpow(psi(), longint'((1024 - bitrev9(k)) % 1024), Q);
  endfunction
  function automatic longint unsigned ninv();
    return mpow(N, Q - 2, Q);
  endfunction

  typedef longint unsigned poly_t [N];

  function automatic void ref_ntt(ref poly_t a);
    int k = 1;
    for (int len = N/2; len >= 1; len /= 2)
      for (int st = 0; st < N; st += 2*len) begin
        longint unsigned z = zeta(k++);
        for (int j = st; j < st + len; j++) begin
          longint unsigned t = mmul(z, a[j+len], Q);
          a[j+len] = msub(a[j], t, Q);
          a[j]     = madd(a[j], t, Q);
        end
      end
  endfunction

  function automatic void ref_negmul(const ref poly_t a, const ref poly_t b, ref poly_t c);
    for (int i = 0; i < N; i++) c[i] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        longint unsigned p = mmul(a[i], b[j], Q);
        if (i + j < N) c[i+j] = madd(c[i+j], p, Q);
        else           c[i+j-N] = msub(c[i+j-N], p, Q);
      end
  endfunction

  function automatic longint unsigned rnd();
    return ((longint'($urandom) << 32) | longint'($urandom)) % Q;
  endfunction
endpackage
