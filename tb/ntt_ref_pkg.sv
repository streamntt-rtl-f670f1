// ntt_ref_pkg: reference arithmetic for the testbenches, written directly
// from the definition of the negacyclic NTT and independent of the RTL.
//   A_k = sum_{j<n} a_j * psi^(j*(2k+1)) mod q
// The hardware emits A in bit-reversed order, so result position p is
// expected to hold A_bitrev(p).
package ntt_ref_pkg;
  // Default modulus and a primitive 2048-th root of unity modulo it; a
  // primitive 2n-th root for a smaller n is psi_1024^(1024/n).
  localparam longint unsigned QREF      = 64'd3221225473;
  localparam longint unsigned PSI1024   = 64'd1168849724;

  function automatic longint unsigned mm(longint unsigned a, longint unsigned b,
                                         longint unsigned q);
    return (a * b) % q;
  endfunction

  function automatic longint unsigned pw(longint unsigned b, longint unsigned e,
                                         longint unsigned q);
    longint unsigned r = 1;
    for (longint unsigned i = 0; i < e; i++) r = mm(r, b, q);
    return r;
  endfunction

  function automatic int unsigned brv(int unsigned v, int unsigned bits);
    int unsigned r = 0;
    for (int unsigned i = 0; i < bits; i++) if (v & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  // Direct O(n^2) transform; res[p] = A_bitrev(p).
  function automatic void ntt_direct(input longint unsigned a[], input longint unsigned psi,
                                     input longint unsigned q, output longint unsigned res[]);
    int unsigned n = a.size();
    int unsigned lg = $clog2(n);
    longint unsigned pp[];       // psi^e for e < 2n
    pp = new[2 * n];
    pp[0] = 1;
    for (int unsigned e = 1; e < 2 * n; e++) pp[e] = mm(pp[e-1], psi, q);
    res = new[n];
    for (int unsigned p = 0; p < n; p++) begin
      int unsigned k = brv(p, lg);
      longint unsigned acc = 0;
      for (int unsigned j = 0; j < n; j++)
        acc = (acc + mm(a[j], pp[(j * (2 * k + 1)) % (2 * n)], q)) % q;
      res[p] = acc;
    end
  endfunction

  // Twiddle of stage s, stride group k (merged negacyclic Cooley-Tukey form):
  // psi^bitrev(2^s + k) over log2(n) bits.
  function automatic longint unsigned tw_ref(int unsigned s, int unsigned k, int unsigned n,
                                             longint unsigned psi, longint unsigned q);
    return pw(psi, brv((1 << s) + k, $clog2(n)), q);
  endfunction

  // One butterfly stage s in place on the whole coefficient array.
  function automatic void ct_stage(ref longint unsigned a[], input int unsigned s,
                                   input longint unsigned psi, input longint unsigned q);
    int unsigned n = a.size();
    int unsigned str = n >> (s + 1);
    for (int unsigned k = 0; k < (n / (2 * str)); k++) begin
      longint unsigned w = tw_ref(s, k, n, psi, q);
      for (int unsigned j = 0; j < str; j++) begin
        int unsigned lo = k * 2 * str + j;
        longint unsigned t = mm(w, a[lo + str], q);
        longint unsigned u = a[lo];
        a[lo]       = (u + t) % q;
        a[lo + str] = (u + q - t) % q;
      end
    end
  endfunction
endpackage
