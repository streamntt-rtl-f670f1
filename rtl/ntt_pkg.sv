// ntt_pkg: constants and elaboration-time helper functions shared by the
// streaming NTT modules.
//
// The twiddle factors of the merged negacyclic Cooley-Tukey NTT are computed
// here at elaboration time, so no table file is needed: the butterfly of stage
// s that belongs to stride group b uses psi^bitrev(2^s + b), where psi is a
// primitive 2n-th root of unity modulo q and bitrev reverses log2(n) bits.
// With this choice the transform of a(x) is
//   A_k = sum_j a_j * psi^((2k+1) j)  (mod q),
// delivered in bit-reversed order (result position p holds A_bitrev(p)).
// All arithmetic in the functions is 64-bit, which covers moduli below 2^32
// (the widest modulus evaluated for this design has 32 bits).
package ntt_pkg;

  // Default configuration: n = 1024, q = 3221225473 (3*2^30 + 1).
  localparam int unsigned          N_DEFAULT   = 1024;
  localparam longint unsigned      Q_DEFAULT   = 64'd3221225473;
  localparam int unsigned          W_DEFAULT   = 32;
  // A primitive 2048-th root of unity modulo 3221225473.
  localparam longint unsigned      PSI_DEFAULT = 64'd1168849724;

  // (a * b) mod q for a, b < q < 2^32.
  function automatic longint unsigned mulmod(longint unsigned a, longint unsigned b,
                                             longint unsigned q);
    return (a * b) % q;
  endfunction

  // base^e mod q by square and multiply.
  function automatic longint unsigned powmod(longint unsigned base, longint unsigned e,
                                             longint unsigned q);
    longint unsigned r, b, x;
    r = 1; b = base % q; x = e;
    while (x != 0) begin
      if (x[0]) r = mulmod(r, b, q);
      b = mulmod(b, b, q);
      x = x >> 1;
    end
    return r;
  endfunction

  // Reverse the low 'bits' bits of v.
  function automatic int unsigned bitrev(int unsigned v, int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  // Twiddle of stage s (0-based), stride group b, transform size n.
  function automatic longint unsigned twiddle(int unsigned s, int unsigned b, int unsigned n,
                                              longint unsigned psi, longint unsigned q);
    return powmod(psi, longint'(bitrev((1 << s) + b, $clog2(n))), q);
  endfunction

endpackage
