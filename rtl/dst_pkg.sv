// dst_pkg: constants and elaboration-time functions shared by the prime-length
// DST datapath.
//
// The 1-D DST handled here is
//   Y(k) = sum_{i=0}^{N-1} x(i) sin((2i+1) k pi / (2N)),  k = 1..N,
// with N an odd prime. Coefficient k = N is produced under index 0, so an
// output row is Y(0)=Y(N), Y(1), ..., Y(N-1).
//
// The auxiliary sequence x_a(i) = sum_{m>=i} (-1)^m x(m) turns the transform
// into Y(k) = x_a(0) sin(k pi/2N) + 2 cos(k pi/2N) T(k) with
//   T(k) = sum_{i=1}^{N-1} (-1)^i x_a(i) sin(i k pi / N).
// With M = (N-1)/2 and a primitive root g of N, let e(p) be the even one of
// {g^p mod N, N - g^p mod N} (e(p+M) = e(p)). Pairing i with N-i gives two
// pseudo-cyclic convolutions of length M that share one set of constants
// C(p) = sin(e(p) pi / N):
//   T(e(j))     =  sum_l sigma(l,j) C((l+j) mod M) A(l),  A(l) = x_a(e(l)) + x_a(N-e(l))
//   T(N - e(j)) = -sum_l sigma(l,j) C((l+j) mod M) B(l),  B(l) = x_a(e(l)) - x_a(N-e(l))
// where sigma(l,j) = +1 when e(l)e(j) mod 2N < N and -1 otherwise. For N = 7,
// g = 3 the index maps are e = (6,4,2), i.e. xi: 1->4, 2->2, 3->6 and
// zeta = N - xi: 1->3, 2->5, 3->1.
//
// Every function here is evaluated at elaboration only (parameters, constant
// tables); nothing in this package becomes logic by itself.
package dst_pkg;

  localparam real PI = 3.14159265358979323846;

  // g^p mod n, p >= 0
  function automatic int pow_mod(int g, int p, int n);
    int r;
    r = 1;
    for (int i = 0; i < p; i++) r = (r * g) % n;
    return r;
  endfunction

  // 1 when g generates the multiplicative group modulo the prime n
  function automatic bit is_primitive(int g, int n);
    int r;
    r = 1;
    for (int i = 1; i < n - 1; i++) begin
      r = (r * g) % n;
      if (r == 1) return 1'b0;
    end
    return 1'b1;
  endfunction

  // e(p): the even representative of {g^p mod n, n - g^p mod n}
  function automatic int e_idx(int g, int p, int n);
    int r;
    r = pow_mod(g, p, n);
    return (r % 2 == 0) ? r : n - r;
  endfunction

  // Sign of sin(pi * e(l) * e(j) / n) relative to C((l+j) mod M): 1 means negative
  function automatic bit sigma_neg(int g, int l, int j, int n);
    int m;
    m = (e_idx(g, l, n) * e_idx(g, j, n)) % (2 * n);
    return (m > n) ? 1'b1 : 1'b0;
  endfunction

  // round(v * 2^f), rounding halves away from zero
  function automatic int quant(real v, int f);
    real r;
    r = v * (2.0 ** f);
    if (r >= 0.0) return int'($floor(r + 0.5));
    return -int'($floor(-r + 0.5));
  endfunction

  // Kernel constant of PE p: round(sin(e(p) pi / n) * 2^f)
  function automatic int pe_const(int g, int p, int n, int f);
    return quant($sin(PI * e_idx(g, p, n) / n), f);
  endfunction

  // Post-processing constants: round(sin(k pi / 2n) 2^f), round(cos(k pi / 2n) 2^f)
  function automatic int post_sin(int k, int n, int f);
    return quant($sin(PI * k / (2.0 * n)), f);
  endfunction

  function automatic int post_cos(int k, int n, int f);
    return quant($cos(PI * k / (2.0 * n)), f);
  endfunction

endpackage
