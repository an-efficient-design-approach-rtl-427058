// gdht_pkg: shared elaboration-time helpers for the prime-length type-III
// generalized discrete Hartley transform (GDHT) array.
//
// The array never evaluates a trigonometric function or an index map at run
// time. Every coefficient and every permutation the datapath needs is a
// constant of the transform length N and of the primitive root G, and is
// produced here by constant functions when a module is elaborated:
//
//   phi_map(k)   = <G^k>_N                       (primitive-root index map)
//   psi_map(k)   = phi_map(k)        if phi_map(k) <= (N-1)/2
//                = phi_map(k+(N-1)/2) otherwise   (lower half of the pair)
//   phib_map(k)  = the other member of the pair, N - psi_map(k)
//   zeta_map(k)  = <2k>_N
//   cos_q(m)     = round(cos(m*pi/N) * 2^FB), and sin_q likewise
//
// Coefficients are signed fixed-point numbers with FB fraction bits; the
// word length and FB are this design's choice (the transform itself fixes
// no arithmetic precision).
package gdht_pkg;

  // <g^k>_n by repeated multiplication (k >= 0).
  function automatic int unsigned pow_mod(int unsigned g, int unsigned k, int unsigned n);
    int unsigned r;
    r = 1 % n;
    for (int unsigned i = 0; i < k; i++) r = (r * g) % n;
    return r;
  endfunction

  function automatic int unsigned phi_map(int unsigned k, int unsigned n, int unsigned g);
    return pow_mod(g, k, n);
  endfunction

  // Member of the index pair {j, N-j} that lies in 1..(N-1)/2.
  function automatic int unsigned psi_map(int unsigned k, int unsigned n, int unsigned g);
    int unsigned h;
    h = (n - 1) / 2;
    if (phi_map(k, n, g) <= h) return phi_map(k, n, g);
    else                       return phi_map(k + h, n, g);
  endfunction

  // Member of the index pair {j, N-j} that lies in (N+1)/2..N-1.
  function automatic int unsigned phib_map(int unsigned k, int unsigned n, int unsigned g);
    int unsigned h;
    h = (n - 1) / 2;
    if (phi_map(k, n, g) > h) return phi_map(k, n, g);
    else                      return phi_map(k + h, n, g);
  endfunction

  function automatic int unsigned zeta_map(int unsigned k, int unsigned n);
    return (2 * k) % n;
  endfunction

  // 1 when n is an odd prime and g generates all of 1..n-1 modulo n.
  function automatic bit valid_length(int unsigned n, int unsigned g);
    if (n < 3 || n % 2 == 0) return 1'b0;
    for (int unsigned d = 3; d * d <= n; d += 2) if (n % d == 0) return 1'b0;
    for (int unsigned k = 1; k < n; k++) begin
      if (pow_mod(g, k, n) == 1 && k != n - 1) return 1'b0;
    end
    return 1'b1;
  endfunction

  // round(cos(m*pi/n) * 2^fb)
  function automatic int cos_q(int unsigned m, int unsigned n, int unsigned fb);
    real ang;
    ang = 3.14159265358979323846 * real'(m) / real'(n);
    return int'($cos(ang) * real'(longint'(1) << fb));
  endfunction

  // round(sin(m*pi/n) * 2^fb)
  function automatic int sin_q(int unsigned m, int unsigned n, int unsigned fb);
    real ang;
    ang = 3.14159265358979323846 * real'(m) / real'(n);
    return int'($sin(ang) * real'(longint'(1) << fb));
  endfunction

endpackage
