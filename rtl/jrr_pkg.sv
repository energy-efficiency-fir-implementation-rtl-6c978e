// jrr_pkg: constants and elaboration-time helpers shared by the JRR RNS FIR
// filter.
//
// The residue number system uses the four moduli
//   m1 = 2^n - 1, m2 = 2^n, m3 = 2^n + 1, m4 = 2^(n+1) + 1   (M4_PLUS = 1)
//                                          m4 = 2^(n+1) - 1   (M4_PLUS = 0)
// The first three form the "first level" of the reverse converter (their
// product M1 = 2^n (2^2n - 1)); the fourth is added in the second level.
// With n = 7 and M4_PLUS = 1 the set is {127, 128, 129, 257}, whose product
// M = 538 935 168 is just above 2^29. M4_PLUS = 0 gives the set with
// 2^(n+1) - 1, which is pairwise prime only for even n (for odd n both
// 2^n + 1 and 2^(n+1) - 1 are divisible by 3); M4_PLUS = 1 is pairwise prime
// only for odd n. Modules check this at elaboration.
//
// All functions are constant functions used to derive localparams.
package jrr_pkg;

  // Modulus number idx (1..4) of the set for a given n.
  function automatic longint unsigned modulus(int n, int idx, bit m4_plus);
    case (idx)
      1:       return (64'd1 << n) - 64'd1;
      2:       return (64'd1 << n);
      3:       return (64'd1 << n) + 64'd1;
      default: return m4_plus ? (64'd1 << (n + 1)) + 64'd1 : (64'd1 << (n + 1)) - 64'd1;
    endcase
  endfunction

  // Bits needed to hold any residue 0 .. m-1.
  function automatic int res_width(longint unsigned m);
    return $clog2(m);
  endfunction

  // First-level range M1 = m1 * m2 * m3.
  function automatic longint unsigned range1(int n, bit m4_plus);
    return modulus(n, 1, m4_plus) * modulus(n, 2, m4_plus) * modulus(n, 3, m4_plus);
  endfunction

  // Dynamic range M = m1 * m2 * m3 * m4.
  function automatic longint unsigned range_all(int n, bit m4_plus);
    return range1(n, m4_plus) * modulus(n, 4, m4_plus);
  endfunction

  function automatic longint unsigned gcd(longint unsigned a, longint unsigned b);
    longint unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // True when the four moduli are pairwise relatively prime.
  function automatic bit moduli_coprime(int n, bit m4_plus);
    for (int i = 1; i <= 4; i++)
      for (int j = i + 1; j <= 4; j++)
        if (gcd(modulus(n, i, m4_plus), modulus(n, j, m4_plus)) != 1) return 1'b0;
    return 1'b1;
  endfunction

  // Multiplicative inverse of a modulo m (a and m relatively prime), found by
  // the extended Euclidean algorithm.
  function automatic longint unsigned mod_inv(longint unsigned a, longint unsigned m);
    longint r0, r1, t0, t1, q, tmp;
    r0 = longint'(m);
    r1 = longint'(a % m);
    t0 = 0;
    t1 = 1;
    while (r1 != 0) begin
      q   = r0 / r1;
      tmp = r0 - q * r1; r0 = r1; r1 = tmp;
      tmp = t0 - q * t1; t0 = t1; t1 = tmp;
    end
    if (t0 < 0) t0 = t0 + longint'(m);
    return unsigned'(t0);
  endfunction

endpackage
