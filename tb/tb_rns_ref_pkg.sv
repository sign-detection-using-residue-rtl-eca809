// tb_rns_ref_pkg: reference arithmetic for the sign-detector testbenches.
// Works on plain 128-bit integers, independent of the RTL's carry-save and
// prefix structure: the dynamic range M = (2^(n+1)-1)(2^n-1)2^n, residues by
// the % operator, the sign as X >= M/2 and the most significant mixed-radix
// digit as X / ((2^(n+1)-1)(2^n-1)).
package tb_rns_ref_pkg;

  typedef logic [127:0] u128_t;

  function automatic u128_t m1_of(int n); return (u128_t'(1) << (n + 1)) - 1; endfunction
  function automatic u128_t m2_of(int n); return (u128_t'(1) << n) - 1;       endfunction
  function automatic u128_t m3_of(int n); return u128_t'(1) << n;             endfunction
  function automatic u128_t range_of(int n); return m1_of(n) * m2_of(n) * m3_of(n); endfunction

  // Uniform-enough random integer in [0, M).
  function automatic u128_t rand_x(int n);
    u128_t r;
    r = {$urandom, $urandom, $urandom, $urandom};
    return r % range_of(n);
  endfunction

  function automatic logic ref_sign(int n, u128_t x);
    return x >= (range_of(n) >> 1);
  endfunction

  function automatic u128_t ref_digit(int n, u128_t x);
    return x / (m1_of(n) * m2_of(n));
  endfunction

endpackage
