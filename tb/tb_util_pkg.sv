// Reference arithmetic for the testbenches: conversions between integers and
// BCD-8421 / BCD-4221 digit vectors and random operand generation.  Values
// are at most 128 bits (a 32-digit decimal product fits).
package tb_util_pkg;
  typedef logic [127:0] u128_t;

  // integer value of the low nd BCD-8421 digits of v
  function automatic u128_t bcd2int(u128_t v, int nd);
    u128_t r = 0;
    for (int k = nd - 1; k >= 0; k--) r = r * 10 + u128_t'(v[4*k +: 4]);
    return r;
  endfunction

  // nd BCD-8421 digits of x modulo 10^nd
  function automatic u128_t int2bcd(u128_t x, int nd);
    u128_t r = 0;
    for (int k = 0; k < nd; k++) begin
      r[4*k +: 4] = 4'(x % 10);
      x = x / 10;
    end
    return r;
  endfunction

  // integer value of the low nd BCD-4221 digits of v
  function automatic u128_t val4221(u128_t v, int nd);
    u128_t r = 0;
    for (int k = nd - 1; k >= 0; k--)
      r = r * 10 + u128_t'(4 * v[4*k+3] + 2 * v[4*k+2] + 2 * v[4*k+1] + v[4*k]);
    return r;
  endfunction

  // random BCD-8421 digit vector; with "heavy" set, digits are mostly 7..9
  function automatic u128_t rand_bcd(int nd, bit heavy = 0);
    u128_t r = 0;
    for (int k = 0; k < nd; k++)
      r[4*k +: 4] = heavy ? 4'(7 + $urandom_range(0, 2)) : 4'($urandom_range(0, 9));
    return r;
  endfunction

  // random BCD-4221 digit vector (any code is a valid digit)
  function automatic u128_t rand_4221(int nd);
    u128_t r = 0;
    for (int k = 0; k < nd; k++) r[4*k +: 4] = 4'($urandom_range(0, 15));
    return r;
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction
endpackage
