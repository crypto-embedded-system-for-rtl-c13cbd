// Reference big-number arithmetic for the testbenches.
//
// Plain shift-and-add modular arithmetic on numbers of up to 1024 bits,
// deliberately unlike the Montgomery method of the design, so that its
// results check the hardware independently. Also random operand generators
// built from $urandom.
package tb_bignum_pkg;

  localparam int unsigned BW = 1040;     // room for 1024-bit values plus carries
  typedef logic [BW-1:0] big_t;

  // (a + b) mod m for a, b < m
  function automatic big_t addmod(big_t a, big_t b, big_t m);
    big_t s = a + b;
    return (s >= m) ? s - m : s;
  endfunction

  // a * b mod m by double-and-add over the bits of b (a < m)
  function automatic big_t mulmod(big_t a, big_t b, big_t m);
    big_t acc = '0;
    int   top = -1;
    for (int i = BW - 1; i >= 0; i--) if (b[i]) begin top = i; break; end
    for (int i = top; i >= 0; i--) begin
      acc = addmod(acc, acc, m);
      if (b[i]) acc = addmod(acc, a, m);
    end
    return acc;
  endfunction

  // x^e mod m by square-and-multiply (x < m)
  function automatic big_t powmod(big_t x, big_t e, big_t m);
    big_t acc = (m == 1) ? '0 : big_t'(1);
    int   top = -1;
    for (int i = BW - 1; i >= 0; i--) if (e[i]) begin top = i; break; end
    for (int i = top; i >= 0; i--) begin
      acc = mulmod(acc, acc, m);
      if (e[i]) acc = mulmod(acc, x, m);
    end
    return acc;
  endfunction

  // 2^k mod m
  function automatic big_t pow2mod(int k, big_t m);
    big_t acc = (m == 1) ? '0 : big_t'(1);
    for (int i = 0; i < k; i++) acc = addmod(acc, acc, m);
    return acc;
  endfunction

  // Random number of exactly `bits` bits (top bit set).
  function automatic big_t rand_bits(int bits);
    big_t v = '0;
    for (int i = 0; i < bits; i += 32) v[i +: 32] = $urandom;
    v &= (big_t'(1) << bits) - 1;
    v[bits-1] = 1'b1;
    return v;
  endfunction

  // Random odd modulus of `bits` bits.
  function automatic big_t rand_modulus(int bits);
    big_t v = rand_bits(bits);
    v[0] = 1'b1;
    return v;
  endfunction

  // Random value below m.
  function automatic big_t rand_below(big_t m, int bits);
    big_t v = '0;
    for (int i = 0; i < bits; i += 32) v[i +: 32] = $urandom;
    v &= (big_t'(1) << bits) - 1;
    while (v >= m) v = v - m;
    return v;
  endfunction

endpackage
