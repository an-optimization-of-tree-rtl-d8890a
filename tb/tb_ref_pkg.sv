// tb_ref_pkg: reference arithmetic for the TRSA testbenches.
//
// Everything here is plain wide-integer arithmetic on RW-bit numbers (the
// product uses 2*RW bits and the '%' operator), written independently of the
// RTL's bit-serial MulMod, so the testbenches can compare against it. Keys
// narrower than RW bits are zero-extended.
package tb_ref_pkg;

  localparam int unsigned RW = 1024;
  typedef logic [RW-1:0]   word_t;
  typedef logic [2*RW-1:0] dword_t;

  function automatic word_t ref_mulmod(word_t a, word_t b, word_t n);
    dword_t p;
    p = dword_t'(a) * dword_t'(b);
    return word_t'(p % dword_t'(n));
  endfunction

  // Right-to-left binary exponentiation (a different order from the RTL).
  function automatic word_t ref_modexp(word_t m, word_t e, word_t n);
    word_t r, base;
    r    = word_t'(1) % n;
    base = m % n;
    while (e != '0) begin
      if (e[0]) r = ref_mulmod(r, base, n);
      base = ref_mulmod(base, base, n);
      e = e >> 1;
    end
    return r;
  endfunction

  // Random number of exactly 'bits' bits (the top bit may be 0).
  function automatic word_t rand_bits(int unsigned bits);
    word_t v;
    for (int i = 0; i < RW / 32; i++) v[32*i +: 32] = $urandom;
    if (bits < RW) v &= (word_t'(1) << bits) - 1;
    return v;
  endfunction

  // Random modulus of 'bits' bits with the top bit set and greater than 1.
  function automatic word_t rand_modulus(int unsigned bits);
    word_t v;
    v = rand_bits(bits);
    v[bits-1] = 1'b1;
    v[0]      = 1'b1;
    return v;
  endfunction

  // Random value below n.
  function automatic word_t rand_below(word_t n, int unsigned bits);
    return rand_bits(bits) % n;
  endfunction

endpackage
