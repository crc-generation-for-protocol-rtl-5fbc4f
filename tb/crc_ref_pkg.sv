// crc_ref_pkg: bit-serial CRC reference model shared by the testbenches.
//
// The model is the textbook one-bit-per-step division register written
// directly from the definition of the CRC remainder: shift left by one, and
// if the bit shifted out XOR the data bit is 1, subtract (XOR) the generator
// polynomial. Values are right-justified, n is the degree (1..32) and poly
// holds x^(n-1)..x^0 (the x^n term is implicit). It shares no code with the
// radix-16 hardware, which consumes four bits per step.
package crc_ref_pkg;

  function automatic logic [31:0] ref_mask(int n);
    return (n >= 32) ? 32'hFFFF_FFFF : ((32'd1 << n) - 32'd1);
  endfunction

  // One serial step with data bit b.
  function automatic logic [31:0] ref_bit(logic [31:0] c, logic [31:0] poly,
                                          int n, logic b);
    logic fbit;
    fbit = c[n-1] ^ b;
    c    = c << 1;
    if (fbit) c = c ^ poly;
    return c & ref_mask(n);
  endfunction

  // Four serial steps, nib[3] first.
  function automatic logic [31:0] ref_nibble(logic [31:0] c, logic [31:0] poly,
                                             int n, logic [3:0] nib);
    for (int i = 3; i >= 0; i--) c = ref_bit(c, poly, n, nib[i]);
    return c;
  endfunction

  // Bit reversal of an n-bit value, for reflected CRCs such as Ethernet's.
  function automatic logic [31:0] ref_reflect(logic [31:0] v, int n);
    logic [31:0] r;
    r = '0;
    for (int i = 0; i < n; i++) r[n-1-i] = v[i];
    return r;
  endfunction

endpackage
