// Reference model functions for the testbenches: the FLASH protection code,
// the address scattering and the test image contents, written
// independently of the RTL.
// The code itself (27-bit payload, zero-count checksum, parity word) is the
// published one; the bit order, XOR parity, scattering and test image
// generator mirror this design's choices but are written separately from
// the RTL.
package tb_ref_pkg;

  // Byte idx of the test image with the given seed.
  function automatic logic [7:0] img_byte(int seed, int idx);
    int v;
    v = idx * 37 + (idx >>> 8) * 11 + seed * 91 + 8'h5A;
    return 8'(v ^ (idx >>> 16));
  endfunction

  // One protected FLASH word from a 27-bit payload.
  function automatic logic [31:0] ref_word(logic [26:0] p);
    int z;
    z = 27 - $countones(p);
    return {p, 5'(z)};
  endfunction

  // The four FLASH words of a group of 81 bits; word k in bits 32k+31..32k.
  function automatic logic [127:0] ref_encode(logic [80:0] bits);
    logic [26:0] a, b, c;
    a = bits[26:0];
    b = bits[53:27];
    c = bits[80:54];
    return {ref_word(a ^ b ^ c), ref_word(c), ref_word(b), ref_word(a)};
  endfunction

  // 81 group bits of group g of an image: bytes 10g..10g+9, low first.
  // Bytes past the end of the image are FFh; the auxiliary bit is 0.
  function automatic logic [80:0] group_bits(int seed, int g, int nbytes);
    logic [80:0] r;
    r = '0;
    for (int i = 0; i < 10; i++)
      r[8*i +: 8] = (10 * g + i < nbytes) ? img_byte(seed, 10 * g + i) : 8'hFF;
    return r;
  endfunction

  // Logical <-> physical FLASH word address: low four bits reversed.
  function automatic int ref_scatter(int a);
    return (a & ~15) | ((a & 1) << 3) | ((a & 2) << 1) | ((a & 4) >> 1) | ((a & 8) >> 3);
  endfunction

endpackage
