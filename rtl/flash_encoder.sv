// FLASH group encoder.
//
// Packs 80 data bits (five 16-bit words, word k in bits 16k+15..16k) and one
// auxiliary bit into four protected 32-bit FLASH words: words 0..2 carry
// group bits 0..26, 27..53 and 54..80 in their bits 31..5, word 3 carries
// the XOR of the three payloads, and every word holds the number of zeros
// of its own payload in bits 4..0. The word layout and checksum follow the
// published code; the XOR parity and the bit order are this design's.
//
// Purely combinational.
module flash_encoder
  import rlbcs_pkg::*;
(
  input  logic [79:0]      data,
  input  logic             aux,
  output flash_word_t [GROUP_WORDS-1:0] words
);
  logic [GROUP_BITS-1:0] bits;
  payload_t              p0, p1, p2;

  always_comb begin
    bits = {aux, data};
    p0 = bits[26:0];
    p1 = bits[53:27];
    p2 = bits[80:54];
    words[0] = make_word(p0);
    words[1] = make_word(p1);
    words[2] = make_word(p2);
    words[3] = make_word(p0 ^ p1 ^ p2);
  end
endmodule
