// Shared constants and functions of the RPC Link Box Control System.
//
// The FLASH protection code: every 32-bit FLASH word carries 27 payload bits
// in bits 31..5 and, in bits 4..0, the number of zero bits in that payload.
// Radiation almost only turns a programmed 0 into a 1, so any such flip
// lowers the zero count and the word no longer matches its checksum. Three
// data words and one parity word (XOR of the three payloads) form a group of
// four FLASH words holding 81 usable bits: five 16-bit words plus one
// auxiliary bit. The layout follows the published code; the bit order inside
// a group and the parity rule (plain XOR) are this design's choice.
package rlbcs_pkg;

  localparam int unsigned FLASH_DW    = 32;  // FLASH word width
  localparam int unsigned PAYLOAD_W   = 27;  // usable bits per FLASH word
  localparam int unsigned CSUM_W      = 5;   // zero-count checksum width
  localparam int unsigned GROUP_WORDS = 4;   // 3 data words + 1 parity word
  localparam int unsigned GROUP_BITS  = 81;  // 3 * 27 usable bits
  localparam int unsigned GROUP_BYTES = 10;  // 5 16-bit words

  typedef logic [PAYLOAD_W-1:0] payload_t;
  typedef logic [CSUM_W-1:0]    csum_t;

  typedef struct packed {
    payload_t payload;  // bits 31..5
    csum_t    csum;     // bits 4..0: number of zeros in payload
  } flash_word_t;

  // A decoded group: five 16-bit words (word k = bits 16k+15..16k) and aux.
  typedef struct packed {
    logic        aux;
    logic [79:0] data;
  } group_t;

  // Number of zero bits in a payload.
  function automatic csum_t count_zeros(payload_t p);
    csum_t n = '0;
    for (int i = 0; i < PAYLOAD_W; i++) n += csum_t'(!p[i]);
    return n;
  endfunction

  function automatic flash_word_t make_word(payload_t p);
    flash_word_t w;
    w.payload = p;
    w.csum    = count_zeros(p);
    return w;
  endfunction

  // Address scattering: the four words of a group, and neighbouring groups,
  // are spread over the FLASH by reversing the lowest SCATTER_BITS bits of
  // the logical word address. The upper bits pass unchanged, so a logical
  // sector stays one physical sector and can be erased on its own. Swapping
  // low address bits while keeping the high ones is the published idea;
  // bit reversal of the 4 lowest bits is this design's choice. The map is
  // its own inverse, so the same function serves reading and writing.
  localparam int unsigned SCATTER_BITS = 4;

  function automatic logic [31:0] scatter_addr(logic [31:0] logical);
    logic [31:0] physical = logical;
    for (int i = 0; i < SCATTER_BITS; i++) physical[i] = logical[SCATTER_BITS-1-i];
    return physical;
  endfunction

endpackage
