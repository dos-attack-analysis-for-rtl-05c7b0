// hhips_pkg: types and widths shared by the DoS analysis unit.
//
// The unit works on 48-bit words that pair a sender IPv4 address with a
// data length. The word layout puts the address in bits 47:16 and the
// length in bits 15:0, so the packet 10.0.0.2 / 200 bytes is the word
// 0A000002_00C8. The 48-bit word size and the 32/16 split of its fields
// follow the design's structure diagram; the field order follows the RAM
// contents shown in its simulation trace.
package hhips_pkg;

  localparam int unsigned IP_W  = 32;  // sender IP address
  localparam int unsigned LEN_W = 16;  // data length in bytes

  typedef logic [IP_W-1:0]  ip_t;
  typedef logic [LEN_W-1:0] len_t;

  // One RAM1 / RAM2 word: {IP address, data length}.
  typedef struct packed {
    ip_t  ip;
    len_t len;
  } entry_t;

  // Saturating add of two lengths: a sum never wraps back to a small value.
  function automatic len_t sat_add(len_t a, len_t b);
    logic [LEN_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[LEN_W] ? '1 : s[LEN_W-1:0];
  endfunction

endpackage
