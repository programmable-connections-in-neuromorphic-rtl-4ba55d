// Shared constants, types and helper functions for the programmable grid relay.
//
// A packet is a sequence of 10-bit words. Bit 0 of every word is the tail
// bit: it is set only in the end-of-packet word. In the head word bits 9:2
// hold the relative chip address (two's complement), which each relay
// decrements. Row and column words carry a 9-bit address in bits 9:1.
// In the look-up byte read from the SRAM, bit 4 (K) says whether the packet
// is delivered to the local receiver and bits 3:2 (AP) are appended to every
// delivered word. These bit positions follow the packet format and the
// logic-analyser traces of the chip; the word and field widths are fixed by
// them. On the pads each word travels as five 1-of-4 sets (set 4 holds bits
// 9:8, set 0 holds bits 1:0).
package grid_pkg;

  localparam int unsigned WORD_W   = 10;  // bits per packet word
  localparam int unsigned SETS     = WORD_W / 2;  // 1-of-4 sets per word
  localparam int unsigned TAIL_BIT = 0;   // end-of-packet flag
  localparam int unsigned CHIP_LSB = 2;   // chip address field, bits 9:2
  localparam int unsigned CHIP_W   = 8;
  localparam int unsigned K_BIT    = 4;   // deliver flag in the look-up byte
  localparam int unsigned AP_LSB   = 2;   // appended bits, 3:2
  localparam int unsigned AP_W     = 2;
  localparam int unsigned LUT_DEPTH = 256;  // one entry per relative chip address
  localparam int unsigned LUT_W     = 16;   // SRAM word width

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [CHIP_W-1:0] chip_t;
  typedef logic [AP_W-1:0]   ap_t;

  // Word handed to the on-chip receiver: the packet word with AP appended.
  typedef struct packed {
    word_t w;
    ap_t   ap;
  } rcv_word_t;

  // One 1-of-4 set: exactly one wire high is a valid symbol, none high is neutral.
  typedef logic [3:0] q4_t;
  typedef q4_t [SETS-1:0] q4_word_t;

  function automatic logic is_tail(word_t w);
    return w[TAIL_BIT];
  endfunction

  function automatic chip_t chip_of(word_t w);
    return w[CHIP_LSB +: CHIP_W];
  endfunction

  // 00 -> 0001, 01 -> 0010, 10 -> 0100, 11 -> 1000
  function automatic q4_t enc_1of4(logic [1:0] b);
    return q4_t'(4'b0001 << b);
  endfunction

  function automatic logic [1:0] dec_1of4(q4_t q);
    logic [1:0] b;
    b[0] = q[1] | q[3];
    b[1] = q[2] | q[3];
    return b;
  endfunction

  function automatic q4_word_t enc_word(word_t w);
    q4_word_t q;
    for (int s = 0; s < int'(SETS); s++) q[s] = enc_1of4(w[2*s +: 2]);
    return q;
  endfunction

  function automatic word_t dec_word(q4_word_t q);
    word_t w;
    for (int s = 0; s < int'(SETS); s++) w[2*s +: 2] = dec_1of4(q[s]);
    return w;
  endfunction

endpackage
