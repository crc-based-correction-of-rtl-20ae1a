// crc_ecot_pkg -- shared constants and types of the CRC error corrector with an
// optimized lookup table (ECOT).
//
// The corrector works on the CRC syndrome s = e(x) mod g(x) of a received
// packet.  A table indexed by the syndrome holds, for every syndrome value, the
// position P1 of the lowest single error that produces it (or "none") and the
// "next" syndrome, i.e. the syndrome seen when a forced error position is moved
// one bit toward the MSB.  Walking this table lists every error pattern of up to
// N_MAX errors that matches the syndrome.
//
// Bit positions are polynomial degrees: position 0 is x^0, the last CRC bit on
// the line; a packet of L = m + n bits spans positions 0 .. L-1, with the
// payload in positions n .. L-1.
//
// The defaults are the CRC-16-CCITT generator g(x) = x^16 + x^12 + x^5 + 1 (the
// polynomial used for the timing evaluation), packets of up to 1500 payload
// bytes (the Ethernet MTU used for the memory evaluation) and up to three errors
// per packet (the design's own choice; the method is written for any N).
package crc_ecot_pkg;

  // Degree n of g(x), which is also the syndrome width.
  localparam int unsigned CRC_W_DEF = 16;
  // g(x) with its x^n term, bit i = coefficient of x^i.  CRC-16-CCITT.
  localparam logic [CRC_W_DEF:0] CRC_G_DEF = 17'h1_1021;
  // Width of a stored P1 entry; all ones stands for "no single error" (-1).
  localparam int unsigned P1_W_DEF = CRC_W_DEF;
  // Width of a bit position inside a packet.
  localparam int unsigned POS_W_DEF = 16;
  // Largest payload, in bits (1500 bytes).
  localparam int unsigned MAX_PAYLOAD_BITS_DEF = 12000;
  // Largest packet, payload plus CRC, in bits.
  localparam int unsigned L_MAX_DEF = MAX_PAYLOAD_BITS_DEF + CRC_W_DEF;
  // Largest number of errors searched for in one packet.
  localparam int unsigned N_MAX_DEF = 3;
  // Width of the candidate counters.
  localparam int unsigned CNT_W_DEF = 32;
  // Width of the checksum words (UDP / TCP one's-complement sum).
  localparam int unsigned CSUM_W = 16;

  // Outcome of one packet.
  typedef enum logic [2:0] {
    ST_NO_ERROR      = 3'd0,  // syndrome is zero
    ST_CORRECTED     = 3'd1,  // exactly one accepted candidate, packet fixed
    ST_AMBIGUOUS     = 3'd2,  // several accepted candidates, packet left as is
    ST_NO_CANDIDATE  = 3'd3,  // no pattern of up to N_MAX errors fits
    ST_TOO_LONG      = 3'd4   // packet longer than the buffer, not processed
  } ecot_status_e;

  // One's-complement (end-around carry) addition of two checksum words.
  function automatic logic [CSUM_W-1:0] ones_add(input logic [CSUM_W-1:0] a,
                                                 input logic [CSUM_W-1:0] b);
    logic [CSUM_W:0] t;
    t = {1'b0, a} + {1'b0, b};
    return t[CSUM_W-1:0] + {{(CSUM_W-1){1'b0}}, t[CSUM_W]};
  endfunction

endpackage
