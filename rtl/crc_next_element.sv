// crc_next_element -- the "next" syndrome of a syndrome (combinational).
//
// When an error is forced at some position F and the n-bit window above F is
// the syndrome s, moving the forced error to F+1 gives a new window, the next
// element.  Two steps do it:
//   1. t = [((s << 1) XOR 1) XOR g] >> 1 : the old forced bit is put back below
//      the window and cancelled with g; bit 0 of t is now position F+1.
//   2. if t[0] = 1 the new position is already 1 and next = t >> 1; otherwise
//      g is added once more at F+1 to set it, and next = (t XOR g) >> 1.
// The forced bit itself is never part of the result, it is implicit.
//
// Interface: s in, nxt out, no clock.  G is g(x) including its x^n term; the
// method needs g0 = gn = 1.  The two steps follow the published flowchart; the
// module form is this design's.
// Lint note: bit 0 of each intermediate XOR is shifted out (it is 0 by
// construction), so verilator reports it unused.
module crc_next_element #(
  parameter int unsigned         CRC_W = crc_ecot_pkg::CRC_W_DEF,
  parameter logic [CRC_W:0]      G     = crc_ecot_pkg::CRC_G_DEF
) (
  input  logic [CRC_W-1:0] s,
  output logic [CRC_W-1:0] nxt
);

  logic [CRC_W:0]   x1;   // (s << 1) ^ 1 ^ g, before the shift
  logic [CRC_W-1:0] t;    // step 1 result
  logic [CRC_W:0]   x2;   // t ^ g, before the shift

  always_comb begin
    x1 = {s, 1'b1} ^ G;
    t  = x1[CRC_W:1];
    x2 = {1'b0, t} ^ G;
    if (t[0]) nxt = {1'b0, t[CRC_W-1:1]};
    else      nxt = x2[CRC_W:1];
  end

endmodule
