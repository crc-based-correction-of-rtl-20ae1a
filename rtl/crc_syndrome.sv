// crc_syndrome -- bit-serial CRC syndrome of a received packet.
//
// The receiver divides the received packet p_R(x) by g(x); the remainder is
// the syndrome s(x) = e(x) mod g(x), zero for an intact packet.  The packet is
// fed one bit per cycle, highest degree first (first payload bit first, last
// CRC bit last).  Each bit does r = (r * x + bit) mod g.  The register starts
// at zero and nothing is reflected or inverted: the syndrome is the plain
// polynomial remainder that the table is indexed by.
//
// Interface: clear (synchronous) empties the register; in_valid/in_bit add one
// bit; syndrome is the remainder of all bits added since the last clear,
// updated on the clock edge that takes the bit.
// The remainder definition is the method's; the serial form is this design's.
module crc_syndrome #(
  parameter int unsigned    CRC_W = crc_ecot_pkg::CRC_W_DEF,
  parameter logic [CRC_W:0] G     = crc_ecot_pkg::CRC_G_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic             in_bit,
  output logic [CRC_W-1:0] syndrome
);

  logic [CRC_W-1:0] shifted;

  always_comb begin
    shifted = {syndrome[CRC_W-2:0], in_bit};
    if (syndrome[CRC_W-1]) shifted = shifted ^ G[CRC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        syndrome <= '0;
    else if (clear)    syndrome <= '0;
    else if (in_valid) syndrome <= shifted;
  end

endmodule
