// crc_packet_buffer -- holds one received packet for correction.
//
// Bits are appended in line order (first payload bit first); the buffer keeps
// them by arrival index q, and addresses them by CRC position p = len-1-q, the
// degree of the bit in the packet polynomial.  It offers
//   - N_RD combinational bit reads by position, for the checksum test of a
//     candidate error pattern,
//   - a flip port that inverts the bit at a position, to apply a correction,
//   - a 16-bit word read in line order (word w holds arrival bits 16w ..
//     16w+15, the first one in bit 15; bits past the end read as 0).
// Bits beyond L_MAX are dropped and raise overflow.  clear empties it; a
// write in the same cycle becomes the first bit of the new packet, so the old
// packet stays readable until the next one starts.
//
// Interface and timing: all writes (append, flip, clear) take effect on the
// clock edge; reads are combinational.  The method only says that the bit at a
// found position is flipped; this storage and its ports are this design's.
// Lint note: indices are POS_W bits wide but the store needs only
// $clog2(L_MAX) of them; the upper bits are unused (verilator UNUSEDSIGNAL).
module crc_packet_buffer #(
  parameter int unsigned L_MAX = crc_ecot_pkg::L_MAX_DEF,
  parameter int unsigned POS_W = crc_ecot_pkg::POS_W_DEF,
  parameter int unsigned N_RD  = crc_ecot_pkg::N_MAX_DEF,
  parameter int unsigned WI_W  = $clog2((L_MAX + 15) / 16)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       wr_en,
  input  logic                       wr_bit,
  output logic [POS_W-1:0]           len,
  output logic                       overflow,
  input  logic [N_RD-1:0][POS_W-1:0] rd_pos,
  output logic [N_RD-1:0]            rd_bit,
  input  logic                       flip_en,
  input  logic [POS_W-1:0]           flip_pos,
  input  logic [WI_W-1:0]            word_idx,
  output logic [15:0]                word
);

  // index width of the bit store (never more than POS_W, see the assertion)
  localparam int unsigned AW = (L_MAX > 1) ? $clog2(L_MAX) : 1;

  logic bits [L_MAX];

  initial assert (L_MAX < 2 ** POS_W) else $error("crc_packet_buffer: L_MAX does not fit POS_W");

  logic [POS_W-1:0] flip_q;
  assign flip_q = len - POS_W'(1) - flip_pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len      <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      len      <= wr_en ? POS_W'(1) : '0;
      overflow <= 1'b0;
    end else if (wr_en) begin
      if (len < POS_W'(L_MAX)) len <= len + POS_W'(1);
      else                     overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (clear && wr_en) bits[0] <= wr_bit;
    else if (!clear && wr_en && len < POS_W'(L_MAX)) bits[len[AW-1:0]] <= wr_bit;
    else if (!clear && flip_en && flip_pos < len) bits[flip_q[AW-1:0]] <= ~bits[flip_q[AW-1:0]];
  end

  always_comb begin
    for (int r = 0; r < int'(N_RD); r++) begin
      logic [POS_W-1:0] q;
      q = len - POS_W'(1) - rd_pos[r];
      rd_bit[r] = (rd_pos[r] < len) ? bits[q[AW-1:0]] : 1'b0;
    end
  end

  always_comb begin
    for (int b = 0; b < 16; b++) begin
      logic [AW+4:0] q;
      q = (AW+5)'(word_idx) * (AW+5)'(16) + (AW+5)'(15 - b);
      word[b] = (q < (AW+5)'(len)) ? bits[q[AW-1:0]] : 1'b0;
    end
  end

endmodule
