// crc_ecot_table -- the syndrome-indexed table T[2^n][2].
//
// Row s holds two columns: P1, the lowest single error position whose syndrome
// is s (all ones means -1, "no single error"), and next, the next element of s
// (see crc_next_element).  The row index is the syndrome itself, so no search
// is needed: a lookup is one read.  With n = 16 this is 65536 rows of 16 + 16
// bits, 2^n x 2 x length(s) bytes as in the memory estimate for the two-column
// table.
//
// Interface: one write port with a separate enable per column (the generator
// writes the next column and the P1 column in different passes), and one read
// port whose data follow the address in the same cycle (combinational read).
// The table holds no reset; it is valid once the generator has filled it.
// The two columns and the -1 encoding follow the method; the port set and the
// combinational read are this design's choices.
module crc_ecot_table #(
  parameter int unsigned CRC_W = crc_ecot_pkg::CRC_W_DEF,
  parameter int unsigned P1_W  = crc_ecot_pkg::P1_W_DEF
) (
  input  logic             clk,
  // write port
  input  logic             we_p1,
  input  logic             we_nx,
  input  logic [CRC_W-1:0] waddr,
  input  logic [P1_W-1:0]  wdata_p1,
  input  logic [CRC_W-1:0] wdata_nx,
  // read port
  input  logic [CRC_W-1:0] raddr,
  output logic [P1_W-1:0]  rdata_p1,
  output logic [CRC_W-1:0] rdata_nx
);

  localparam int unsigned ROWS = 2 ** CRC_W;

  logic [P1_W-1:0]  p1_col [ROWS];
  logic [CRC_W-1:0] nx_col [ROWS];

  always_ff @(posedge clk) begin
    if (we_p1) p1_col[waddr] <= wdata_p1;
    if (we_nx) nx_col[waddr] <= wdata_nx;
  end

  assign rdata_p1 = p1_col[raddr];
  assign rdata_nx = nx_col[raddr];

endmodule
