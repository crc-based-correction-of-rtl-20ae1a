// crc_checksum_val -- checksum cross-validation of candidate error patterns.
//
// A CRC syndrome often fits several error patterns.  The payload is assumed to
// carry a UDP/TCP style 16-bit one's-complement checksum, so that the
// one's-complement sum of all its 16-bit words is zero (0xFFFF or 0x0000) when
// it is intact.  A candidate is kept only if the payload corrected by it
// passes that test.
//
// Accumulation: the packet stream (first payload bit first) is watched as it
// is loaded.  The last CRC_W bits are the CRC and not covered by the checksum,
// so bits pass through a CRC_W-bit delay line and only those pushed out of it
// are summed; whatever is still in the line at finish is the CRC.  Payload bits
// form words MSB first; a last partial word is padded with zeros, as UDP pads
// an odd byte.
//
// Validation: the sum is linear in one's-complement arithmetic, so flipping
// payload bit b of a word changes the sum by +2^b (bit was 0) or -2^b (bit was
// 1, i.e. adding ~2^b).  For each candidate the module reads the original bits
// at its positions from the packet buffer (rd_pos/rd_bit, combinational), adds
// the changes to the stored sum and reports pass one cycle later, together
// with the candidate.  Positions below CRC_W are CRC bits and change nothing.
//
// The checksum test is the method's validation step; the incremental form,
// the word layout and the interface are this design's.
// Lint note: only the low 4 bits of the in-packet index q select the bit in
// its word, so its upper bits are unused by design (verilator UNUSEDSIGNAL).
module crc_checksum_val #(
  parameter int unsigned CRC_W = crc_ecot_pkg::CRC_W_DEF,
  parameter int unsigned POS_W = crc_ecot_pkg::POS_W_DEF,
  parameter int unsigned N_MAX = crc_ecot_pkg::N_MAX_DEF,
  parameter int unsigned CNT_W = $clog2(N_MAX + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // accumulation
  input  logic                        clear,
  input  logic                        in_valid,
  input  logic                        in_bit,
  input  logic                        finish,
  output logic [15:0]                 sum,
  // validation
  input  logic [POS_W-1:0]            len,
  input  logic                        cand_valid,
  input  logic [CNT_W-1:0]            cand_cnt,
  input  logic [N_MAX-1:0][POS_W-1:0] cand_pos,
  output logic [N_MAX-1:0][POS_W-1:0] rd_pos,
  input  logic [N_MAX-1:0]            rd_bit,
  output logic                        out_valid,
  output logic                        out_pass,
  output logic [CNT_W-1:0]            out_cnt,
  output logic [N_MAX-1:0][POS_W-1:0] out_pos
);

  import crc_ecot_pkg::ones_add;

  logic [CRC_W-1:0]           dline;
  logic [$clog2(CRC_W+1)-1:0] dcnt;
  logic [15:0]                wbuf;
  logic [3:0]                 wcnt;
  logic                       pbit;      // bit leaving the delay line
  logic                       push;
  logic [15:0]                wfull;

  assign pbit  = dline[CRC_W-1];
  assign push  = in_valid && (dcnt == ($clog2(CRC_W+1))'(CRC_W));
  assign wfull = {wbuf[14:0], pbit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dline <= '0;
      dcnt  <= '0;
      wbuf  <= '0;
      wcnt  <= '0;
      sum   <= '0;
    end else if (clear) begin
      dline <= '0;
      dcnt  <= '0;
      wbuf  <= '0;
      wcnt  <= '0;
      sum   <= '0;
    end else if (finish) begin
      if (wcnt != 4'd0) sum <= ones_add(sum, wbuf << (5'd16 - {1'b0, wcnt}));
      wcnt <= '0;
    end else if (in_valid) begin
      dline <= {dline[CRC_W-2:0], in_bit};
      if (!push) dcnt <= dcnt + 1'b1;
      if (push) begin
        wbuf <= wfull;
        wcnt <= wcnt + 4'd1;
        if (wcnt == 4'd15) sum <= ones_add(sum, wfull);
      end
    end
  end

  // candidate test
  logic [15:0] total;
  always_comb begin
    total  = sum;
    rd_pos = cand_pos;
    for (int t = 0; t < int'(N_MAX); t++) begin
      logic [POS_W-1:0] q;
      logic [3:0]       b;
      logic [15:0]      d;
      q = len - POS_W'(1) - cand_pos[t];
      b = 4'd15 - q[3:0];
      d = 16'd1 << b;
      if ((t < int'(cand_cnt)) && (cand_pos[t] >= POS_W'(CRC_W)))
        total = ones_add(total, rd_bit[t] ? ~d : d);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pass  <= 1'b0;
      out_cnt   <= '0;
      out_pos   <= '0;
    end else begin
      out_valid <= cand_valid;
      out_pass  <= (total == 16'hFFFF) || (total == 16'h0000);
      out_cnt   <= cand_cnt;
      out_pos   <= cand_pos;
    end
  end

endmodule
