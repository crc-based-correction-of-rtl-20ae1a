// crc_ecot_top -- CRC-based multiple error corrector with an optimized table.
//
// After reset the table generator fills the syndrome-indexed table (P1 and
// next element of every syndrome) and measures the cycle length of g; only then
// is in_ready raised.  A packet is then streamed in, one bit per cycle, first
// payload bit first, CRC last, in_last on the final bit.  While it streams the
// packet is stored, its syndrome is computed and the one's-complement sum of
// its payload is accumulated.  Then:
//   - syndrome zero: the packet is intact (ST_NO_ERROR);
//   - otherwise the N-error search lists every error pattern of up to N_MAX
//     errors with that syndrome; each candidate is checked against the payload
//     checksum as it comes out;
//   - if exactly one candidate is accepted (with cfg_use_checksum = 1, one that
//     passes the checksum; with 0, the only candidate at all) its bits are
//     flipped in the buffer (ST_CORRECTED); several accepted candidates give
//     ST_AMBIGUOUS, none ST_NO_CANDIDATE; a packet longer than L_MAX bits is not
//     searched (ST_TOO_LONG).
// res_valid pulses once per packet with the status, the syndrome, how many
// candidates were listed and how many passed the checksum, the accepted pattern
// (first one found) and whether the syndrome is one of the special syndromes of
// g.  The (corrected) packet can be read back by 16-bit words at any time until
// the next packet starts.
//
// Timing: table_ready rises 2^n + cycle + 2 cycles after reset.  Per packet:
// L load cycles; an intact or too long packet gives res_valid 3 cycles after
// the last bit is taken; otherwise the search (about L cycles plus one per
// extra candidate for N_MAX = 2, about L^2 for N_MAX = 3, O(L^(N_MAX-1))
// beyond), then one cycle per flipped bit.  in_ready is low from the last bit
// to res_valid.  cfg_use_checksum is sampled when the search ends.
//
// Following the method: the table, the searches, the checksum filter and the
// rule "correct when a single candidate remains".  This design's own choices:
// the bit-serial stream interface, the plain (non-reflected, zero-initialised)
// CRC remainder, the checksum covering exactly the payload, and the status
// codes.
// Lint note: the exc_* outputs depend only on the parameter G, so synthesis
// sees them as constant outputs; they are there for the host to read.
// rst_n also disables the handshake assertion, which verilator reports as
// SYNCASYNCNET; the assertion is not part of the circuit.
module crc_ecot_top #(
  parameter int unsigned    CRC_W = crc_ecot_pkg::CRC_W_DEF,
  parameter logic [CRC_W:0] G     = crc_ecot_pkg::CRC_G_DEF,
  parameter int unsigned    P1_W  = crc_ecot_pkg::P1_W_DEF,
  parameter int unsigned    POS_W = crc_ecot_pkg::POS_W_DEF,
  parameter int unsigned    L_MAX = crc_ecot_pkg::L_MAX_DEF,
  parameter int unsigned    N_MAX = crc_ecot_pkg::N_MAX_DEF,
  parameter int unsigned    CNT_W = crc_ecot_pkg::CNT_W_DEF,
  parameter int unsigned    EC_W  = $clog2(N_MAX + 1),
  parameter int unsigned    WI_W  = $clog2((L_MAX + 15) / 16)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // status of the table
  output logic                        table_ready,
  output logic [CRC_W-1:0]            cycle_len,
  // the special syndromes of g (constant for a given G)
  output logic [CRC_W-1:0]            exc_self1,
  output logic                        exc_self1_exists,
  output logic [CRC_W-1:0]            exc_self2,
  output logic [CRC_W-1:0]            exc_nosingle,
  output logic                        exc_nosingle_exists,
  // table generator or error search running
  output logic                        busy,
  // configuration
  input  logic                        cfg_use_checksum,
  // packet stream
  output logic                        in_ready,
  input  logic                        in_valid,
  input  logic                        in_bit,
  input  logic                        in_last,
  // result
  output logic                        res_valid,
  output logic [2:0]                  res_status,
  output logic [CRC_W-1:0]            res_syndrome,
  output logic [15:0]                 res_checksum,
  output logic [POS_W-1:0]            res_len,
  output logic [CNT_W-1:0]            res_num_cands,
  output logic [CNT_W-1:0]            res_num_pass,
  output logic [EC_W-1:0]             res_err_cnt,
  output logic [N_MAX-1:0][POS_W-1:0] res_err_pos,
  output logic                        res_exc_self1,
  output logic                        res_exc_self2,
  output logic                        res_exc_nosingle,
  // read back of the packet
  input  logic [WI_W-1:0]             rd_word_idx,
  output logic [15:0]                 rd_word
);

  import crc_ecot_pkg::*;

  typedef enum logic [3:0] {
    S_RESET, S_GEN, S_IDLE, S_FIN, S_CHECK, S_SEARCH, S_DRAIN, S_DECIDE,
    S_FIX, S_RESULT
  } state_e;

  state_e state;

  // ---------------------------------------------------------------- table
  logic             g_start, g_busy, g_done;
  logic             t_we_p1, t_we_nx;
  logic [CRC_W-1:0] t_waddr, t_wnx, t_raddr, t_rnx;
  logic [P1_W-1:0]  t_wp1, t_rp1;

  crc_table_gen #(.CRC_W(CRC_W), .G(G), .P1_W(P1_W)) u_gen (
    .clk, .rst_n, .start(g_start), .busy(g_busy), .done(g_done),
    .cycle_len,
    .we_p1(t_we_p1), .we_nx(t_we_nx), .waddr(t_waddr),
    .wdata_p1(t_wp1), .wdata_nx(t_wnx)
  );

  crc_ecot_table #(.CRC_W(CRC_W), .P1_W(P1_W)) u_table (
    .clk,
    .we_p1(t_we_p1), .we_nx(t_we_nx), .waddr(t_waddr),
    .wdata_p1(t_wp1), .wdata_nx(t_wnx),
    .raddr(t_raddr), .rdata_p1(t_rp1), .rdata_nx(t_rnx)
  );

  // ------------------------------------------------------- packet intake
  logic             clr;
  logic             take;
  logic [CRC_W-1:0] syndrome;
  logic [POS_W-1:0] len;
  logic             overflow;
  logic [15:0]      csum;

  assign in_ready = (state == S_IDLE);
  assign take     = in_ready && in_valid;

  crc_syndrome #(.CRC_W(CRC_W), .G(G)) u_synd (
    .clk, .rst_n, .clear(clr), .in_valid(take), .in_bit, .syndrome
  );

  // ------------------------------------------------------------- search
  logic                        n_start, n_busy, n_done, n_valid;
  logic [EC_W-1:0]             n_cnt;
  logic [N_MAX-1:0][POS_W-1:0] n_pos;

  crc_n_corr #(.CRC_W(CRC_W), .G(G), .P1_W(P1_W), .POS_W(POS_W),
               .N_MAX(N_MAX), .CNT_W(EC_W)) u_ncorr (
    .clk, .rst_n, .start(n_start), .s(syndrome), .len, .cycle_len,
    .busy(n_busy), .done(n_done),
    .taddr(t_raddr), .tp1(t_rp1), .tnx(t_rnx),
    .cand_valid(n_valid), .cand_cnt(n_cnt), .cand_pos(n_pos)
  );

  // ----------------------------------------------- checksum validation
  logic [N_MAX-1:0][POS_W-1:0] v_rd_pos;
  logic [N_MAX-1:0]            v_rd_bit;
  logic                        v_valid, v_pass;
  logic [EC_W-1:0]             v_cnt;
  logic [N_MAX-1:0][POS_W-1:0] v_pos;

  crc_checksum_val #(.CRC_W(CRC_W), .POS_W(POS_W), .N_MAX(N_MAX), .CNT_W(EC_W)) u_csum (
    .clk, .rst_n, .clear(clr), .in_valid(take), .in_bit,
    .finish(state == S_FIN), .sum(csum),
    .len, .cand_valid(n_valid), .cand_cnt(n_cnt), .cand_pos(n_pos),
    .rd_pos(v_rd_pos), .rd_bit(v_rd_bit),
    .out_valid(v_valid), .out_pass(v_pass), .out_cnt(v_cnt), .out_pos(v_pos)
  );

  // ------------------------------------------------------ packet buffer
  logic             flip_en;
  logic [POS_W-1:0] flip_pos;

  // the buffer is emptied by the first bit of the next packet, not at the
  // result, so a corrected packet can be read until then
  logic             first_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   first_bit <= 1'b1;
    else if (state == S_RESULT)   first_bit <= 1'b1;
    else if (take)                first_bit <= 1'b0;
  end

  crc_packet_buffer #(.L_MAX(L_MAX), .POS_W(POS_W), .N_RD(N_MAX), .WI_W(WI_W)) u_buf (
    .clk, .rst_n, .clear(take && first_bit), .wr_en(take), .wr_bit(in_bit),
    .len, .overflow, .rd_pos(v_rd_pos), .rd_bit(v_rd_bit),
    .flip_en, .flip_pos, .word_idx(rd_word_idx), .word(rd_word)
  );

  // --------------------------------------------------------- exceptions
  logic             is_s1, is_s2, is_ns;

  crc_exceptions #(.CRC_W(CRC_W)) u_exc (
    .g(G), .s(syndrome),
    .self1(exc_self1), .self1_exists(exc_self1_exists), .self2(exc_self2),
    .nosingle(exc_nosingle), .nosingle_exists(exc_nosingle_exists),
    .is_self1(is_s1), .is_self2(is_s2), .is_nosingle(is_ns)
  );

  // ------------------------------------------------------------ control
  logic [CNT_W-1:0]            num_cands, num_pass;
  logic                        have_pick;
  logic [EC_W-1:0]             pick_cnt;
  logic [N_MAX-1:0][POS_W-1:0] pick_pos;
  logic [EC_W-1:0]             fix_idx;
  logic                        accept;

  assign g_start  = (state == S_RESET);
  assign n_start  = (state == S_CHECK) && !overflow && (syndrome != '0);
  assign flip_en  = (state == S_FIX);
  assign flip_pos = pick_pos[fix_idx];
  assign table_ready = (state != S_RESET) && (state != S_GEN);
  assign busy        = g_busy || n_busy;
  // which validated candidates count as accepted
  assign accept   = v_valid && (!cfg_use_checksum || v_pass);
  // how many candidates are accepted when the search has ended
  logic [CNT_W-1:0] n_acc;
  assign n_acc    = cfg_use_checksum ? num_pass : num_cands;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_RESET;
      clr              <= 1'b1;
      num_cands        <= '0;
      num_pass         <= '0;
      have_pick        <= 1'b0;
      pick_cnt         <= '0;
      pick_pos         <= '0;
      fix_idx          <= '0;
      res_valid        <= 1'b0;
      res_status       <= ST_NO_ERROR;
      res_syndrome     <= '0;
      res_checksum     <= '0;
      res_len          <= '0;
      res_num_cands    <= '0;
      res_num_pass     <= '0;
      res_err_cnt      <= '0;
      res_err_pos      <= '0;
      res_exc_self1    <= 1'b0;
      res_exc_self2    <= 1'b0;
      res_exc_nosingle <= 1'b0;
    end else begin
      clr       <= 1'b0;
      res_valid <= 1'b0;
      // candidate bookkeeping, valid in S_SEARCH and the drain cycle
      if (v_valid) begin
        num_cands <= num_cands + 1'b1;
        if (v_pass) num_pass <= num_pass + 1'b1;
        if (accept && !have_pick) begin
          have_pick <= 1'b1;
          pick_cnt  <= v_cnt;
          pick_pos  <= v_pos;
        end
      end
      case (state)
        S_RESET: state <= S_GEN;
        S_GEN:   if (g_done) state <= S_IDLE;
        S_IDLE:  if (take && in_last) state <= S_FIN;
        S_FIN:   state <= S_CHECK;
        S_CHECK: begin
          num_cands        <= '0;
          num_pass         <= '0;
          have_pick        <= 1'b0;
          pick_cnt         <= '0;
          pick_pos         <= '0;
          res_syndrome     <= syndrome;
          res_checksum     <= csum;
          res_len          <= len;
          res_exc_self1    <= is_s1;
          res_exc_self2    <= is_s2;
          res_exc_nosingle <= is_ns;
          if (overflow) begin
            res_status <= ST_TOO_LONG;
            state      <= S_RESULT;
          end else if (syndrome == '0) begin
            res_status <= ST_NO_ERROR;
            state      <= S_RESULT;
          end else begin
            state <= S_SEARCH;
          end
        end
        S_SEARCH: if (n_done) state <= S_DRAIN;
        S_DRAIN:  state <= S_DECIDE;
        S_DECIDE: begin
          fix_idx <= '0;
          if (n_acc == CNT_W'(1)) begin
            res_status <= ST_CORRECTED;
            state      <= S_FIX;
          end else begin
            res_status <= (n_acc == '0) ? ST_NO_CANDIDATE : ST_AMBIGUOUS;
            state      <= S_RESULT;
          end
        end
        S_FIX: begin
          fix_idx <= fix_idx + 1'b1;
          if (fix_idx + 1'b1 == pick_cnt) state <= S_RESULT;
        end
        S_RESULT: begin
          res_valid     <= 1'b1;
          res_num_cands <= num_cands;
          res_num_pass  <= num_pass;
          res_err_cnt   <= (res_status == ST_CORRECTED || res_status == ST_AMBIGUOUS) ? pick_cnt : '0;
          res_err_pos   <= (res_status == ST_CORRECTED || res_status == ST_AMBIGUOUS) ? pick_pos : '0;
          state         <= S_IDLE;
        end
        default: state <= S_RESET;
      endcase
      // the next packet starts from an empty buffer
      if (state == S_RESULT) clr <= 1'b1;
    end
  end

  // a candidate is never offered outside the search
  a_cand_in_search: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(n_valid && state != S_SEARCH))
    else $error("crc_ecot_top: candidate outside the search");

endmodule
