// crc_n_corr -- list every error pattern of up to N_MAX errors for a syndrome.
//
// For k = N_MAX down to 3, every sorted set F of k-2 forced positions is
// visited (crc_forced_update).  For each set the syndrome is brought to the
// window above the last forced position, one bit per cycle from bit 0: where
// the current low bit differs from the wanted value (1 at a forced position,
// 0 elsewhere) g is added, then the window shifts right.  The double error
// walk (crc_double_corr) then searches the last two errors in the remaining
// len - F_last - 1 bits.  Finally the double error walk and the single error
// lookup run on the original syndrome over the whole packet.  Together this is
// every pattern of weight 1 .. N_MAX with the given syndrome, each once.
//
// Interface: a start pulse takes s and len (= m + n).  The module owns one
// table read port and hands it to whichever sub-search runs.  Candidates come
// out one per cycle, no backpressure: cand_cnt errors at cand_pos[0] <
// cand_pos[1] < ... (slots above cand_cnt are zero).  done pulses at the end.
// Timing: per forced set F_last + 1 forcing cycles, then the double walk of
// len - F_last - 2 lookups; the whole search is O(len^(N_MAX-1)) cycles for
// N_MAX >= 3, about len cycles for N_MAX = 2.
// The search order and the forcing rule are the published N-error algorithm;
// the cycle-level schedule (forcing done serially from bit 0 for each set, as
// written, not stored in extra table columns) and the handshake are this
// design's.
// Lint note: with N_MAX = 3 the counter k never exceeds 3, so the tests
// "k > 3" are constant (verilator CMPCONST); they are needed for N_MAX >= 4.
// Bit 0 of sp ^ g is shifted out and the busy outputs of the sub-searches are
// not needed (their done pulses drive the sequencing): verilator UNUSEDSIGNAL.
module crc_n_corr #(
  parameter int unsigned    CRC_W = crc_ecot_pkg::CRC_W_DEF,
  parameter logic [CRC_W:0] G     = crc_ecot_pkg::CRC_G_DEF,
  parameter int unsigned    P1_W  = crc_ecot_pkg::P1_W_DEF,
  parameter int unsigned    POS_W = crc_ecot_pkg::POS_W_DEF,
  parameter int unsigned    N_MAX = crc_ecot_pkg::N_MAX_DEF,
  parameter int unsigned    CNT_W = $clog2(N_MAX + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [CRC_W-1:0]            s,
  input  logic [POS_W-1:0]            len,
  input  logic [CRC_W-1:0]            cycle_len,
  output logic                        busy,
  output logic                        done,
  // table read port
  output logic [CRC_W-1:0]            taddr,
  input  logic [P1_W-1:0]             tp1,
  input  logic [CRC_W-1:0]            tnx,
  // candidates
  output logic                        cand_valid,
  output logic [CNT_W-1:0]            cand_cnt,
  output logic [N_MAX-1:0][POS_W-1:0] cand_pos
);

  // forced slots (at least one so that the arrays exist)
  localparam int unsigned K    = (N_MAX > 3) ? N_MAX - 2 : 1;
  localparam int unsigned KF_W = (K > 1) ? $clog2(K + 1) : 1;

  initial assert (N_MAX >= 1) else $error("crc_n_corr: N_MAX must be at least 1");

  typedef enum logic [3:0] {
    S_IDLE, S_KINIT, S_FORCE, S_DBL_START, S_DBL_WAIT, S_NEXTF,
    S_FIN2_START, S_FIN2_WAIT, S_FIN1_START, S_FIN1_WAIT
  } state_e;

  state_e                  state;
  logic [CRC_W-1:0]        s_q;
  logic [POS_W-1:0]        len_q;
  logic [CNT_W-1:0]        k;        // errors of the current pass
  logic [K-1:0][POS_W-1:0] f;        // forced positions
  logic [POS_W-1:0]        i_pos;    // forcing loop position
  logic [KF_W-1:0]         j_idx;    // next forced slot to meet
  logic [CRC_W-1:0]        sp;       // s' during forcing

  logic [KF_W-1:0]         kf;
  logic [POS_W-1:0]        f_last;
  logic                    want_one;
  logic [CRC_W:0]          sp_xg;
  logic [CRC_W-1:0]        sp_step;
  logic [K-1:0][POS_W-1:0] f_next;
  logic                    f_wrap;

  // double walk control
  logic                    d_start;
  logic [CRC_W-1:0]        d_s;
  logic [POS_W-1:0]        d_len, d_base;
  logic                    d_busy, d_done, d_valid;
  logic [POS_W-1:0]        d_lo, d_hi;
  logic [CRC_W-1:0]        d_taddr;
  // single lookup control
  logic                    s1_start, s1_busy, s1_done, s1_valid;
  logic [POS_W-1:0]        s1_pos;
  logic [CRC_W-1:0]        s1_taddr;

  assign kf       = KF_W'(k - CNT_W'(2));
  assign f_last   = f[(kf == '0) ? 0 : int'(kf) - 1];
  assign want_one = (j_idx < kf) && (f[j_idx] == i_pos);
  assign sp_xg    = {1'b0, sp} ^ G;
  assign sp_step  = (sp[0] != want_one) ? sp_xg[CRC_W:1] : (sp >> 1);

  crc_forced_update #(.K(K), .POS_W(POS_W), .KF_W(KF_W)) u_upd (
    .f(f), .kf(kf), .limit(len_q - POS_W'(3)), .f_next(f_next), .wrap(f_wrap)
  );

  crc_double_corr #(.CRC_W(CRC_W), .G(G), .P1_W(P1_W), .POS_W(POS_W)) u_dbl (
    .clk, .rst_n, .start(d_start), .s(d_s), .len(d_len), .base(d_base),
    .cycle_len, .busy(d_busy), .done(d_done),
    .taddr(d_taddr), .tp1, .tnx,
    .cand_valid(d_valid), .cand_lo(d_lo), .cand_hi(d_hi)
  );

  crc_single_corr #(.CRC_W(CRC_W), .P1_W(P1_W), .POS_W(POS_W)) u_sgl (
    .clk, .rst_n, .start(s1_start), .s(s_q), .len(len_q), .cycle_len,
    .busy(s1_busy), .done(s1_done),
    .taddr(s1_taddr), .tp1,
    .cand_valid(s1_valid), .cand_pos(s1_pos)
  );

  assign taddr = (state == S_FIN1_START || state == S_FIN1_WAIT) ? s1_taddr : d_taddr;

  always_comb begin
    d_start  = 1'b0;
    d_s      = s_q;
    d_len    = len_q;
    d_base   = '0;
    s1_start = (state == S_FIN1_START);
    if (state == S_DBL_START) begin
      d_start = 1'b1;
      d_s     = sp;
      d_len   = len_q - f_last - POS_W'(1);
      d_base  = f_last + POS_W'(1);
    end else if (state == S_FIN2_START) begin
      d_start = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      s_q   <= '0;
      len_q <= '0;
      k     <= '0;
      f     <= '0;
      i_pos <= '0;
      j_idx <= '0;
      sp    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          s_q   <= s;
          len_q <= len;
          k     <= CNT_W'(N_MAX);
          state <= (N_MAX > 2) ? S_KINIT : ((N_MAX == 2) ? S_FIN2_START : S_FIN1_START);
        end
        S_KINIT: begin
          if (len_q < POS_W'(k)) begin
            // no room for k errors
            if (k > CNT_W'(3)) k <= k - CNT_W'(1);
            else               state <= S_FIN2_START;
          end else begin
            for (int t = 0; t < int'(K); t++) f[t] <= (t < int'(kf)) ? POS_W'(t) : '0;
            i_pos <= '0;
            j_idx <= '0;
            sp    <= s_q;
            state <= S_FORCE;
          end
        end
        S_FORCE: begin
          sp    <= sp_step;
          i_pos <= i_pos + POS_W'(1);
          if (want_one) j_idx <= j_idx + KF_W'(1);
          if (i_pos == f_last) state <= S_DBL_START;
        end
        S_DBL_START: state <= S_DBL_WAIT;
        S_DBL_WAIT:  if (d_done) state <= S_NEXTF;
        S_NEXTF: begin
          if (f_wrap) begin
            if (k > CNT_W'(3)) begin
              k     <= k - CNT_W'(1);
              state <= S_KINIT;
            end else begin
              state <= S_FIN2_START;
            end
          end else begin
            f     <= f_next;
            i_pos <= '0;
            j_idx <= '0;
            sp    <= s_q;
            state <= S_FORCE;
          end
        end
        S_FIN2_START: state <= S_FIN2_WAIT;
        S_FIN2_WAIT:  if (d_done) state <= S_FIN1_START;
        S_FIN1_START: state <= S_FIN1_WAIT;
        S_FIN1_WAIT:  if (s1_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // candidate assembly
  always_comb begin
    cand_valid = 1'b0;
    cand_cnt   = '0;
    cand_pos   = '0;
    if (state == S_DBL_WAIT && d_valid) begin
      cand_valid = 1'b1;
      cand_cnt   = k;
      for (int t = 0; t < int'(K); t++)
        if (t < int'(kf)) cand_pos[t] = f[t];
      cand_pos[kf]               = d_lo;
      cand_pos[int'(kf) + 1]     = d_hi;
    end else if (state == S_FIN2_WAIT && d_valid) begin
      cand_valid  = 1'b1;
      cand_cnt    = CNT_W'(2);
      cand_pos[0] = d_lo;
      if (N_MAX > 1) cand_pos[N_MAX > 1 ? 1 : 0] = d_hi;
    end else if (state == S_FIN1_WAIT && s1_valid) begin
      cand_valid  = 1'b1;
      cand_cnt    = CNT_W'(1);
      cand_pos[0] = s1_pos;
    end
  end

  assign busy = (state != S_IDLE);

endmodule
