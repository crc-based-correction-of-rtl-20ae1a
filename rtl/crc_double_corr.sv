// crc_double_corr -- double error correction by walking the next column.
//
// A first error is forced at local position F1 = 0: if s0 = 0, g is added to
// set it, and the forced bit is shifted out, s' = (s ^ g) >> 1 or s >> 1.
// Then for F1 = 0 .. len-2, one table row per cycle:
//   - P1 = T[s'].P1 is the distance of the remaining single error above F1;
//     every P1 + j*cycle < len - F1 - 1 gives the candidate pair
//     (F1, F1 + 1 + P1 + j*cycle);
//   - s' = T[s'].next moves the forced error to F1 + 1.
// The loop bounds are those of the corrected form of the published algorithm
// (F1 up to len - 2, remaining distance below len - F1 - 1), so both errors lie
// inside the len bits.
//
// The search can run on the upper part of a packet: positions are given out
// plus base, so with base = b and len = L - b it covers positions b .. L-1.
// The N-error search uses this after forcing its lower errors.
//
// Interface: a start pulse takes s, len, base.  One table row is read per
// cycle through taddr/tp1/tnx (combinational read).  Candidates come out on
// cand_valid with cand_lo < cand_hi, one per cycle, no backpressure.  done
// pulses when the walk ends.  Timing: counting the start cycle as cycle 0,
// the len - 1 lookups take cycles 1 .. len-1, each further candidate of the
// same F1 adds one cycle, and done is high in the cycle after the last one:
// cycle len + (candidates - forced positions that gave a candidate).  The procedure is the
// published one; the handshake and the base offset are this design's.
// Lint note: bit 0 of s ^ g is always shifted out, so it is unused by design
// (verilator UNUSEDSIGNAL).
module crc_double_corr #(
  parameter int unsigned    CRC_W = crc_ecot_pkg::CRC_W_DEF,
  parameter logic [CRC_W:0] G     = crc_ecot_pkg::CRC_G_DEF,
  parameter int unsigned    P1_W  = crc_ecot_pkg::P1_W_DEF,
  parameter int unsigned    POS_W = crc_ecot_pkg::POS_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CRC_W-1:0] s,
  input  logic [POS_W-1:0] len,
  input  logic [POS_W-1:0] base,
  input  logic [CRC_W-1:0] cycle_len,
  output logic             busy,
  output logic             done,
  // table read port
  output logic [CRC_W-1:0] taddr,
  input  logic [P1_W-1:0]  tp1,
  input  logic [CRC_W-1:0] tnx,
  // candidates
  output logic             cand_valid,
  output logic [POS_W-1:0] cand_lo,
  output logic [POS_W-1:0] cand_hi
);

  localparam int unsigned PW = ((POS_W > CRC_W) ? POS_W : CRC_W) + 1;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_MORE} state_e;

  state_e           state;
  logic [CRC_W-1:0] sp;       // s', the current window
  logic [PW-1:0]    f1;       // forced position, local
  logic [PW-1:0]    room;     // len - F1 - 1: bits above F1
  logic [PW-1:0]    p_q;      // further P1 + j*cycle of the same F1
  logic [PW-1:0]    base_q;
  logic [PW-1:0]    last_f1;  // len - 2
  logic [CRC_W:0]   s_xg;

  logic [PW-1:0]    p_cur;    // distance tested in this cycle
  logic             p_ok;
  logic             more;

  assign s_xg  = {1'b0, s} ^ G;
  assign taddr = sp;

  always_comb begin
    p_cur = (state == S_MORE) ? p_q : PW'(tp1);
    p_ok  = ((state == S_MORE) || (tp1 != '1)) && (p_cur < room);
    more  = p_ok && ((p_cur + PW'(cycle_len)) < room);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sp      <= '0;
      f1      <= '0;
      room    <= '0;
      p_q     <= '0;
      base_q  <= '0;
      last_f1 <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          sp      <= s[0] ? (s >> 1) : s_xg[CRC_W:1];
          f1      <= '0;
          room    <= PW'(len) - PW'(1);
          last_f1 <= PW'(len) - PW'(2);
          base_q  <= PW'(base);
          if (len < POS_W'(2)) done  <= 1'b1;
          else                 state <= S_RUN;
        end
        S_RUN, S_MORE: begin
          if (more) begin
            p_q   <= p_cur + PW'(cycle_len);
            state <= S_MORE;
          end else if (f1 == last_f1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            sp    <= tnx;
            f1    <= f1 + PW'(1);
            room  <= room - PW'(1);
            state <= S_RUN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state != S_IDLE);
  assign cand_valid = (state != S_IDLE) && p_ok;
  assign cand_lo    = POS_W'(base_q + f1);
  assign cand_hi    = POS_W'(base_q + f1 + PW'(1) + p_cur);

endmodule
