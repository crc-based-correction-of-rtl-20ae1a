// crc_single_corr -- single error correction by one table lookup.
//
// For a syndrome s the table gives P1, the lowest position of a single error
// with that syndrome.  Single errors repeat with the cycle length of g, so the
// candidates are P1, P1 + cycle, P1 + 2 cycle, ... as long as they lie inside
// the packet (position < len).  If P1 is -1 there is no candidate.
//
// Interface: a start pulse takes s and len (packet length m + n in bits).  The
// module drives the table read address with s and reads P1 in the next cycle,
// then gives one candidate per cycle on cand_valid/cand_pos, then pulses done.
// Timing: counting the start cycle as cycle 0, candidates come in cycles
// 2 .. k+1 and done in cycle k + 3; when the table holds -1, done comes in
// cycle 2.  busy is high from cycle 1 until done.  No backpressure: the consumer must
// take a candidate in the cycle it is offered.
// The procedure is the published single-error algorithm; the handshake is this
// design's.
module crc_single_corr #(
  parameter int unsigned CRC_W = crc_ecot_pkg::CRC_W_DEF,
  parameter int unsigned P1_W  = crc_ecot_pkg::P1_W_DEF,
  parameter int unsigned POS_W = crc_ecot_pkg::POS_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CRC_W-1:0] s,
  input  logic [POS_W-1:0] len,
  input  logic [CRC_W-1:0] cycle_len,
  output logic             busy,
  output logic             done,
  // table read port
  output logic [CRC_W-1:0] taddr,
  input  logic [P1_W-1:0]  tp1,
  // candidates
  output logic             cand_valid,
  output logic [POS_W-1:0] cand_pos
);

  // wide enough for a position plus one cycle length
  localparam int unsigned PW = ((POS_W > CRC_W) ? POS_W : CRC_W) + 1;

  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_EMIT} state_e;

  state_e           state;
  logic [CRC_W-1:0] s_q;
  logic [PW-1:0]    len_q;
  logic [PW-1:0]    p_q;

  assign taddr = s_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      s_q   <= '0;
      len_q <= '0;
      p_q   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          s_q   <= s;
          len_q <= PW'(len);
          state <= S_LOOK;
        end
        S_LOOK: begin
          if (tp1 == '1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            p_q   <= PW'(tp1);
            state <= S_EMIT;
          end
        end
        S_EMIT: begin
          if (p_q < len_q) begin
            p_q <= p_q + PW'(cycle_len);
          end else begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state != S_IDLE);
  assign cand_valid = (state == S_EMIT) && (p_q < len_q);
  assign cand_pos   = POS_W'(p_q);

endmodule
