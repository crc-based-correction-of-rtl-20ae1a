// crc_table_gen -- fills the ECOT table for the generator polynomial G.
//
// Two passes, after a start pulse:
//   FILL : for every syndrome a = 0 .. 2^n-1, one per cycle, write P1 = -1
//          (all ones) and next = next_element(a).
//   WALK : starting from e = x^0 mod g = 1 at p = 0, write P1 = p into row e,
//          then e = e * x mod g and p = p + 1, until e returns to 1.  The
//          number of steps is the cycle length of g (the distance between two
//          single errors with the same syndrome), given out on cycle_len.
// The walk visits every syndrome of a single error exactly once per period, in
// increasing position order, so each row receives the lowest single error
// position that produces it, the same value the per-syndrome search (cancel
// the lowest set bit with a shifted g until one bit is left, give up once the
// window passes the cycle length) finds.  Rows never visited keep -1.
//
// Timing: counting the cycle in which start is high as cycle 0, done is first
// high in cycle 2^n + cycle_len + 2 (98305 for CRC-16-CCITT) and stays high
// until the next start.
//
// The table contents (-1 initialisation, P1 and next for every syndrome) are
// the method's.  Filling next for all rows in index order and P1 by one walk
// of x^p, instead of running the per-syndrome search inside the next-element
// loops, is this design's choice: it gives the same table in 2^n + cycle
// cycles instead of about 2^n x cycle.
module crc_table_gen #(
  parameter int unsigned    CRC_W = crc_ecot_pkg::CRC_W_DEF,
  parameter logic [CRC_W:0] G     = crc_ecot_pkg::CRC_G_DEF,
  parameter int unsigned    P1_W  = crc_ecot_pkg::P1_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [CRC_W-1:0] cycle_len,
  // table write port
  output logic             we_p1,
  output logic             we_nx,
  output logic [CRC_W-1:0] waddr,
  output logic [P1_W-1:0]  wdata_p1,
  output logic [CRC_W-1:0] wdata_nx
);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_WALK, S_DONE} state_e;

  state_e           state;
  logic [CRC_W-1:0] a;       // FILL row counter
  logic [CRC_W-1:0] e;       // WALK: x^p mod g
  logic [CRC_W-1:0] p;       // WALK: position
  logic [CRC_W-1:0] nx_a;
  logic [CRC_W-1:0] e_times_x;

  crc_next_element #(.CRC_W(CRC_W), .G(G)) u_next (.s(a), .nxt(nx_a));

  // e * x mod g: shift up, reduce by g when x^n appears
  always_comb begin
    if (e[CRC_W-1]) e_times_x = {e[CRC_W-2:0], 1'b0} ^ G[CRC_W-1:0];
    else            e_times_x = {e[CRC_W-2:0], 1'b0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      a         <= '0;
      e         <= '0;
      p         <= '0;
      cycle_len <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state <= S_FILL;
            a     <= '0;
          end
        end
        S_FILL: begin
          a <= a + 1'b1;
          if (a == {CRC_W{1'b1}}) begin
            state <= S_WALK;
            e     <= {{(CRC_W-1){1'b0}}, 1'b1};
            p     <= '0;
          end
        end
        S_WALK: begin
          p <= p + 1'b1;
          e <= e_times_x;
          // back at x^0, or the longest possible period reached
          if (e_times_x == {{(CRC_W-1){1'b0}}, 1'b1} || p == {CRC_W{1'b1}} - 1'b1) begin
            state     <= S_DONE;
            cycle_len <= p + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    we_p1    = 1'b0;
    we_nx    = 1'b0;
    waddr    = a;
    wdata_p1 = '1;
    wdata_nx = nx_a;
    if (state == S_FILL) begin
      we_p1 = 1'b1;
      we_nx = 1'b1;
    end else if (state == S_WALK) begin
      we_p1    = 1'b1;
      waddr    = e;
      wdata_p1 = P1_W'(p);
    end
  end

  assign busy = (state == S_FILL) || (state == S_WALK);
  assign done = (state == S_DONE);

endmodule
