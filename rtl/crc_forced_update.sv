// crc_forced_update -- next set of forced error positions (combinational).
//
// The N-error search forces k-2 errors at sorted positions F[0] < F[1] < ...
// < F[kf-1] (kf = k-2 used slots) and searches the last two errors above them.
// This block steps F to the next set:
//   - if the last position is below limit, it moves up by one;
//   - otherwise the highest F[i] that has a gap to F[i+1] moves up by one and
//     every position above it is packed right behind it (F[i]+1, F[i]+2, ...);
//   - if no position has a gap, all sets have been visited and wrap is set.
// This enumerates all kf-subsets of 0 .. limit in lexicographic order.  With
// limit = len - 3 the two searched errors always fit above the last forced one.
//
// Interface: f, kf and limit in, f_next and wrap out; slots at or above kf are
// passed through.  The stepping rule is the published one; taking the limit on
// the whole packet (payload and CRC) rather than on the payload alone is this
// design's reading, so that errors in the CRC bits are found as well.
module crc_forced_update #(
  parameter int unsigned K     = 1,
  parameter int unsigned POS_W = crc_ecot_pkg::POS_W_DEF,
  parameter int unsigned KF_W  = (K > 1) ? $clog2(K + 1) : 1
) (
  input  logic [K-1:0][POS_W-1:0] f,
  input  logic [KF_W-1:0]         kf,
  input  logic [POS_W-1:0]        limit,
  output logic [K-1:0][POS_W-1:0] f_next,
  output logic                    wrap
);

  logic            found;
  int unsigned     pivot;
  int unsigned     last;

  always_comb begin
    f_next = f;
    wrap   = 1'b0;
    found  = 1'b0;
    pivot  = 0;
    last   = (kf == '0) ? 0 : int'(kf) - 1;
    if (f[last] < limit) begin
      f_next[last] = f[last] + POS_W'(1);
    end else begin
      for (int i = int'(K) - 2; i >= 0; i--) begin
        if (!found && (i < int'(last)) && ((f[i] + POS_W'(1)) < f[i+1])) begin
          found = 1'b1;
          pivot = i;
        end
      end
      if (found) begin
        for (int j = 0; j < int'(K); j++) begin
          if ((j >= int'(pivot)) && (j <= int'(last)))
            f_next[j] = f[pivot] + POS_W'(j - int'(pivot) + 1);
        end
      end else begin
        wrap = 1'b1;
      end
    end
  end

endmodule
