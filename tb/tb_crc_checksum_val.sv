// tb_crc_checksum_val -- checksum accumulation and candidate validation.
// Random packets: a payload whose first 16 bits hold a one's-complement
// checksum making the sum of all payload words 0xFFFF (odd lengths padded with
// zeros), followed by 16 random CRC bits.  After streaming, the sum must be
// 0xFFFF, and a packet with one payload bit changed must not sum to it.  Then
// random candidates of 1 .. 3 positions are offered, about half built to
// cancel in the sum (same bit of two words with opposite values), some
// touching CRC bits; the expected verdict comes from recomputing the sum of
// the flipped payload directly.  The testbench plays the packet buffer
// (rd_pos -> rd_bit) and checks the one-cycle latency.
module tb_crc_checksum_val;
  import tb_crc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int N = 3;
  logic             clear, in_valid, in_bit, finish, cv, ov, op;
  logic [15:0]      sum, len;
  logic [1:0]       cc, oc;
  logic [N-1:0][15:0] cp, rp, opos;
  logic [N-1:0]     rb;

  crc_checksum_val #(.CRC_W(16), .POS_W(16), .N_MAX(N)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_bit, .finish, .sum,
    .len, .cand_valid(cv), .cand_cnt(cc), .cand_pos(cp), .rd_pos(rp), .rd_bit(rb),
    .out_valid(ov), .out_pass(op), .out_cnt(oc), .out_pos(opos));

  bit pkt [$];   // arrival order
  bit img [512]; // copy of pkt seen by the buffer model
  int plen = 0;
  always_comb for (int r = 0; r < N; r++)
    rb[r] = (int'(rp[r]) < plen) ? img[plen - 1 - int'(rp[r])] : 1'b0;

  // one's-complement sum of the first m bits of b, MSB-first words
  function automatic logic [15:0] psum(bit b [$], int m);
    logic [15:0] s = 0;
    for (int w = 0; w * 16 < m; w++) begin
      logic [15:0] v = 0;
      for (int i = 0; i < 16; i++) if (w * 16 + i < m) v[15 - i] = b[w * 16 + i];
      s = oadd(s, v);
    end
    return s;
  endfunction

  task automatic stream(int m);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    plen = pkt.size();
    foreach (pkt[i]) img[i] = pkt[i];
    foreach (pkt[i]) begin in_valid = 1; in_bit = pkt[i]; @(negedge clk); end
    in_valid = 0; finish = 1;
    @(negedge clk); finish = 0;
  endtask

  int passes = 0, fails = 0;

  initial begin
    clear = 0; in_valid = 0; in_bit = 0; finish = 0; cv = 0; cc = 0; cp = '0; len = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic int m = 16 + $urandom % 200;
      automatic logic [15:0] s;
      pkt.delete();
      for (int i = 0; i < m + 16; i++) pkt.push_back(bit'($urandom));
      for (int i = 0; i < 16; i++) pkt[i] = 0;
      s = ~psum(pkt, m);
      for (int i = 0; i < 16; i++) pkt[i] = s[15 - i];
      len = 16'(m + 16);
      // a damaged copy first: the sum must differ
      begin
        automatic int q = $urandom % m;
        pkt[q] = !pkt[q];
        stream(m);
        check(sum != 16'hFFFF && sum != 16'h0000, $sformatf("damaged packet m=%0d sums to %h", m, sum));
        pkt[q] = !pkt[q];
      end
      stream(m);
      check(sum == 16'hFFFF, $sformatf("m=%0d: sum %h, expected ffff", m, sum));
      for (int c = 0; c < 30; c++) begin
        automatic int k = 1 + $urandom % N;
        automatic int qs [$];
        automatic bit flipped [$];
        automatic bit exp_pass;
        if (c % 2 == 0 && m >= 32) begin
          // two payload bits at the same offset in different words, opposite values
          automatic int q1 = $urandom % (m & ~15);
          automatic int q2 = (q1 + 16 * (1 + $urandom % (m / 16 - 1))) % (m & ~15);
          if (q2 / 16 == q1 / 16) q2 = (q2 + 16) % (m & ~15);
          if (pkt[q1] != pkt[q2] && q2 / 16 != q1 / 16) begin qs.push_back(q1); qs.push_back(q2); end
          else qs.push_back(q1);
          if (qs.size() < N && $urandom % 2) qs.push_back(m + $urandom % 16);  // a CRC bit
        end else begin
          while (qs.size() < k) begin
            automatic int q = $urandom % (m + 16);
            if (!(q inside {qs})) qs.push_back(q);
          end
        end
        // positions ascending = arrival indices descending
        qs.rsort();
        flipped = pkt;
        foreach (qs[i]) flipped[qs[i]] = !flipped[qs[i]];
        exp_pass = (psum(flipped, m) == 16'hFFFF) || (psum(flipped, m) == 16'h0000);
        if (exp_pass) passes++; else fails++;
        cp = '0;
        foreach (qs[i]) cp[i] = 16'(m + 16 - 1 - qs[i]);
        cc = 2'(qs.size());
        cv = 1;
        @(negedge clk);
        cv = 0;
        check(ov && op == exp_pass && oc == 2'(qs.size()) && opos == cp,
              $sformatf("m=%0d cand %0d (%0d pos): valid %b pass %b, expected %b", m, c, qs.size(), ov, op, exp_pass));
        @(negedge clk);
        check(!ov, "out_valid held");
      end
    end
    check(passes > 50 && fails > 50, $sformatf("coverage: %0d passing, %0d failing candidates", passes, fails));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
