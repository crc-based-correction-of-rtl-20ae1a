// tb_crc_ecot_top -- end-to-end test of the corrector, CRC-8-CCITT version.
// The top is built for g = x^8 + x^2 + x + 1, up to 3 errors, packets of up
// to 256 bits.  The testbench builds packets (payload with a valid 16-bit
// one's-complement checksum in its first 16 bits, then the CRC), injects
// errors, streams them, and checks every result against a brute-force model
// that lists all patterns of up to 3 errors with the syndrome and counts those
// passing the checksum:
//   - table generation: in_ready stays low, table_ready rises after
//     2^8 + 127 + 2 cycles, cycle_len = 127, the special syndromes are
//     126 / 131 / 253;
//   - clean packets give NO_ERROR 3 cycles after the edge that takes the last
//     bit (the testbench counts 4 from the negedge that drives it);
//   - damaged packets: the number of candidates and of checksum passes must
//     match the model; the status must be CORRECTED / AMBIGUOUS / NO_CANDIDATE
//     as the accepted count is 1 / more / 0, with and without the checksum
//     filter; a corrected packet must read back equal to the one sent;
//   - packets longer than 256 bits give TOO_LONG;
//   - syndromes equal to each special syndrome raise the matching flag;
//   - in_ready stays low while a search runs (the sender stalls).
// Each of these is counted, and each count must be non-zero at the end.
module tb_crc_ecot_top;
  import tb_crc_ref_pkg::*;
  import crc_ecot_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int          NW = 8;
  localparam poly_t       GP = 64'h107;
  localparam int          LM = 256;
  localparam int          NM = 3;

  logic                 table_ready, busy, cfg_cs, in_ready, in_valid, in_bit, in_last, res_valid;
  logic [7:0]           cycle_len, x_s1, x_s2, x_ns, res_syn;
  logic                 x_s1_ok, x_ns_ok, r_s1, r_s2, r_ns;
  logic [2:0]           res_status;
  logic [15:0]          res_len, res_cs, res_nc, res_np, rd_word;
  logic [1:0]           res_ec;
  logic [NM-1:0][15:0]  res_pos;
  logic [3:0]           rd_idx;

  crc_ecot_top #(.CRC_W(NW), .G(9'h107), .P1_W(8), .POS_W(16), .L_MAX(LM), .N_MAX(NM),
                 .CNT_W(16)) dut (
    .clk, .rst_n, .table_ready, .cycle_len,
    .exc_self1(x_s1), .exc_self1_exists(x_s1_ok), .exc_self2(x_s2),
    .exc_nosingle(x_ns), .exc_nosingle_exists(x_ns_ok), .busy,
    .cfg_use_checksum(cfg_cs), .in_ready, .in_valid, .in_bit, .in_last,
    .res_valid, .res_status, .res_syndrome(res_syn), .res_checksum(res_cs), .res_len,
    .res_num_cands(res_nc), .res_num_pass(res_np), .res_err_cnt(res_ec), .res_err_pos(res_pos),
    .res_exc_self1(r_s1), .res_exc_self2(r_s2), .res_exc_nosingle(r_ns),
    .rd_word_idx(rd_idx), .rd_word);

  // mechanism counters
  int n_noerr = 0, n_corr_cs = 0, n_corr_nocs = 0, n_amb = 0, n_nocand = 0, n_long = 0;
  int n_f1 = 0, n_f2 = 0, n_fn = 0, n_stall = 0, n_gen = 0;

  bit sent [$];      // packet as streamed (arrival order)
  bit orig [$];      // packet before errors
  int last_latency;

  function automatic logic [15:0] psum(bit b [$], int m);
    logic [15:0] s = 0;
    for (int w = 0; w * 16 < m; w++) begin
      logic [15:0] v = 0;
      for (int i = 0; i < 16; i++) if (w * 16 + i < m) v[15 - i] = b[w * 16 + i];
      s = oadd(s, v);
    end
    return s;
  endfunction

  function automatic poly_t rem(bit b [$]);
    poly_t r = 0;
    foreach (b[i]) r = mulx(r, NW, GP) ^ poly_t'(b[i]);
    return r;
  endfunction

  // a valid packet of m payload bits
  task automatic make(int m);
    poly_t c;
    orig.delete();
    for (int i = 0; i < m; i++) orig.push_back(bit'($urandom));
    if (m >= 16) begin
      automatic logic [15:0] s;
      for (int i = 0; i < 16; i++) orig[i] = 0;
      s = ~psum(orig, m);
      for (int i = 0; i < 16; i++) orig[i] = s[15 - i];
    end
    for (int i = 0; i < NW; i++) orig.push_back(0);
    c = rem(orig);
    for (int i = 0; i < NW; i++) orig[m + i] = c[NW - 1 - i];
  endtask

  task automatic send();
    int i = 0;
    while (i < sent.size()) begin
      @(negedge clk);
      in_valid = 1; in_bit = sent[i]; in_last = (i == sent.size() - 1);
      if (in_ready) i++;
      else n_stall++;
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    last_latency = 1;
    while (!res_valid) begin
      // offer the next bit while the packet is processed: it must not be taken
      check(!in_ready, "in_ready during processing");
      in_valid = 1; in_bit = 1'($urandom);
      n_stall++;
      @(negedge clk);
      last_latency++;
    end
    in_valid = 0;
  endtask

  // model: candidate count, checksum-pass count
  task automatic model(output int nc, output int np);
    int L = sent.size();
    int m = L - NW;
    poly_t s = rem(sent);
    poly_t xp [] = new[L];
    nc = 0; np = 0;
    foreach (xp[p]) xp[p] = xpow(p, NW, GP);
    for (int a = 0; a < L; a++)
      for (int b = a; b < L; b++)
        for (int c = b; c < L; c++) begin
          // a < b < c, or a single (a == b == c), or a pair (b == c, a < b)
          automatic int w = (a == b && b == c) ? 1 : (b == c) ? 2 : (a < b) ? 3 : 0;
          automatic poly_t e;
          if (w == 0 || (a == b && b != c)) continue;
          e = (w == 1) ? xp[a] : (w == 2) ? (xp[a] ^ xp[b]) : (xp[a] ^ xp[b] ^ xp[c]);
          if (e == s) begin
            automatic bit f [$] = sent;
            nc++;
            f[L - 1 - a] = !f[L - 1 - a];
            if (w >= 2) f[L - 1 - b] = !f[L - 1 - b];
            if (w == 3) f[L - 1 - c] = !f[L - 1 - c];
            begin
              automatic logic [15:0] t = psum(f, m);
              if (t == 16'hFFFF || t == 16'h0000) np++;
            end
          end
        end
  endtask

  task automatic readback_equals_orig(string tag);
    automatic bit ok = 1;
    for (int w = 0; w < LM / 16; w++) begin
      automatic logic [15:0] e = 0;
      rd_idx = 4'(w);
      for (int i = 0; i < 16; i++) if (w * 16 + i < orig.size()) e[15 - i] = orig[w * 16 + i];
      #1;
      if (rd_word != e) $display("  word %0d: %h, expected %h", w, rd_word, e);
      ok &= (rd_word == e);
    end
    check(ok, {tag, ": corrected packet differs from the sent one"});
  endtask

  // one damaged packet, errors at arrival indices q
  task automatic run_damaged(int qs [$], bit use_cs, string tag);
    int nc, np, acc;
    sent = orig;
    foreach (qs[i]) sent[qs[i]] = !sent[qs[i]];
    cfg_cs = use_cs;
    send();
    model(nc, np);
    acc = use_cs ? np : nc;
    check(int'(res_len) == sent.size(), $sformatf("%s: len %0d", tag, res_len));
    check(res_syn == 8'(rem(sent)), $sformatf("%s: syndrome", tag));
    if (rem(sent) == 0) begin
      check(res_status == ST_NO_ERROR, $sformatf("%s: status %0d, expected NO_ERROR", tag, res_status));
      return;
    end
    check(int'(res_nc) == nc && int'(res_np) == np,
          $sformatf("%s: %0d candidates / %0d pass, expected %0d / %0d", tag, res_nc, res_np, nc, np));
    check(r_s1 == (res_syn == 8'd126) && r_s2 == (res_syn == 8'd131) && r_ns == (res_syn == 8'd253),
          $sformatf("%s: exception flags", tag));
    n_f1 += r_s1; n_f2 += r_s2; n_fn += r_ns;
    if (acc == 1) begin
      check(res_status == ST_CORRECTED, $sformatf("%s: status %0d, expected CORRECTED", tag, res_status));
      if (res_status == ST_CORRECTED) begin
        if (use_cs) n_corr_cs++; else n_corr_nocs++;
        check(int'(res_ec) == qs.size() || qs.size() > NM, $sformatf("%s: %0d errors reported", tag, res_ec));
        if (qs.size() <= NM) readback_equals_orig(tag);
        if (failures > 0 && failures < 3) $display("%s: L=%0d injected q %p picked pos %0d %0d %0d cnt %0d", tag, sent.size(), qs, res_pos[0], res_pos[1], res_pos[2], res_ec);
      end
    end else if (acc == 0) begin
      check(res_status == ST_NO_CANDIDATE, $sformatf("%s: status %0d, expected NO_CANDIDATE", tag, res_status));
      n_nocand += (res_status == ST_NO_CANDIDATE);
    end else begin
      check(res_status == ST_AMBIGUOUS, $sformatf("%s: status %0d, expected AMBIGUOUS", tag, res_status));
      n_amb += (res_status == ST_AMBIGUOUS);
    end
  endtask

  function automatic void rand_errs(ref int qs [$], input int k, input int L);
    qs.delete();
    while (qs.size() < k) begin
      automatic int q = $urandom % L;
      if (!(q inside {qs})) qs.push_back(q);
    end
  endfunction

  initial begin
    int qs [$];
    int gen_cycles;
    in_valid = 0; in_bit = 0; in_last = 0; cfg_cs = 1; rd_idx = 0; gen_cycles = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- table generation
    in_valid = 1;
    while (!table_ready) begin
      check(!in_ready, "in_ready during table generation");
      @(negedge clk);
      gen_cycles++;
    end
    in_valid = 0;
    n_gen++;
    check(gen_cycles == 256 + 127 + 2, $sformatf("table ready after %0d cycles", gen_cycles));
    check(cycle_len == 8'd127, $sformatf("cycle length %0d", cycle_len));
    check(x_s1 == 8'd126 && x_s2 == 8'd131 && x_ns == 8'd253 && x_s1_ok && x_ns_ok, "special syndromes");
    // ---- clean packets
    for (int t = 0; t < 10; t++) begin
      make(16 + $urandom % 120);
      sent = orig;
      cfg_cs = 1'(t % 2);
      send();
      check(res_status == ST_NO_ERROR && res_syn == 0, $sformatf("clean packet: status %0d", res_status));
      check(last_latency == 4, $sformatf("clean packet: result after %0d cycles", last_latency));
      check(res_cs == 16'hFFFF, $sformatf("clean packet: checksum %h", res_cs));
      n_noerr += (res_status == ST_NO_ERROR);
    end
    // ---- damaged packets with the checksum filter
    for (int t = 0; t < 40; t++) begin
      make(16 + $urandom % 100);
      rand_errs(qs, 1 + t % 3, orig.size());
      run_damaged(qs, 1, $sformatf("cs t=%0d", t));
    end
    // ---- short packets without the checksum filter (few candidates)
    for (int t = 0; t < 60; t++) begin
      make(1 + $urandom % 4);
      rand_errs(qs, 1 + $urandom % 3, orig.size());
      run_damaged(qs, 0, $sformatf("nocs t=%0d", t));
    end
    // ---- long packets without the filter: ambiguous
    for (int t = 0; t < 4; t++) begin
      make(60 + $urandom % 40);
      rand_errs(qs, 2, orig.size());
      run_damaged(qs, 0, $sformatf("amb t=%0d", t));
    end
    // ---- many errors with the filter: usually no candidate passes
    for (int t = 0; t < 6; t++) begin
      make(40 + $urandom % 60);
      rand_errs(qs, 8, orig.size());
      run_damaged(qs, 1, $sformatf("many t=%0d", t));
    end
    // ---- special syndromes: one error pattern for each
    for (int k = 0; k < 3; k++) begin
      automatic int target = (k == 0) ? 126 : (k == 1) ? 131 : 253;
      automatic bit found = 0;
      make(40);
      for (int a = 0; a < orig.size() && !found; a++)
        for (int b = a + 1; b < orig.size() && !found; b++)
          for (int c = b + 1; c < orig.size() && !found; c++)
            if ((xpow(a, NW, GP) ^ xpow(b, NW, GP) ^ xpow(c, NW, GP)) == poly_t'(target)) begin
              found = 1;
              qs = '{orig.size() - 1 - a, orig.size() - 1 - b, orig.size() - 1 - c};
            end
      run_damaged(qs, 1, $sformatf("special %0d", target));
    end
    // ---- too long
    for (int t = 0; t < 3; t++) begin
      make(LM - NW + 1 + $urandom % 40);
      sent = orig;
      sent[5] = !sent[5];
      send();
      check(res_status == ST_TOO_LONG, $sformatf("long packet: status %0d", res_status));
      n_long += (res_status == ST_TOO_LONG);
    end
    $display("mechanisms: gen %0d noerr %0d corrected(cs) %0d corrected(no cs) %0d ambiguous %0d nocand %0d toolong %0d self1 %0d self2 %0d nosingle %0d stall %0d",
             n_gen, n_noerr, n_corr_cs, n_corr_nocs, n_amb, n_nocand, n_long, n_f1, n_f2, n_fn, n_stall);
    check(n_gen > 0 && n_noerr > 0 && n_corr_cs > 0 && n_corr_nocs > 0 && n_amb > 0 && n_nocand > 0 &&
          n_long > 0 && n_f1 > 0 && n_f2 > 0 && n_fn > 0 && n_stall > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
