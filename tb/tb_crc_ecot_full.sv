// tb_crc_ecot_full -- the corrector at its default size.
// crc_ecot_top with every parameter at its default: CRC-16-CCITT
// (g = 0x11021), up to 3 errors, packets of up to 1500 payload bytes + CRC.
// Checks:
//   - table_ready after 2^16 + 32767 + 2 cycles, cycle_len = 32767, special
//     syndromes 30735 / 34832 / 61471;
//   - a clean 1500-byte packet gives NO_ERROR 3 cycles after the edge that
//     takes its last bit (counted as 4 from the driving negedge);
//   - 64-byte packets with 1, 2 and 3 errors: the candidate count equals a
//     brute-force count over all patterns of up to 3 errors, the checksum
//     count equals the model's, the status follows from them and a corrected
//     packet reads back as sent;
//   - one 1500-byte packet with 2 errors: the injected pattern passes the
//     checksum, so at least one candidate must pass, and if it is the only
//     one the packet must read back as sent; the search time is reported;
//   - a 1501-byte packet gives TOO_LONG.
module tb_crc_ecot_full;
  import tb_crc_ref_pkg::*;
  import crc_ecot_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int    NW = 16;
  localparam poly_t GP = 64'h11021;
  localparam int    LM = L_MAX_DEF;

  logic                  table_ready, busy, cfg_cs, in_ready, in_valid, in_bit, in_last, res_valid;
  logic [15:0]           cycle_len, x_s1, x_s2, x_ns, res_syn;
  logic                  x_s1_ok, x_ns_ok, r_s1, r_s2, r_ns;
  logic [2:0]            res_status;
  logic [15:0]           res_len, res_cs, rd_word;
  logic [31:0]           res_nc, res_np;
  logic [1:0]            res_ec;
  logic [2:0][15:0]      res_pos;
  logic [9:0]            rd_idx;

  crc_ecot_top dut (
    .clk, .rst_n, .table_ready, .cycle_len,
    .exc_self1(x_s1), .exc_self1_exists(x_s1_ok), .exc_self2(x_s2),
    .exc_nosingle(x_ns), .exc_nosingle_exists(x_ns_ok), .busy,
    .cfg_use_checksum(cfg_cs), .in_ready, .in_valid, .in_bit, .in_last,
    .res_valid, .res_status, .res_syndrome(res_syn), .res_checksum(res_cs), .res_len,
    .res_num_cands(res_nc), .res_num_pass(res_np), .res_err_cnt(res_ec), .res_err_pos(res_pos),
    .res_exc_self1(r_s1), .res_exc_self2(r_s2), .res_exc_nosingle(r_ns),
    .rd_word_idx(rd_idx), .rd_word);

  bit sent [$];
  bit orig [$];
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

  task automatic make(int m);
    poly_t c;
    logic [15:0] s;
    orig.delete();
    for (int i = 0; i < m; i++) orig.push_back(bit'($urandom));
    for (int i = 0; i < 16; i++) orig[i] = 0;
    s = ~psum(orig, m);
    for (int i = 0; i < 16; i++) orig[i] = s[15 - i];
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
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    last_latency = 1;
    while (!res_valid) begin @(negedge clk); last_latency++; end
  endtask

  task automatic model(output int nc, output int np);
    int L = sent.size();
    int m = L - NW;
    poly_t s = rem(sent);
    poly_t xp [] = new[L];
    nc = 0; np = 0;
    foreach (xp[p]) xp[p] = xpow(p, NW, GP);
    for (int a = 0; a < L; a++) begin
      for (int b = a; b < L; b++) begin
        automatic poly_t ab = (a == b) ? xp[a] : (xp[a] ^ xp[b]);
        if (a == b) begin
          if (ab == s) begin nc++; np += passes('{a}, m); end
          continue;
        end
        if (ab == s) begin nc++; np += passes('{a, b}, m); end
        for (int c = b + 1; c < L; c++)
          if ((ab ^ xp[c]) == s) begin nc++; np += passes('{a, b, c}, m); end
      end
    end
  endtask

  function automatic int passes(int ps [$], int m);
    automatic bit f [$] = sent;
    automatic logic [15:0] t;
    foreach (ps[i]) f[f.size() - 1 - ps[i]] = !f[f.size() - 1 - ps[i]];
    t = psum(f, m);
    return (t == 16'hFFFF || t == 16'h0000) ? 1 : 0;
  endfunction

  task automatic readback(string tag);
    automatic bit ok = 1;
    for (int w = 0; w * 16 < orig.size(); w++) begin
      automatic logic [15:0] e = 0;
      rd_idx = 10'(w);
      for (int i = 0; i < 16; i++) if (w * 16 + i < orig.size()) e[15 - i] = orig[w * 16 + i];
      #1;
      ok &= (rd_word == e);
    end
    check(ok, {tag, ": corrected packet differs from the sent one"});
  endtask

  initial begin
    int gen_cycles = 0, t0;
    in_valid = 0; in_bit = 0; in_last = 0; cfg_cs = 1; rd_idx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!table_ready) begin @(negedge clk); gen_cycles++; end
    check(gen_cycles == 65536 + 32767 + 2, $sformatf("table ready after %0d cycles", gen_cycles));
    check(cycle_len == 16'd32767, $sformatf("cycle length %0d", cycle_len));
    check(x_s1 == 16'd30735 && x_s2 == 16'd34832 && x_ns == 16'd61471, "special syndromes");
    // clean maximum packet
    make(1500 * 8);
    sent = orig;
    send();
    check(res_status == ST_NO_ERROR && last_latency == 4 && int'(res_len) == LM,
          $sformatf("clean 1500-byte packet: status %0d after %0d cycles", res_status, last_latency));
    // 64-byte packets
    for (int k = 1; k <= 3; k++) begin
      automatic int nc, np, q;
      make(64 * 8);
      sent = orig;
      for (int j = 0; j < k; j++) begin
        do q = $urandom % sent.size(); while (sent[q] != orig[q]);
        sent[q] = !sent[q];
      end
      t0 = $time;
      send();
      model(nc, np);
      $display("64-byte packet, %0d errors: %0d candidates, %0d pass, status %0d, %0d cycles",
               k, res_nc, res_np, res_status, last_latency);
      check(int'(res_nc) == nc && int'(res_np) == np,
            $sformatf("%0d errors: %0d / %0d, expected %0d / %0d", k, res_nc, res_np, nc, np));
      check(res_status == ((np == 1) ? ST_CORRECTED : (np == 0) ? ST_NO_CANDIDATE : ST_AMBIGUOUS),
            $sformatf("%0d errors: status %0d", k, res_status));
      if (res_status == ST_CORRECTED) readback($sformatf("%0d errors", k));
    end
    // maximum packet with 2 errors
    begin
      automatic int q1, q2;
      make(1500 * 8);
      sent = orig;
      q1 = $urandom % sent.size();
      do q2 = $urandom % sent.size(); while (q2 == q1);
      sent[q1] = !sent[q1]; sent[q2] = !sent[q2];
      send();
      $display("1500-byte packet, 2 errors: %0d candidates, %0d pass, status %0d, %0d cycles",
               res_nc, res_np, res_status, last_latency);
      check(res_np >= 1 && res_status != ST_NO_CANDIDATE, "1500-byte packet: injected pattern not accepted");
      if (res_status == ST_CORRECTED) readback("1500-byte");
    end
    // too long
    make(1500 * 8 + 8);
    sent = orig;
    send();
    check(res_status == ST_TOO_LONG, $sformatf("1501-byte packet: status %0d", res_status));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
