// tb_crc_n_corr -- full candidate lists of up to N_MAX errors against an
// exhaustive scan of every error pattern of weight 1 .. N_MAX:
//   - CRC-8-CCITT (g = x^8 + x^2 + x + 1), N_MAX = 4, packets of 10 .. 28 bits;
//   - the CRC-5 example (g = x^5 + x^4 + x^2 + 1, cycle 15), N_MAX = 3, packets
//     of 6 .. 40 bits, where the self-loop syndromes and cycle repeats occur.
// Every candidate must be sorted, inside the packet, have the syndrome, and
// appear once; the number of candidates must equal the scan's.  The table is
// a testbench model built from the reference arithmetic.
module tb_crc_n_corr;
  import tb_crc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [15:0] len;
  // CRC-8, N_MAX = 4
  logic            st8, bz8, dn8, cv8;
  logic [7:0]      s8, ta8, tp8, tn8, cyc8;
  logic [2:0]      cc8;
  logic [3:0][15:0] cp8;
  logic [7:0]      p1m8 [256], nxm8 [256];
  assign tp8 = p1m8[ta8];
  assign tn8 = nxm8[ta8];
  crc_n_corr #(.CRC_W(8), .G(9'h107), .P1_W(8), .POS_W(16), .N_MAX(4)) dut8 (
    .clk, .rst_n, .start(st8), .s(s8), .len, .cycle_len(cyc8), .busy(bz8), .done(dn8),
    .taddr(ta8), .tp1(tp8), .tnx(tn8), .cand_valid(cv8), .cand_cnt(cc8), .cand_pos(cp8));
  // CRC-5, N_MAX = 3
  logic            st5, bz5, dn5, cv5;
  logic [4:0]      s5, ta5, tp5, tn5, cyc5;
  logic [1:0]      cc5;
  logic [2:0][15:0] cp5;
  logic [4:0]      p1m5 [32], nxm5 [32];
  assign tp5 = p1m5[ta5];
  assign tn5 = nxm5[ta5];
  crc_n_corr #(.CRC_W(5), .G(6'h35), .P1_W(5), .POS_W(16), .N_MAX(3)) dut5 (
    .clk, .rst_n, .start(st5), .s(s5), .len, .cycle_len(cyc5), .busy(bz5), .done(dn5),
    .taddr(ta5), .tp1(tp5), .tnx(tn5), .cand_valid(cv5), .cand_cnt(cc5), .cand_pos(cp5));

  int          got_cnt [$];
  int          got_pos [$][4];
  int          per_weight [5];

  task automatic fill(int n, poly_t g, int c, ref logic [7:0] p1m [256], ref logic [7:0] nxm [256]);
    poly_t inv2 = xpow(c - 2, n, g);
    for (int i = 0; i < (1 << n); i++) begin
      automatic int p = first_pos(poly_t'(i), n, g, c);
      automatic poly_t a = mulx(poly_t'(i), n, g) ^ 64'h3;
      p1m[i] = (p < 0) ? 8'hFF >> (8 - n) : 8'(p);
      nxm[i] = 8'(mulmod(a, inv2, n, g));
    end
  endtask

  task automatic run(int which, int syn, int L);
    got_cnt.delete(); got_pos.delete();
    @(negedge clk);
    len = 16'(L);
    if (which == 8) begin s8 = 8'(syn); st8 = 1; end
    else            begin s5 = 5'(syn); st5 = 1; end
    @(negedge clk);
    st8 = 0; st5 = 0;
    while (!((which == 8) ? dn8 : dn5)) begin
      automatic int row [4];
      if (which == 8 && cv8) begin
        for (int i = 0; i < 4; i++) row[i] = int'(cp8[i]);
        got_cnt.push_back(int'(cc8)); got_pos.push_back(row);
      end
      if (which == 5 && cv5) begin
        for (int i = 0; i < 3; i++) row[i] = int'(cp5[i]);
        row[3] = 0;
        got_cnt.push_back(int'(cc5)); got_pos.push_back(row);
      end
      @(negedge clk);
    end
  endtask

  task automatic compare(int n, poly_t g, int nmax, int syn, int L);
    poly_t xp [];
    int exp_n = 0;
    bit seen [longint];
    xp = new[L];
    foreach (xp[p]) xp[p] = xpow(p, n, g);
    for (int a = 0; a < L; a++) begin
      if (xp[a] == poly_t'(syn)) exp_n++;
      for (int b = a + 1; b < L; b++) begin
        if ((xp[a] ^ xp[b]) == poly_t'(syn)) exp_n++;
        if (nmax >= 3) for (int c = b + 1; c < L; c++) begin
          if ((xp[a] ^ xp[b] ^ xp[c]) == poly_t'(syn)) exp_n++;
          if (nmax >= 4) for (int d = c + 1; d < L; d++)
            if ((xp[a] ^ xp[b] ^ xp[c] ^ xp[d]) == poly_t'(syn)) exp_n++;
        end
      end
    end
    check(got_cnt.size() == exp_n, $sformatf("n=%0d N=%0d s=%0d L=%0d: %0d candidates, expected %0d",
                                             n, nmax, syn, L, got_cnt.size(), exp_n));
    foreach (got_cnt[i]) begin
      automatic poly_t acc = 0;
      automatic bit ok = (got_cnt[i] >= 1) && (got_cnt[i] <= nmax);
      automatic longint key = got_cnt[i];
      for (int j = 0; j < got_cnt[i] && j < 4; j++) begin
        ok &= (got_pos[i][j] < L);
        if (j > 0) ok &= (got_pos[i][j] > got_pos[i][j-1]);
        if (got_pos[i][j] < L) acc ^= xp[got_pos[i][j]];
        key = key * 64 + got_pos[i][j];
      end
      ok &= (acc == poly_t'(syn)) && !seen.exists(key);
      seen[key] = 1;
      if (got_cnt[i] >= 1 && got_cnt[i] <= 4) per_weight[got_cnt[i]]++;
      check(ok, $sformatf("n=%0d s=%0d L=%0d: bad candidate %0d: %0d errors at %0d %0d %0d %0d",
                          n, syn, L, i, got_cnt[i], got_pos[i][0], got_pos[i][1], got_pos[i][2], got_pos[i][3]));
    end
  endtask

  logic [7:0] t5p [256], t5n [256];

  initial begin
    int c5, c8;
    st8 = 0; st5 = 0; s8 = 0; s5 = 0; len = 0;
    per_weight = '{default: 0};
    c5 = period(5, 64'h35);
    c8 = period(8, 64'h107);
    cyc5 = 5'(c5); cyc8 = 8'(c8);
    fill(8, 64'h107, c8, p1m8, nxm8);
    fill(5, 64'h35, c5, t5p, t5n);
    for (int i = 0; i < 32; i++) begin p1m5[i] = t5p[i][4:0]; nxm5[i] = t5n[i][4:0]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      automatic int syn = 1 + $urandom % 255;
      automatic int L = 10 + $urandom % 19;
      run(8, syn, L);
      compare(8, 64'h107, 4, syn, L);
    end
    // the self-loop (9, 26) and no-single-error (19) syndromes among others
    for (int t = 0; t < 20; t++) begin
      automatic int syn = (t == 0) ? 9 : (t == 1) ? 26 : (t == 2) ? 19 : 1 + $urandom % 31;
      automatic int L = 6 + $urandom % 35;
      run(5, syn, L);
      compare(5, 64'h35, 3, syn, L);
    end
    // short packets: fewer bits than N_MAX
    run(8, 8'h03, 3);
    compare(8, 64'h107, 4, 3, 3);
    for (int w = 1; w <= 4; w++) check(per_weight[w] > 0, $sformatf("no candidate of weight %0d seen", w));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
