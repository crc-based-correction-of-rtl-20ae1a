// tb_crc_double_corr -- double error lists against an exhaustive scan of all
// position pairs (x^a + x^b mod g == s), for the CRC-5 example (short cycle,
// so many repeats of P1 + cycle) and CRC-8-CCITT, with random syndromes,
// lengths and base offsets.  The table is a testbench model: P1 from a scan of
// x^p, next solved from next * x^2 + x = s * x + 1 (mod g).  Timing: done in
// cycle len + (candidates - forced positions that had a candidate), i.e. one
// lookup per forced position plus one cycle per further candidate.
module tb_crc_double_corr;
  import tb_crc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // CRC-5 instance
  logic        st5, bz5, dn5, cv5;
  logic [4:0]  s5, ta5, tp5, tn5, cyc5;
  logic [15:0] len, base, lo5, hi5;
  logic [4:0]  p1m5 [32], nxm5 [32];
  assign tp5 = p1m5[ta5];
  assign tn5 = nxm5[ta5];
  crc_double_corr #(.CRC_W(5), .G(6'h35), .P1_W(5), .POS_W(16)) dut5 (
    .clk, .rst_n, .start(st5), .s(s5), .len, .base, .cycle_len(cyc5), .busy(bz5), .done(dn5),
    .taddr(ta5), .tp1(tp5), .tnx(tn5), .cand_valid(cv5), .cand_lo(lo5), .cand_hi(hi5));
  // CRC-8 instance
  logic        st8, bz8, dn8, cv8;
  logic [7:0]  s8, ta8, tp8, tn8, cyc8;
  logic [15:0] lo8, hi8;
  logic [7:0]  p1m8 [256], nxm8 [256];
  assign tp8 = p1m8[ta8];
  assign tn8 = nxm8[ta8];
  crc_double_corr #(.CRC_W(8), .G(9'h107), .P1_W(8), .POS_W(16)) dut8 (
    .clk, .rst_n, .start(st8), .s(s8), .len, .base, .cycle_len(cyc8), .busy(bz8), .done(dn8),
    .taddr(ta8), .tp1(tp8), .tnx(tn8), .cand_valid(cv8), .cand_lo(lo8), .cand_hi(hi8));

  int got_lo [$], got_hi [$];

  task automatic fill(int n, poly_t g, int c, ref logic [7:0] p1m [256], ref logic [7:0] nxm [256]);
    poly_t inv2 = xpow(c - 2, n, g);   // x^-2 mod g
    for (int i = 0; i < (1 << n); i++) begin
      automatic int p = first_pos(poly_t'(i), n, g, c);
      automatic poly_t a = mulx(poly_t'(i), n, g) ^ 64'h3;
      p1m[i] = (p < 0) ? 8'hFF >> (8 - n) : 8'(p);
      nxm[i] = 8'(mulmod(a, inv2, n, g));
    end
  endtask

  task automatic run(int which, int syn, int L, int b, output int cycles);
    got_lo.delete(); got_hi.delete();
    @(negedge clk);
    len = 16'(L); base = 16'(b);
    if (which == 5) begin s5 = 5'(syn); st5 = 1; end
    else            begin s8 = 8'(syn); st8 = 1; end
    @(negedge clk);
    st5 = 0; st8 = 0;
    cycles = 1;
    while (!((which == 5) ? dn5 : dn8)) begin
      if (which == 5 && cv5) begin got_lo.push_back(int'(lo5)); got_hi.push_back(int'(hi5)); end
      if (which == 8 && cv8) begin got_lo.push_back(int'(lo8)); got_hi.push_back(int'(hi8)); end
      @(negedge clk);
      cycles++;
      if (cycles > 100000) break;
    end
  endtask

  task automatic compare(int n, poly_t g, int syn, int L, int b, int cycles);
    int exp_n = 0;
    int f1_used = 0;
    int last_f1 = -1;
    bit seen [int];
    poly_t xp [];
    xp = new[L];
    foreach (xp[p]) xp[p] = xpow(p, n, g);
    for (int a = 0; a < L; a++)
      for (int c = a + 1; c < L; c++)
        if ((xp[a] ^ xp[c]) == poly_t'(syn)) exp_n++;
    check(got_lo.size() == exp_n, $sformatf("n=%0d s=%0d L=%0d: %0d pairs, expected %0d", n, syn, L, got_lo.size(), exp_n));
    foreach (got_lo[i]) begin
      automatic int a = got_lo[i] - b;
      automatic int c = got_hi[i] - b;
      automatic bit ok = (a >= 0) && (a < c) && (c < L) && ((xp[a] ^ xp[c]) == poly_t'(syn)) && !seen.exists(a * 65536 + c);
      seen[a * 65536 + c] = 1;
      check(ok, $sformatf("n=%0d s=%0d L=%0d: bad or repeated pair (%0d, %0d)", n, syn, L, got_lo[i], got_hi[i]));
      if (got_lo[i] != last_f1) begin f1_used++; last_f1 = got_lo[i]; end
    end
    check(cycles == L + got_lo.size() - f1_used,
          $sformatf("n=%0d s=%0d L=%0d: %0d cycles, expected %0d", n, syn, L, cycles, L + got_lo.size() - f1_used));
  endtask

  logic [7:0] t5p [256], t5n [256];

  initial begin
    int c5, c8, cycles;
    st5 = 0; st8 = 0; s5 = 0; s8 = 0; len = 0; base = 0;
    c5 = period(5, 64'h35);
    c8 = period(8, 64'h107);
    cyc5 = 5'(c5); cyc8 = 8'(c8);
    fill(5, 64'h35, c5, t5p, t5n);
    for (int i = 0; i < 32; i++) begin p1m5[i] = t5p[i][4:0]; nxm5[i] = t5n[i][4:0]; end
    fill(8, 64'h107, c8, p1m8, nxm8);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      automatic int syn = 1 + $urandom % 31;
      automatic int L = 2 + $urandom % 45;
      automatic int b = (t % 3 == 0) ? 0 : $urandom % 100;
      run(5, syn, L, b, cycles);
      compare(5, 64'h35, syn, L, b, cycles);
    end
    for (int t = 0; t < 40; t++) begin
      automatic int syn = 1 + $urandom % 255;
      automatic int L = 9 + $urandom % 300;
      automatic int b = (t % 2 == 0) ? 0 : $urandom % 1000;
      run(8, syn, L, b, cycles);
      compare(8, 64'h107, syn, L, b, cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
