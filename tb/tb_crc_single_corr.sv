// tb_crc_single_corr -- single error lists for every syndrome of the CRC-5
// example (g = x^5 + x^4 + x^2 + 1, cycle 15) and for random CRC-8-CCITT
// syndromes, against a scan of x^p mod g over the packet.  The table is a
// testbench model filled from the reference.  Also checks the published
// example (syndrome 1, 50-bit packet: positions 0, 15, 30, 45) and the
// timing: done in cycle k + 3 for k candidates (k may be 0), cycle 2 when
// the table holds -1.
module tb_crc_single_corr;
  import tb_crc_ref_pkg::*;

  localparam int N = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // DUT on CRC-5, table model
  logic        start, busy, done, cv;
  logic [4:0]  s, taddr, cyc;
  logic [4:0]  tp1;
  logic [15:0] len, cpos;
  logic [4:0]  tab [32];
  assign tp1 = tab[taddr];
  crc_single_corr #(.CRC_W(5), .P1_W(5), .POS_W(16)) dut (
    .clk, .rst_n, .start, .s, .len, .cycle_len(cyc), .busy, .done,
    .taddr, .tp1, .cand_valid(cv), .cand_pos(cpos));

  // DUT on CRC-8-CCITT, table model
  logic        start8, busy8, done8, cv8;
  logic [7:0]  s8, taddr8, cyc8, tp18;
  logic [15:0] cpos8;
  logic [7:0]  tab8 [256];
  assign tp18 = tab8[taddr8];
  crc_single_corr #(.CRC_W(8), .P1_W(8), .POS_W(16)) dut8 (
    .clk, .rst_n, .start(start8), .s(s8), .len, .cycle_len(cyc8), .busy(busy8), .done(done8),
    .taddr(taddr8), .tp1(tp18), .cand_valid(cv8), .cand_pos(cpos8));

  int got [$];

  task automatic run5(int syn, int L, output int cycles);
    got.delete();
    @(negedge clk);
    s = 5'(syn); len = 16'(L); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      if (cv) got.push_back(int'(cpos));
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic run8(int syn, int L);
    got.delete();
    @(negedge clk);
    s8 = 8'(syn); len = 16'(L); start8 = 1;
    @(negedge clk);
    start8 = 0;
    while (!done8) begin
      if (cv8) got.push_back(int'(cpos8));
      @(negedge clk);
    end
  endtask

  task automatic compare(int syn, int L, int n, poly_t g);
    int exp_q [$];
    for (int p = 0; p < L; p++) if (xpow(p, n, g) == poly_t'(syn)) exp_q.push_back(p);
    check(got.size() == exp_q.size(), $sformatf("n=%0d s=%0d L=%0d: %0d candidates, expected %0d", n, syn, L, got.size(), exp_q.size()));
    foreach (exp_q[i]) if (i < got.size())
      check(got[i] == exp_q[i], $sformatf("n=%0d s=%0d L=%0d: candidate %0d is %0d, expected %0d", n, syn, L, i, got[i], exp_q[i]));
  endtask

  initial begin
    int c5, c8, cycles;
    start = 0; start8 = 0; s = 0; s8 = 0; len = 0;
    c5 = period(5, 64'h35);
    c8 = period(8, 64'h107);
    cyc = 5'(c5); cyc8 = 8'(c8);
    for (int i = 0; i < 32; i++) begin
      automatic int p = first_pos(poly_t'(i), 5, 64'h35, c5);
      tab[i] = (p < 0) ? 5'h1F : 5'(p);
    end
    for (int i = 0; i < 256; i++) begin
      automatic int p = first_pos(poly_t'(i), 8, 64'h107, c8);
      tab8[i] = (p < 0) ? 8'hFF : 8'(p);
    end
    check(c5 == 15, "CRC-5 period");
    repeat (2) @(posedge clk);
    rst_n = 1;
    // published example
    run5(1, 50, cycles);
    check(got.size() == 4 && got[0] == 0 && got[1] == 15 && got[2] == 30 && got[3] == 45,
          "syndrome 1 in 50 bits gives 0, 15, 30, 45");
    check(cycles == 4 + 3, $sformatf("4 candidates took %0d cycles", cycles));
    run5(3, 50, cycles);
    check(got.size() == 0 && cycles == 2, $sformatf("no candidate took %0d cycles", cycles));
    for (int L = 5; L <= 60; L += 11)
      for (int syn = 0; syn < 32; syn++) begin
        run5(syn, L, cycles);
        compare(syn, L, 5, 64'h35);
        check(cycles == ((tab[syn] == 5'h1F) ? 2 : got.size() + 3), $sformatf("timing s=%0d L=%0d: %0d cycles", syn, L, cycles));
      end
    for (int t = 0; t < 100; t++) begin
      automatic int syn = $urandom % 256;
      automatic int L = 9 + $urandom % 400;
      run8(syn, L);
      compare(syn, L, 8, 64'h107);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
