// tb_crc_table_gen -- builds the table for the CRC-5 example polynomial
// g = x^5 + x^4 + x^2 + 1 and compares every row with the published table
// (P1 and next), the cycle length (15) and the fill time (done in cycle 2^n + cycle + 2, start in cycle 0).
// Then builds the CRC-16-CCITT table (default parameters) and checks the cycle
// length 2^15 - 1, the published special syndromes (self-loops 30735 and
// 34832, no single error at 61471), random rows against a direct scan of
// x^p mod g, and the next column against the next-element rule.
module tb_crc_table_gen;
  import tb_crc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- CRC-5
  logic       st5, busy5, done5, we_p1_5, we_nx_5;
  logic [4:0] cyc5, wa5, wn5, ra5, rn5;
  logic [4:0] wp5, rp5;
  crc_table_gen #(.CRC_W(5), .G(6'b110101), .P1_W(5)) gen5 (
    .clk, .rst_n, .start(st5), .busy(busy5), .done(done5), .cycle_len(cyc5),
    .we_p1(we_p1_5), .we_nx(we_nx_5), .waddr(wa5), .wdata_p1(wp5), .wdata_nx(wn5));
  crc_ecot_table #(.CRC_W(5), .P1_W(5)) tab5 (
    .clk, .we_p1(we_p1_5), .we_nx(we_nx_5), .waddr(wa5), .wdata_p1(wp5),
    .wdata_nx(wn5), .raddr(ra5), .rdata_p1(rp5), .rdata_nx(rn5));

  // ---------------- CRC-16 (defaults)
  logic        st16, busy16, done16, we_p1_16, we_nx_16;
  logic [15:0] cyc16, wa16, wn16, ra16, rn16, wp16, rp16;
  crc_table_gen gen16 (
    .clk, .rst_n, .start(st16), .busy(busy16), .done(done16), .cycle_len(cyc16),
    .we_p1(we_p1_16), .we_nx(we_nx_16), .waddr(wa16), .wdata_p1(wp16), .wdata_nx(wn16));
  crc_ecot_table tab16 (
    .clk, .we_p1(we_p1_16), .we_nx(we_nx_16), .waddr(wa16), .wdata_p1(wp16),
    .wdata_nx(wn16), .raddr(ra16), .rdata_p1(rp16), .rdata_nx(rn16));

  // published CRC-5 table, rows 0..31 (-1 = no single error)
  int p1_5 [32] = '{-1, 0, 1, -1, 2, -1, -1, 10, 3, -1, -1, 7, -1, 13, 11, -1,
                    4, -1, -1, -1, -1, 5, 8, -1, -1, 9, 14, -1, 12, -1, -1, 6};
  int nx_5 [32] = '{23, 13, 22, 12, 21, 15, 20, 14, 19, 9, 18, 8, 17, 11, 16, 10,
                    31, 5, 30, 4, 29, 7, 28, 6, 27, 1, 26, 0, 25, 3, 24, 2};

  int cyc;

  initial begin
    st5 = 0; st16 = 0; ra5 = 0; ra16 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // CRC-5
    st5 <= 1;
    @(posedge clk);
    st5 <= 0;
    cyc = 1;
    while (!done5) begin
      @(posedge clk);
      cyc++;
    end
    check(cyc == 32 + 15 + 2, $sformatf("crc5 fill took %0d cycles, expected %0d", cyc, 32 + 15 + 2));
    check(cyc5 == 15, $sformatf("crc5 cycle length %0d", cyc5));
    for (int i = 0; i < 32; i++) begin
      ra5 = 5'(i);
      #1;
      check((p1_5[i] < 0) ? (rp5 == 5'h1F) : (int'(rp5) == p1_5[i]),
            $sformatf("crc5 P1[%0d] = %0d, expected %0d", i, rp5, p1_5[i]));
      check(int'(rn5) == nx_5[i], $sformatf("crc5 next[%0d] = %0d, expected %0d", i, rn5, nx_5[i]));
    end
    // CRC-16
    @(posedge clk);
    st16 <= 1;
    @(posedge clk);
    st16 <= 0;
    cyc = 1;
    while (!done16) begin
      @(posedge clk);
      cyc++;
    end
    check(cyc == 65536 + 32767 + 2, $sformatf("crc16 fill took %0d cycles", cyc));
    check(cyc16 == 16'd32767, $sformatf("crc16 cycle length %0d", cyc16));
    ra16 = 16'd30735; #1;
    check(rn16 == 16'd30735, "crc16 type I self-loop 30735");
    ra16 = 16'd34832; #1;
    check(rn16 == 16'd34832, "crc16 type II self-loop 34832");
    ra16 = 16'd61471; #1;
    check(rp16 == 16'hFFFF, "crc16 61471 has no single error");
    check(^ra16 == 1'b1, "61471 has odd weight");
    ra16 = 16'd0; #1;
    check(rp16 == 16'hFFFF, "crc16 syndrome 0 has no single error");
    for (int k = 0; k < 120; k++) begin
      int exp_p;
      poly_t nx_lhs, nx_rhs;
      ra16 = (k < 16) ? 16'(1 << k) : 16'($urandom);
      #1;
      exp_p = first_pos(64'(ra16), 16, 64'h1_1021, 32767);
      check((exp_p < 0) ? (rp16 == 16'hFFFF) : (int'(rp16) == exp_p),
            $sformatf("crc16 P1[%0d] = %0d, expected %0d", ra16, rp16, exp_p));
      nx_lhs = mulmod(64'(rn16), 64'h4, 16, 64'h1_1021) ^ 64'h2;
      nx_rhs = mulmod(64'(ra16), 64'h2, 16, 64'h1_1021) ^ 64'h1;
      check(nx_lhs == nx_rhs, $sformatf("crc16 next[%0d] = %0d", ra16, rn16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
