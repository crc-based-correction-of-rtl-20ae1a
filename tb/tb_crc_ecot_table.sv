// tb_crc_ecot_table -- writes random rows of the default (2^16-row) table,
// column by column, and reads them back: the P1 column and the next column
// must be written independently and the read must follow the address in the
// same cycle.
module tb_crc_ecot_table;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        we_p1, we_nx;
  logic [15:0] waddr, wp1, wnx, raddr, rp1, rnx;
  crc_ecot_table dut (.clk, .we_p1, .we_nx, .waddr, .wdata_p1(wp1), .wdata_nx(wnx),
                      .raddr, .rdata_p1(rp1), .rdata_nx(rnx));

  logic [15:0] addrs [64], p1s [64], nxs [64];

  initial begin
    we_p1 = 0; we_nx = 0; waddr = 0; wp1 = 0; wnx = 0; raddr = 0;
    for (int i = 0; i < 64; i++) begin
      addrs[i] = 16'(i * 1021 + 7);
      p1s[i]   = 16'($urandom);
      nxs[i]   = 16'($urandom);
    end
    // both columns
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we_p1 = 1; we_nx = 1; waddr = addrs[i]; wp1 = p1s[i]; wnx = nxs[i];
    end
    @(negedge clk);
    we_p1 = 0; we_nx = 0;
    // overwrite only P1 of the even rows, only next of the odd rows
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we_p1 = (i % 2 == 0); we_nx = (i % 2 == 1); waddr = addrs[i];
      wp1 = ~p1s[i]; wnx = ~nxs[i];
    end
    @(negedge clk);
    we_p1 = 0; we_nx = 0;
    for (int i = 0; i < 64; i++) begin
      raddr = addrs[i];
      #1;
      checks += 2;
      if (rp1 != ((i % 2 == 0) ? ~p1s[i] : p1s[i])) begin failures++; $display("FAIL P1 row %0d", addrs[i]); end
      if (rnx != ((i % 2 == 1) ? ~nxs[i] : nxs[i])) begin failures++; $display("FAIL next row %0d", addrs[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
