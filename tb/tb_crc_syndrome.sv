// tb_crc_syndrome -- checks the serial syndrome.
//   1. Single errors in a 10-bit payload + 8-bit CRC protected by
//      CRC-8-SAE-J1850 (g = x^8 + x^4 + x^3 + x^2 + 1): the syndrome of an error
//      at position p must be the published single error table entry.
//   2. CRC-16-CCITT (defaults): random payloads with their remainder appended
//      give syndrome 0; random error patterns give e(x) mod g computed from
//      x^p mod g.
module tb_crc_syndrome;
  import tb_crc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       clr8, v8, b8;
  logic [7:0] syn8;
  crc_syndrome #(.CRC_W(8), .G(9'h11D)) dut8 (.clk, .rst_n, .clear(clr8), .in_valid(v8), .in_bit(b8), .syndrome(syn8));
  logic        clr16, v16, b16;
  logic [15:0] syn16;
  crc_syndrome dut16 (.clk, .rst_n, .clear(clr16), .in_valid(v16), .in_bit(b16), .syndrome(syn16));

  // published syndromes of single errors at positions 0..17
  bit [7:0] tab1 [18] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80,
                          8'h1D, 8'h3A, 8'h74, 8'hE8, 8'hCD, 8'h87, 8'h13, 8'h26,
                          8'h4C, 8'h98};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // feed a packet, bit L-1 first
  task automatic feed16(bit pkt [], int L);
    @(posedge clk); clr16 <= 1; @(posedge clk); clr16 <= 0;
    for (int q = 0; q < L; q++) begin
      v16 <= 1; b16 <= pkt[L-1-q];
      @(posedge clk);
    end
    v16 <= 0;
    @(posedge clk);
  endtask

  initial begin
    clr8 = 0; v8 = 0; b8 = 0; clr16 = 0; v16 = 0; b16 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 18; p++) begin
      @(posedge clk); clr8 <= 1; @(posedge clk); clr8 <= 0;
      for (int q = 17; q >= 0; q--) begin
        v8 <= 1; b8 <= (q == p);
        @(posedge clk);
      end
      v8 <= 0;
      @(posedge clk);
      check(syn8 == tab1[p], $sformatf("J1850 position %0d syndrome %h, expected %h", p, syn8, tab1[p]));
    end
    for (int t = 0; t < 40; t++) begin
      int m, L;
      bit pkt [];
      poly_t rem, es;
      m = 8 + ($urandom % 200);
      L = m + 16;
      pkt = new[L];
      // payload in positions 16..L-1, remainder of d(x) x^16 in 0..15
      rem = 0;
      for (int p = 0; p < L; p++) pkt[p] = 0;
      for (int p = 16; p < L; p++) begin
        pkt[p] = 1'($urandom);
        if (pkt[p]) rem ^= xpow(p, 16, 64'h1_1021);
      end
      for (int p = 0; p < 16; p++) pkt[p] = rem[p];
      feed16(pkt, L);
      check(syn16 == 16'h0, $sformatf("intact packet %0d gives syndrome %h", t, syn16));
      es = 0;
      for (int e = 0; e < 1 + t % 4; e++) begin
        automatic int p = $urandom % L;
        pkt[p] = ~pkt[p];
        es ^= xpow(p, 16, 64'h1_1021);
      end
      feed16(pkt, L);
      check(syn16 == es[15:0], $sformatf("packet %0d syndrome %h, expected %h", t, syn16, es[15:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
