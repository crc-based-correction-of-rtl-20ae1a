// tb_crc_packet_buffer -- storage, position reads, flips and word reads.
// A buffer of 100 bits receives random packets of 1 .. 100 bits and some of
// 101 .. 130 bits (which must set overflow and keep the first 100).  After
// each packet: len, the two position reads at random positions (including
// positions past the end, which read 0), every 16-bit word, and random flips
// (including positions past the end, which do nothing), all against a model.
// clear empties the buffer; clear with a write starts a new packet with that bit.  Writes take effect at the clock edge.
module tb_crc_packet_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int LM = 100;
  logic            clear, wr_en, wr_bit, ovf, flip_en;
  logic [7:0]      len, flip_pos;
  logic [1:0][7:0] rd_pos;
  logic [1:0]      rd_bit;
  logic [2:0]      widx;
  logic [15:0]     word;

  crc_packet_buffer #(.L_MAX(LM), .POS_W(8), .N_RD(2)) dut (
    .clk, .rst_n, .clear, .wr_en, .wr_bit, .len, .overflow(ovf),
    .rd_pos, .rd_bit, .flip_en, .flip_pos, .word_idx(widx), .word);

  bit model [LM];
  int mlen;

  task automatic compare_all(string tag);
    check(int'(len) == mlen, $sformatf("%s: len %0d, expected %0d", tag, len, mlen));
    for (int w = 0; w < (LM + 15) / 16; w++) begin
      automatic logic [15:0] e = 0;
      widx = 3'(w);
      for (int i = 0; i < 16; i++) if (w * 16 + i < mlen) e[15 - i] = model[w * 16 + i];
      #1;
      check(word == e, $sformatf("%s: word %0d = %h, expected %h", tag, w, word, e));
    end
    for (int t = 0; t < 20; t++) begin
      automatic int p0 = $urandom % (LM + 20), p1 = $urandom % (mlen + 1);
      rd_pos[0] = 8'(p0); rd_pos[1] = 8'(p1);
      #1;
      check(rd_bit[0] == ((p0 < mlen) ? model[mlen - 1 - p0] : 1'b0) &&
            rd_bit[1] == ((p1 < mlen) ? model[mlen - 1 - p1] : 1'b0),
            $sformatf("%s: reads at %0d, %0d", tag, p0, p1));
    end
    @(negedge clk);
  endtask

  initial begin
    clear = 0; wr_en = 0; wr_bit = 0; flip_en = 0; flip_pos = 0; rd_pos = '0; widx = 0;
    mlen = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(len == 0 && !ovf, "empty after reset");
    for (int t = 0; t < 60; t++) begin
      automatic int n = (t % 5 == 4) ? LM + 1 + $urandom % 30 : 1 + $urandom % LM;
      mlen = 0;
      if (t % 2 == 0) begin
        clear = 1; @(negedge clk); clear = 0;
        check(len == 0 && !ovf, $sformatf("empty after clear t=%0d len=%0d ovf=%b", t, len, ovf));
      end
      for (int i = 0; i < n; i++) begin
        // odd packets: clear together with the first bit
        clear = (t % 2 == 1) && (i == 0);
        wr_en = 1; wr_bit = 1'($urandom);
        if (mlen < LM) begin model[mlen] = wr_bit; mlen++; end
        @(negedge clk);
      end
      wr_en = 0; clear = 0;
      check(ovf == (n > LM), $sformatf("overflow %b for %0d bits", ovf, n));
      compare_all("loaded");
      for (int f = 0; f < 8; f++) begin
        automatic int p = $urandom % (mlen + 5);
        flip_en = 1; flip_pos = 8'(p);
        @(negedge clk);
        flip_en = 0;
        if (p < mlen) model[mlen - 1 - p] = !model[mlen - 1 - p];
      end
      compare_all("flipped");
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
