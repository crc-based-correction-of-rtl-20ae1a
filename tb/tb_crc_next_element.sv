// tb_crc_next_element -- checks the next element against the published table
// for g = x^5 + x^4 + x^2 + 1 (every row) and, for CRC-16-CCITT, against the
// congruence next * x^2 + x = s * x + 1 (mod g) that defines it.
module tb_crc_next_element;
  import tb_crc_ref_pkg::*;

  int checks = 0, failures = 0;

  // CRC-5 example of the method
  logic [4:0]  s5, n5;
  crc_next_element #(.CRC_W(5), .G(6'b110101)) dut5 (.s(s5), .nxt(n5));
  // default: CRC-16-CCITT
  logic [15:0] s16, n16;
  crc_next_element dut16 (.s(s16), .nxt(n16));

  // next column of the published CRC-5 table, rows 0..31
  int exp5 [32] = '{23, 13, 22, 12, 21, 15, 20, 14, 19, 9, 18, 8, 17, 11, 16, 10,
                    31, 5, 30, 4, 29, 7, 28, 6, 27, 1, 26, 0, 25, 3, 24, 2};

  initial begin
    for (int i = 0; i < 32; i++) begin
      s5 = 5'(i);
      #1;
      checks++;
      if (int'(n5) != exp5[i]) begin
        failures++;
        $display("FAIL crc5 next[%0d] = %0d, expected %0d", i, n5, exp5[i]);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      poly_t g, lhs, rhs;
      g   = 64'h1_1021;
      s16 = (i < 16) ? 16'(1 << i) : 16'($urandom);
      #1;
      lhs = mulmod(64'(n16), 64'h4, 16, g) ^ 64'h2;
      rhs = mulmod(64'(s16), 64'h2, 16, g) ^ 64'h1;
      checks++;
      if (lhs != rhs) begin
        failures++;
        $display("FAIL crc16 next(%h) = %h breaks the congruence", s16, n16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
