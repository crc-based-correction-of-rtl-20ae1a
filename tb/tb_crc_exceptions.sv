// tb_crc_exceptions -- special syndromes of five generators.
// Compares crc_exceptions with the published values:
//   CRC-5 example         : type I 9, type II 26, no single error 19;
//   CRC-8-CCITT  0x107    : 126, 131, 253;
//   CRC-16-CCITT 0x11021  : 30735, 34832, 61471;
//   CRC-24-BLE   0x100065B: 8388324, 8389421, 16776649;
//   CRC-32       0x104C11DB7 (odd weight): type II only, 2187366107.
// Independently, both self-loops must satisfy next(s) = s, i.e.
// s*(x^2 + x) + x + 1 = 0 mod g.  The no-single-error syndrome must have no
// single error position (checked for the three short generators).  Random
// syndromes check the equality flags.  Purely combinational: a clock only
// paces the checks.
module tb_crc_exceptions;
  import tb_crc_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one instance per generator; outputs widened to 32 bits for the checks
  logic [31:0] s_in;
  logic [31:0] s1 [5], s2 [5], ns [5];
  logic        e1 [5], en [5], i1 [5], i2 [5], in_ [5];

`define EXC_INST(IDX, W, GV) \
  logic [W-1:0] s1_``IDX, s2_``IDX, ns_``IDX; \
  crc_exceptions #(.CRC_W(W)) u_``IDX ( \
    .g(GV), .s(s_in[W-1:0]), .self1(s1_``IDX), .self1_exists(e1[IDX]), \
    .self2(s2_``IDX), .nosingle(ns_``IDX), .nosingle_exists(en[IDX]), \
    .is_self1(i1[IDX]), .is_self2(i2[IDX]), .is_nosingle(in_[IDX])); \
  assign s1[IDX] = 32'(s1_``IDX); \
  assign s2[IDX] = 32'(s2_``IDX); \
  assign ns[IDX] = 32'(ns_``IDX);

  `EXC_INST(0, 5, 6'h35)
  `EXC_INST(1, 8, 9'h107)
  `EXC_INST(2, 16, 17'h1_1021)
  `EXC_INST(3, 24, 25'h100_065B)
  `EXC_INST(4, 32, 33'h1_04C1_1DB7)

  int    width [5] = '{5, 8, 16, 24, 32};
  poly_t gen   [5] = '{64'h35, 64'h107, 64'h11021, 64'h100065B, 64'h104C11DB7};
  longint t1   [5] = '{9, 126, 30735, 8388324, -1};
  longint t2   [5] = '{26, 131, 34832, 8389421, 64'd2187366107};
  longint tn   [5] = '{19, 253, 61471, 16776649, -1};

  function automatic bit fixed_point(poly_t s, int n, poly_t g);
    poly_t a = mulx(s, n, g);
    return (mulx(a, n, g) ^ a ^ 64'h3) == 0;
  endfunction

  initial begin
    s_in = 0;
    @(negedge clk);
    for (int k = 0; k < 5; k++) begin
      check(e1[k] == (t1[k] >= 0), $sformatf("CRC-%0d type I existence", width[k]));
      check(en[k] == (tn[k] >= 0), $sformatf("CRC-%0d no-single existence", width[k]));
      if (t1[k] >= 0) check(longint'(s1[k]) == t1[k], $sformatf("CRC-%0d type I %0d, expected %0d", width[k], s1[k], t1[k]));
      if (tn[k] >= 0) check(longint'(ns[k]) == tn[k], $sformatf("CRC-%0d no-single %0d, expected %0d", width[k], ns[k], tn[k]));
      check(longint'(s2[k]) == t2[k], $sformatf("CRC-%0d type II %0d, expected %0d", width[k], s2[k], t2[k]));
      check(fixed_point(poly_t'(s2[k]), width[k], gen[k]), $sformatf("CRC-%0d type II not a fixed point", width[k]));
      if (e1[k]) check(fixed_point(poly_t'(s1[k]), width[k], gen[k]), $sformatf("CRC-%0d type I not a fixed point", width[k]));
    end
    for (int k = 0; k < 3; k++) begin
      automatic int c = period(width[k], gen[k]);
      check(first_pos(poly_t'(ns[k]), width[k], gen[k], c) < 0, $sformatf("CRC-%0d no-single syndrome has a single error", width[k]));
    end
    // exhaustive for CRC-5: exactly the two self-loops are fixed points
    for (int s = 0; s < 32; s++)
      check(fixed_point(poly_t'(s), 5, 64'h35) == (s == 9 || s == 26), $sformatf("CRC-5 fixed point %0d", s));
    // flags, on the special values and at random
    for (int t = 0; t < 400; t++) begin
      automatic int k = t % 5;
      automatic logic [31:0] v;
      case ((t / 5) % 4)
        0: v = s1[k];
        1: v = s2[k];
        2: v = ns[k];
        default: v = $urandom;
      endcase
      s_in = v;
      @(negedge clk);
      begin
        automatic logic [31:0] m = (width[k] == 32) ? 32'hFFFF_FFFF : (32'h1 << width[k]) - 1;
        automatic logic [31:0] x = v & m;
        check(i1[k] == (e1[k] && x == s1[k]) && i2[k] == (x == s2[k]) && in_[k] == (en[k] && x == ns[k]),
              $sformatf("CRC-%0d flags for %0h", width[k], x));
      end
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
