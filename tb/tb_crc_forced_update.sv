// tb_crc_forced_update -- steps the forced position sets from the first one
// (0, 1, ..., kf-1) until wrap, for kf = 1, 2, 3 and several limits, and
// compares every set with a nested-loop enumeration of all kf-subsets of
// 0 .. limit in lexicographic order; wrap must come exactly after the last.
module tb_crc_forced_update;
  int checks = 0, failures = 0;

  localparam int K = 3;
  logic [K-1:0][15:0] f, f_next;
  logic [1:0]         kf;
  logic [15:0]        limit;
  logic               wrap;
  crc_forced_update #(.K(K), .POS_W(16), .KF_W(2)) dut (.f, .kf, .limit, .f_next, .wrap);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 1; k <= 3; k++) begin
      for (int lim = k - 1; lim <= 9; lim += 2) begin
        int exp_q [$];
        exp_q.delete();
        // reference: every subset, lexicographic, packed as 3 x 8 bits
        for (int a = 0; a <= lim; a++)
          for (int b = (k > 1 ? a + 1 : 0); b <= (k > 1 ? lim : 0); b++)
            for (int c = (k > 2 ? b + 1 : 0); c <= (k > 2 ? lim : 0); c++)
              exp_q.push_back(a | (b << 8) | (c << 16));
        kf = 2'(k); limit = 16'(lim);
        f = '0;
        for (int i = 0; i < k; i++) f[i] = 16'(i);
        for (int n = 0; n < exp_q.size(); n++) begin
          automatic int packed_f = int'(f[0]) | ((k > 1) ? int'(f[1]) << 8 : 0) | ((k > 2) ? int'(f[2]) << 16 : 0);
          #1;
          check(packed_f == exp_q[n], $sformatf("k=%0d limit=%0d step %0d: set %h, expected %h", k, lim, n, packed_f, exp_q[n]));
          check(wrap == (n == exp_q.size() - 1), $sformatf("k=%0d limit=%0d step %0d: wrap=%0d", k, lim, n, wrap));
          f = f_next;
        end
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
