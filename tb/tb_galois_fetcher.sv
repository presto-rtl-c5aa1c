// tb_galois_fetcher: for several dimensions (512 .. 16384) and odd Galois
// elements, checks every emitted (src, dst, neg) against i*k mod 2n computed
// directly, that indices come one per cycle with next held high, that last
// marks index n-1 and that valid drops afterwards.
module tb_galois_fetcher;
  logic clk = 0, rst_n = 0;
  logic start, next, valid, last, neg;
  logic [14:0] k;
  logic [3:0] logn;
  logic [13:0] src, dst;
  int checks = 0, failures = 0, cyc = 0;

  galois_fetcher #(.LOGN_MAX(14)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    wait (cyc == 200000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lgs [5] = '{9, 10, 11, 12, 14};
    int ks  [5] = '{5, 3, 1025, 32767, 25};
    start = 0; next = 0; k = 0; logn = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      int n, cnt;
      n = 1 << lgs[t];
      @(negedge clk); start = 1; k = 15'(ks[t]); logn = 4'(lgs[t]);
      @(negedge clk); start = 0; next = 1; cnt = 0;
      while (valid) begin
        longint m;
        m = (longint'(src) * longint'(ks[t])) % (2 * n);
        checks++;
        if (int'(src) != cnt || int'(dst) != int'(m % n) || neg != (m >= n) || last != (cnt == n - 1)) begin
          failures++;
          if (failures < 5) $display("FAIL n=%0d k=%0d i=%0d dst=%0d neg=%0d", n, ks[t], src, dst, neg);
        end
        cnt++;
        @(negedge clk);
      end
      next = 0;
      checks++;
      if (cnt != n) begin failures++; $display("FAIL count %0d != %0d", cnt, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
