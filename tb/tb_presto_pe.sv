// tb_presto_pe: one PE driven directly with control words. Loads two random
// polynomials line by line from line_in, adds them, performs one cross-bank
// half-butterfly stage (distance 4) through the intra-PE shifter and RF[7],
// places one word via the shifted top line, and reads every row back through
// the registered output line, checking the one-cycle read latency.
module tb_presto_pe;
  import presto_pkg::*;
  import tb_fhe_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl;
  logic [31:0] q;
  line_t lin, lout;
  longint unsigned sh [2][512];
  int checks = 0, failures = 0, cyc = 0;

  presto_pe dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .q(q), .line_in(lin), .line_out(lout));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    wait (cyc == 50000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(); @(posedge clk); #1; ctrl = CTRL_NOP; lin = '0; endtask

  task automatic verify(string what);
    for (int p = 0; p < 2; p++)
      for (int e = 0; e < 32; e++) begin
        ctrl = CTRL_NOP; ctrl.rd_en = 1; ctrl.ra = 5'(e); ctrl.a_pbuf = p[0];
        step();
        for (int b = 0; b < 16; b++) begin
          checks++;
          if (lout[b*32 +: 32] !== 32'(sh[p][e*16+b])) begin
            failures++; $display("FAIL %s p%0d coeff %0d got %0d exp %0d", what, p, e*16+b, lout[b*32 +: 32], sh[p][e*16+b]);
          end
        end
      end
  endtask

  initial begin
    longint unsigned old [512], w [16];
    q = 32'(Q); ctrl = CTRL_NOP; lin = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    for (int p = 0; p < 2; p++)
      for (int e = 0; e < 32; e++) begin
        ctrl.op = OP_MOVY; ctrl.ysrc = YS_TOP; ctrl.bank_en = '1; ctrl.wa = 5'(e);
        ctrl.w_pbuf = p[0]; ctrl.pbuf_we = 1;
        for (int b = 0; b < 16; b++) begin sh[p][e*16+b] = rnd(); lin[b*32 +: 32] = 32'(sh[p][e*16+b]); end
        step();
      end
    verify("load");
    for (int e = 0; e < 32; e++) begin
      ctrl.op = OP_ADD; ctrl.ysrc = YS_PBUF; ctrl.bank_en = '1; ctrl.ra = 5'(e); ctrl.rb = 5'(e);
      ctrl.a_pbuf = 0; ctrl.b_pbuf = 1; ctrl.wa = 5'(e); ctrl.w_pbuf = 1; ctrl.pbuf_we = 1;
      step();
      for (int b = 0; b < 16; b++) sh[1][e*16+b] = madd(sh[0][e*16+b], sh[1][e*16+b], Q);
    end
    verify("add");
    // cross-bank half-butterfly, distance 4 (hb_lg 2), on PBUF0
    old = sh[0];
    for (int e = 0; e < 32; e++) begin
      for (int b = 0; b < 16; b++) w[b] = rnd();
      for (int ph = 0; ph < 3; ph++) begin
        ctrl = CTRL_NOP; ctrl.ra = 5'(e); ctrl.wa = 5'(e); ctrl.hb_lg = 2; ctrl.rf_wa = 7; ctrl.rf_ra = 7;
        for (int b = 0; b < 16; b++) lin[b*32 +: 32] = 32'(w[b]);
        if (ph < 2) begin
          ctrl.op = OP_HBF; ctrl.ysrc = YS_NOC; ctrl.rf_we = 1;
          ctrl.bank_en = (ph == 0) ? 16'h0F0F : 16'hF0F0;
          ctrl.shift = (ph == 0) ? 4'd4 : 4'd12;
        end else begin
          ctrl.op = OP_MOVY; ctrl.ysrc = YS_RF; ctrl.bank_en = '1; ctrl.pbuf_we = 1;
        end
        step();
      end
      for (int b = 0; b < 16; b++) begin
        int i;
        i = e*16 + b;
        if (b & 4) sh[0][i] = msub(old[i-4], mmul(w[b], old[i], Q), Q);
        else       sh[0][i] = madd(old[i], mmul(w[b], old[i+4], Q), Q);
      end
    end
    verify("half-butterfly");
    // single word placed through the shifted top line: lane 3 -> bank 9, entry 7, PBUF1
    lin = '0; lin[3*32 +: 32] = 32'd12345;
    ctrl.op = OP_MOVY; ctrl.ysrc = YS_NOC; ctrl.sh_top = 1; ctrl.shift = 4'(3 - 9);
    ctrl.bank_en = 16'h0200; ctrl.wa = 7; ctrl.w_pbuf = 1; ctrl.pbuf_we = 1;
    step(); sh[1][7*16+9] = 12345;
    verify("placement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
