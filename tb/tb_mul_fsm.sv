// tb_mul_fsm: multiplication sequencer driving one PE. Checks VMUL
// (coefficient-wise product of PBUF0 and PBUF1) and VMULS (product with a
// scalar in RF[5]) against reference arithmetic, and their 32-cycle duration.
module tb_mul_fsm;
  import presto_pkg::*;
  import tb_fhe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy;
  he_dec_t dec;
  pemask_t mask;
  ctrl_t fctrl, tctrl, ctrl;
  line_t tlin, lout;
  logic [31:0] q;
  poly_t sh [2];
  int checks = 0, failures = 0, cyc = 0;

  mul_fsm dut (.clk(clk), .rst_n(rst_n), .start(start), .dec(dec), .busy(busy), .mask(mask), .ctrl(fctrl));
  assign ctrl = busy ? fctrl : tctrl;
  presto_pe u_pe (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .q(q), .line_in(tlin), .line_out(lout));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    wait (cyc == 100000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(); @(posedge clk); #1; tctrl = CTRL_NOP; start = 0; endtask
  task automatic load(int p);
    for (int e = 0; e < 32; e++) begin
      tctrl.op = OP_MOVY; tctrl.ysrc = YS_TOP; tctrl.bank_en = '1; tctrl.wa = 5'(e);
      tctrl.w_pbuf = p[0]; tctrl.pbuf_we = 1;
      for (int b = 0; b < 16; b++) begin sh[p][e*16+b] = rnd(); tlin[b*32 +: 32] = 32'(sh[p][e*16+b]); end
      step();
    end
  endtask
  task automatic compare(string what);
    int bad = 0;
    for (int p = 0; p < 2; p++)
      for (int e = 0; e < 32; e++) begin
        tctrl.rd_en = 1; tctrl.ra = 5'(e); tctrl.a_pbuf = p[0]; step();
        for (int b = 0; b < 16; b++) begin
          checks++;
          if (lout[b*32 +: 32] !== 32'(sh[p][e*16+b])) begin
            failures++;
            if (bad++ < 4) $display("FAIL %s p%0d coeff %0d got %0d exp %0d", what, p, e*16+b, lout[b*32 +: 32], sh[p][e*16+b]);
          end
        end
      end
  endtask
  task automatic run(he_op_e op, bit d, bit sa, bit sb);
    int c0;
    dec = '0; dec.op = op; dec.cls = CL_MUL; dec.dst = d; dec.srca = sa; dec.srcb = sb;
    dec.rfi = 3'd5; dec.mask = 1; start = 1; step();
    c0 = cyc;
    while (busy) step();
    checks++;
    if (cyc - c0 != 32) begin failures++; $display("FAIL %s took %0d cycles", op.name(), cyc - c0); end
  endtask

  initial begin
    longint unsigned s;
    start = 0; dec = '0; tctrl = CTRL_NOP; tlin = '0; q = 32'(Q);
    repeat (2) @(posedge clk); rst_n = 1; #1;
    load(0); load(1);
    run(HE_VMUL, 0, 0, 1);
    for (int i = 0; i < N; i++) sh[0][i] = mmul(sh[0][i], sh[1][i], Q);
    compare("vmul");
    s = rnd();
    tctrl.op = OP_MOVY; tctrl.ysrc = YS_TOP; tctrl.bank_en = '1; tctrl.rf_we = 1; tctrl.rf_wa = 5;
    tlin = {16{32'(s)}}; step();
    run(HE_VMULS, 1, 0, 0);
    for (int i = 0; i < N; i++) sh[1][i] = mmul(sh[0][i], s, Q);
    compare("vmuls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
