// tb_ntt_fsm: the NTT sequencer driving one PE. Writes the twiddle table,
// modulus and n^-1 with configuration starts, loads random polynomials a and b,
// and checks: NTT(a) equals a reference NTT, its cycle count is 464;
// INTT(NTT(a) * NTT(b)) equals the schoolbook negacyclic product a*b, the
// inverse taking 496 cycles.
module tb_ntt_fsm;
  import presto_pkg::*;
  import tb_fhe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, cfg_err;
  he_dec_t dec;
  pemask_t mask;
  ctrl_t fctrl, tctrl, ctrl;
  line_t tw, tlin, lin, lout;
  logic [31:0] q;
  int checks = 0, failures = 0, cyc = 0;

  ntt_fsm dut (.clk(clk), .rst_n(rst_n), .start(start), .dec(dec), .busy(busy), .mask(mask),
               .ctrl(fctrl), .tw_line(tw), .q(q), .cfg_err(cfg_err));
  assign ctrl = busy ? fctrl : tctrl;
  assign lin  = busy ? tw : tlin;
  presto_pe u_pe (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .q(q), .line_in(lin), .line_out(lout));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    wait (cyc == 200000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(); @(posedge clk); #1; tctrl = CTRL_NOP; start = 0; endtask
  task automatic cfg(int idx, longint unsigned v);
    dec = '0; dec.op = HE_CFG; dec.cls = CL_NTT; dec.aux = idx; dec.val = 32'(v); start = 1; step();
  endtask
  task automatic load(int p, input poly_t a);
    for (int e = 0; e < 32; e++) begin
      tctrl.op = OP_MOVY; tctrl.ysrc = YS_TOP; tctrl.bank_en = '1; tctrl.wa = 5'(e);
      tctrl.w_pbuf = p[0]; tctrl.pbuf_we = 1;
      for (int b = 0; b < 16; b++) tlin[b*32 +: 32] = 32'(a[e*16+b]);
      step();
    end
  endtask
  task automatic compare(int p, input poly_t a, string what);
    int bad = 0;
    for (int e = 0; e < 32; e++) begin
      tctrl.rd_en = 1; tctrl.ra = 5'(e); tctrl.a_pbuf = p[0]; step();
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (lout[b*32 +: 32] !== 32'(a[e*16+b])) begin
          failures++; if (bad++ < 4) $display("FAIL %s coeff %0d got %0d exp %0d", what, e*16+b, lout[b*32 +: 32], a[e*16+b]);
        end
      end
    end
  endtask
  task automatic run(he_op_e op, int p, int expect_cycles);
    int c0;
    dec = '0; dec.op = op; dec.cls = CL_NTT; dec.dst = p[0]; dec.mask = 1; start = 1; step();
    c0 = cyc;
    while (busy) step();
    checks++;
    if (cyc - c0 != expect_cycles) begin
      failures++; $display("FAIL %s took %0d cycles, expected %0d", op.name(), cyc - c0, expect_cycles);
    end
  endtask

  initial begin
    poly_t a, b, ah, bh, c;
    start = 0; dec = '0; tctrl = CTRL_NOP; tlin = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    checks++;
    if (mpow(psi(), 512, Q) != Q - 1) begin failures++; $display("FAIL psi"); end
    for (int k = 0; k < 512; k++) begin cfg(CFG_ZETA + k, zeta(k)); cfg(CFG_ZINV + k, zinv(k)); end
    cfg(CFG_Q, Q); cfg(CFG_NINV, ninv());
    for (int i = 0; i < N; i++) begin a[i] = rnd(); b[i] = rnd(); end
    ah = a; ref_ntt(ah); bh = b; ref_ntt(bh);
    load(0, a); load(1, b);
    run(HE_NTT, 0, 464);
    compare(0, ah, "ntt(a)");
    run(HE_NTT, 1, 464);
    compare(1, bh, "ntt(b)");
    for (int e = 0; e < 32; e++) begin
      tctrl.op = OP_MUL; tctrl.ysrc = YS_PBUF; tctrl.bank_en = '1; tctrl.ra = 5'(e); tctrl.rb = 5'(e);
      tctrl.a_pbuf = 0; tctrl.b_pbuf = 1; tctrl.wa = 5'(e); tctrl.w_pbuf = 0; tctrl.pbuf_we = 1;
      step();
    end
    run(HE_INTT, 0, 496);
    ref_negmul(a, b, c);
    compare(0, c, "intt(ntt(a)*ntt(b))");
    run(HE_INTT, 1, 496);
    compare(1, b, "intt(ntt(b))");
    checks++;
    if (cfg_err) begin failures++; $display("FAIL cfg_err"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
