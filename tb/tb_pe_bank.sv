// tb_pe_bank: drives one bank (BANK_ID 5) with control words and checks its
// PBUF contents through port A against a shadow model: writes from the top
// lane, add/sub/mul between PBUFs, scalar from RF, butterfly dual writes,
// half-butterfly upper/lower role, and bank_en gating.
module tb_pe_bank;
  import presto_pkg::*;
  import tb_fhe_pkg::*;
  logic clk = 0;
  ctrl_t ctrl;
  logic [31:0] q, top, noc, xa;
  longint unsigned sh [2][32];
  longint unsigned rf [8];
  int checks = 0, failures = 0, cyc = 0;

  pe_bank #(.BANK_ID(5)) dut (.clk(clk), .ctrl(ctrl), .q(q), .top_lane(top), .noc_lane(noc), .xa(xa));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    wait (cyc == 50000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(); @(posedge clk); #1; ctrl = CTRL_NOP; endtask

  task automatic wr(int p, int a, longint unsigned v);
    ctrl = CTRL_NOP; ctrl.op = OP_MOVY; ctrl.ysrc = YS_TOP; ctrl.bank_en = 16'h0020;
    ctrl.wa = 5'(a); ctrl.w_pbuf = p[0]; ctrl.pbuf_we = 1; top = 32'(v);
    step(); sh[p][a] = v;
  endtask

  task automatic verify(string what);
    for (int p = 0; p < 2; p++)
      for (int a = 0; a < 32; a++) begin
        ctrl = CTRL_NOP; ctrl.ra = 5'(a); ctrl.a_pbuf = p[0]; #1;
        checks++;
        if (xa !== 32'(sh[p][a])) begin
          failures++; $display("FAIL %s pbuf%0d[%0d]=%0d exp %0d", what, p, a, xa, sh[p][a]);
        end
      end
  endtask

  initial begin
    longint unsigned w, t;
    int a, b, d;
    q = 32'(Q); top = 0; noc = 0; ctrl = CTRL_NOP;
    @(negedge clk);
    for (int p = 0; p < 2; p++) for (int i = 0; i < 32; i++) wr(p, i, rnd());
    verify("load");
    for (int it = 0; it < 300; it++) begin
      a = $urandom % 32; b = $urandom % 32; d = $urandom % 32;
      w = rnd(); t = rnd();
      ctrl = CTRL_NOP; ctrl.bank_en = 16'h0020; ctrl.ra = 5'(a); ctrl.rb = 5'(b); ctrl.wa = 5'(d);
      ctrl.a_pbuf = 0; ctrl.b_pbuf = 1; ctrl.w_pbuf = it[0]; ctrl.pbuf_we = 1; top = 32'(w); noc = 32'(t);
      unique case (it % 6)
        0: begin ctrl.op = OP_ADD; sh[it%2][d] = madd(sh[0][a], sh[1][b], Q); end
        1: begin ctrl.op = OP_SUB; sh[it%2][d] = msub(sh[0][a], sh[1][b], Q); end
        2: begin ctrl.op = OP_MUL; sh[it%2][d] = mmul(sh[0][a], sh[1][b], Q); end
        3: begin // CT butterfly in PBUF1: x = P1[a], y = P1[b], w from top
             ctrl.op = OP_CT; ctrl.a_pbuf = 1; ctrl.b_pbuf = 1; ctrl.w_pbuf = 1; ctrl.wa = 5'(a);
             ctrl.dual_we = 1;
             if (a != b) begin
               t = mmul(w, sh[1][b], Q);
               {sh[1][a], sh[1][b]} = {madd(sh[1][a], t, Q), msub(sh[1][a], t, Q)};
             end else ctrl.op = OP_NOP;
           end
        4: begin // half-butterfly; bank 5 = 0b0101: upper for hb_lg 0 and 2
             ctrl.op = OP_HBF; ctrl.ysrc = YS_NOC; ctrl.hb_lg = 2'(it % 4);
             if ((5 >> (it % 4)) & 1) sh[it%2][d] = msub(t, mmul(w, sh[0][a], Q), Q);
             else                     sh[it%2][d] = madd(sh[0][a], mmul(w, t, Q), Q);
           end
        default: begin // bank not enabled: nothing changes
             ctrl.op = OP_ADD; ctrl.bank_en = 16'hFFDF;
           end
      endcase
      step();
    end
    verify("ops");
    // RF: write top value to RF[3], then scalar multiply PBUF0 rows by it
    w = rnd();
    ctrl = CTRL_NOP; ctrl.op = OP_MOVY; ctrl.ysrc = YS_TOP; ctrl.bank_en = '1; ctrl.rf_we = 1;
    ctrl.rf_wa = 3; top = 32'(w); step();
    for (int i = 0; i < 32; i++) begin
      ctrl = CTRL_NOP; ctrl.op = OP_MUL; ctrl.ysrc = YS_RF; ctrl.rf_ra = 3; ctrl.bank_en = '1;
      ctrl.ra = 5'(i); ctrl.wa = 5'(i); ctrl.pbuf_we = 1; top = 0;
      step(); sh[0][i] = mmul(sh[0][i], w, Q);
    end
    verify("rf scalar");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
