// tb_presto_top: end-to-end test of the whole co-processor at its default
// size (32 PEs), driven like a host core: custom instructions on the
// dispatcher port, single words on the AXI4-Lite port, polynomials in a
// behavioural DRAM. Program:
//   1. configure modulus, n^-1 and the 1024 twiddles;
//   2. RLWE encryption with dimension 512 on PEs 0 and 1 in parallel:
//      c0 = INTT(NTT(u) * P0) + e0, c1 = INTT(NTT(u) * P1) + e1 + dm
//      (P0, P1 public key in NTT form), stored back to DRAM;
//   3. decryption on PE 2: m' = c0 + INTT(NTT(c1) * S);
//   4. Galois automorphism X -> X^5 of a 1024-coefficient polynomial spread
//      over PEs 4 and 5, rotation by X^700 on PE 6, scalar broadcast and
//      scalar multiply on PE 7, overlapping with each other;
//   5. a burst of additions behind the automorphism that fills the queue;
//   6. host word writes and reads through AXI, and one illegal instruction.
// Every result is compared with reference arithmetic. Each mechanism
// (out-of-order issue, concurrent FSMs, queue full, memory stalls, NTT, INTT,
// cross-bank butterflies, Galois sign flips, rotation, scalar broadcast, AXI
// read/write, illegal drop) is counted and must occur at least once.
module tb_presto_top;
  import presto_pkg::*;
  import tb_fhe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic inst_valid, inst_ready, idle, cfg_err;
  logic [31:0] inst, inst_rs1, inst_rs2;
  logic [15:0] illegal_cnt;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_awaddr, s_wdata, s_araddr, s_rdata;
  logic [3:0] s_wstrb;
  logic [1:0] s_bresp, s_rresp;
  logic mem_req, mem_gnt, mem_we, mem_rvalid;
  logic [31:0] mem_addr;
  logic [63:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0, cyc = 0;

  presto_top dut (.*);
  dram_model #(.WORDS(16384), .LAT(4)) dram (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    wait (cyc == 400000); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_ooo = 0, n_conc = 0, n_qfull = 0, n_ntt = 0, n_intt = 0, n_cross = 0, n_gneg = 0;
  int n_rot = 0, n_sload = 0, n_axr = 0, n_axw = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_sched.found && dut.u_sched.sel != 0) n_ooo++;
    if ($countones(dut.fsm_busy) >= 2) n_conc++;
    if (inst_valid && !inst_ready) n_qfull++;
    if (dut.iss_valid[CL_NTT] && dut.iss_dec.op == HE_NTT)  n_ntt++;
    if (dut.iss_valid[CL_NTT] && dut.iss_dec.op == HE_INTT) n_intt++;
    if (dut.u_ntt.busy && dut.u_ntt.ph == 2'd1) n_cross++;
    if (dut.gf_next && dut.gf_neg) n_gneg++;
    if (dut.iss_valid[CL_ELM] && dut.iss_dec.op == HE_VROT) n_rot++;
    if (dut.iss_valid[CL_MEM] && dut.iss_dec.op == HE_SLOAD) n_sload++;
    if (s_rvalid && s_rready) n_axr++;
    if (s_bvalid && s_bready) n_axw++;
  end

  // ---------------- host helpers ----------------
  task automatic issue(logic [31:0] i, logic [31:0] r1, logic [31:0] r2);
    @(negedge clk); inst_valid = 1; inst = i; inst_rs1 = r1; inst_rs2 = r2;
    @(posedge clk); while (!inst_ready) @(posedge clk);
    #1 inst_valid = 0;
  endtask
  function automatic logic [31:0] ophe(int f7, bit srcb, bit srca, bit dst, int rd = 0);
    return {7'(f7), 10'd0, srcb, srca, dst, 5'(rd), OPC_HE};
  endfunction
  task automatic vload(int slot, int pe, bit pb);
    issue({17'd0, 3'd0, 4'd0, pb, OPC_HE_LOAD}, 32'(slot * 2048), 32'(pe));
  endtask
  task automatic vstore(int slot, int pe, bit pb);
    issue({17'd0, 3'd0, 4'd0, pb, OPC_HE_STORE}, 32'(slot * 2048), 32'(pe));
  endtask
  task automatic cfg(int idx, longint unsigned v);
    issue({17'd0, 3'd2, 5'd0, OPC_HE_LOAD}, 32'(idx), 32'(v));
  endtask
  task automatic wait_idle();
    @(posedge clk); #1;
    while (!idle) begin @(posedge clk); #1; end
  endtask
  function automatic void put(int slot, poly_t a);
    for (int i = 0; i < N; i += 2) dram.m[slot*256 + i/2] = {32'(a[i+1]), 32'(a[i])};
  endfunction
  function automatic poly_t get(int slot);
    poly_t a;
    for (int i = 0; i < N; i += 2) begin
      a[i] = longint'(dram.m[slot*256 + i/2][31:0]); a[i+1] = longint'(dram.m[slot*256 + i/2][63:32]);
    end
    return a;
  endfunction
  task automatic compare(int slot, poly_t exp, string what);
    poly_t got;
    int bad = 0;
    got = get(slot);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++; if (bad++ < 4) $display("FAIL %s coeff %0d got %0d exp %0d", what, i, got[i], exp[i]);
      end
    end
  endtask
  task automatic axi_write(int pe, bit pb, int idx, logic [31:0] d);
    @(negedge clk); s_awvalid = 1; s_wvalid = 1; s_awaddr = {15'd0, 5'(pe), pb, 9'(idx), 2'b00}; s_wdata = d;
    @(posedge clk); while (!s_awready) @(posedge clk);
    #1 s_awvalid = 0; s_wvalid = 0; s_bready = 1;
    @(posedge clk); while (!s_bvalid) @(posedge clk);
    #1 s_bready = 0;
  endtask
  task automatic axi_read(int pe, bit pb, int idx, output logic [31:0] d);
    @(negedge clk); s_arvalid = 1; s_araddr = {15'd0, 5'(pe), pb, 9'(idx), 2'b00};
    @(posedge clk); while (!s_arready) @(posedge clk);
    #1 s_arvalid = 0; s_rready = 1;
    @(posedge clk); while (!s_rvalid) @(posedge clk);
    d = s_rdata;
    #1 s_rready = 0;
  endtask

  function automatic poly_t padd(poly_t a, poly_t b);
    for (int i = 0; i < N; i++) a[i] = madd(a[i], b[i], Q);
    return a;
  endfunction
  function automatic poly_t pmul(poly_t a, poly_t b);
    poly_t c;
    ref_negmul(a, b, c);
    return c;
  endfunction
  function automatic poly_t rndpoly();
    poly_t a;
    for (int i = 0; i < N; i++) a[i] = rnd();
    return a;
  endfunction

  // ---------------- program ----------------
  initial begin
    poly_t u, e0, e1, dm, p0, p1, s, P0, P1, S, c0, c1, x, t;
    poly_t g [2], gexp [2];
    longint unsigned sc;
    logic [31:0] d;
    int t0;
    inst_valid = 0; inst = 0; inst_rs1 = 0; inst_rs2 = 0;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_wdata = 0; s_araddr = 0; s_wstrb = 4'hF;
    repeat (3) @(posedge clk); rst_n = 1;

    // 1. configuration
    cfg(CFG_Q, Q); cfg(CFG_NINV, ninv());
    for (int k = 0; k < 512; k++) begin cfg(CFG_ZETA + k, zeta(k)); cfg(CFG_ZINV + k, zinv(k)); end

    // 2. encryption (slots: 0 u, 1 e0, 2 e1, 3 dm, 4 P0, 5 P1, 6 S, 10 c0, 11 c1, 12 m')
    u = rndpoly(); e0 = rndpoly(); e1 = rndpoly(); dm = rndpoly();
    p0 = rndpoly(); p1 = rndpoly(); s = rndpoly();
    P0 = p0; ref_ntt(P0); P1 = p1; ref_ntt(P1); S = s; ref_ntt(S);
    put(0, u); put(1, e0); put(2, e1); put(3, dm); put(4, P0); put(5, P1); put(6, S);
    t0 = cyc;
    vload(0, 0, 0); vload(0, 1, 0); vload(4, 0, 1); vload(5, 1, 1);
    issue(ophe(8, 0, 0, 0), 32'h3, 0);                 // NTT u on PE0, PE1
    issue(ophe(6, 1, 0, 0), 32'h3, 0);                 // P0 = P0 * P1
    issue(ophe(9, 0, 0, 0), 32'h3, 0);                 // INTT
    vload(1, 0, 1); vload(2, 1, 1);
    issue(ophe(0, 1, 0, 0), 32'h3, 0);                 // + e0 / + e1
    vload(3, 1, 1);
    issue(ophe(0, 1, 0, 0), 32'h2, 0);                 // + dm on PE1
    vstore(10, 0, 0); vstore(11, 1, 0);
    // 3. decryption on PE2, queued behind the encryption
    vload(11, 2, 0); vload(6, 2, 1);
    issue(ophe(8, 0, 0, 0), 32'h4, 0);
    issue(ophe(6, 1, 0, 0), 32'h4, 0);
    issue(ophe(9, 0, 0, 0), 32'h4, 0);
    vload(10, 2, 1);
    issue(ophe(0, 1, 0, 0), 32'h4, 0);
    vstore(12, 2, 0);
    wait_idle();
    $display("encryption + decryption: %0d cycles", cyc - t0);
    c0 = padd(pmul(u, p0), e0);
    c1 = padd(padd(pmul(u, p1), e1), dm);
    compare(10, c0, "c0");
    compare(11, c1, "c1");
    compare(12, padd(c0, pmul(c1, s)), "decrypted");

    // 4. automorphism over PEs 4-5 (dimension 1024), rotation on PE6,
    //    scalar multiply on PE7
    g[0] = rndpoly(); g[1] = rndpoly(); x = rndpoly();
    put(20, g[0]); put(21, g[1]); put(22, x);
    for (int i = 0; i < 1024; i++) begin
      int j;
      j = (i * 5) % 2048;
      if (j < 1024) gexp[j / 512][j % 512] = g[i / 512][i % 512];
      else          gexp[(j - 1024) / 512][(j - 1024) % 512] = msub(0, g[i / 512][i % 512], Q);
    end
    vload(20, 4, 0); vload(21, 5, 0); vload(22, 6, 0); vload(22, 7, 0);
    issue(ophe(10, 0, 0, 1), 32'h0000_0A04, 32'd5);    // AUTO k=5, logn=10, PEs 4-5, P0 -> P1
    issue(ophe(5, 0, 0, 1), 32'h40, 32'd700);          // VROT X^700, PE6, P0 -> P1
    sc = rnd();
    issue({17'd0, 3'd1, 5'd2, OPC_HE_LOAD}, 32'h80, 32'(sc));   // SLOAD RF[2] on PE7
    issue(ophe(7, 0, 0, 1, 2), 32'h80, 0);             // VMULS PE7: P1 = P0 * RF[2]
    // 5. burst of additions on PE4 behind the automorphism: fills the queue
    for (int i = 0; i < 40; i++) issue(ophe(0, 1, 1, 1), 32'h10, 0);   // P1 = P1 + P1
    vstore(23, 4, 1); vstore(24, 5, 1); vstore(25, 6, 1); vstore(26, 7, 1);
    wait_idle();
    t = gexp[0];
    for (int k = 0; k < 40; k++) t = padd(t, t);
    compare(23, t, "automorphism + 40 doublings, PE4");
    compare(24, gexp[1], "automorphism PE5");
    for (int i = 0; i < N; i++) begin
      int j;
      j = (i + 700) % 1024;
      if (j >= N) t[j - N] = msub(0, x[i], Q); else t[j] = x[i];
    end
    compare(25, t, "rotation X^700");
    for (int i = 0; i < N; i++) t[i] = mmul(x[i], sc, Q);
    compare(26, t, "scalar multiply");

    // 6. host word access and an illegal instruction
    axi_write(9, 1, 37, 32'hCAFE_0001);
    axi_write(31, 0, 511, 32'h1234_5678);
    axi_read(9, 1, 37, d);
    checks++; if (d !== 32'hCAFE_0001) begin failures++; $display("FAIL axi read 1: %h", d); end
    axi_read(31, 0, 511, d);
    checks++; if (d !== 32'h1234_5678) begin failures++; $display("FAIL axi read 2: %h", d); end
    axi_read(2, 0, 5, d);
    checks++; if (d !== 32'(padd(c0, pmul(c1, s))[5])) begin failures++; $display("FAIL axi read 3: %h", d); end
    issue(32'h0000_0033, 0, 0);
    wait_idle();
    checks++; if (illegal_cnt != 1 || cfg_err) begin failures++; $display("FAIL illegal/cfg_err"); end

    $display("mechanisms: ooo=%0d concurrent=%0d queue_full=%0d mem_stall=%0d ntt=%0d intt=%0d cross=%0d galois_neg=%0d rot=%0d sload=%0d axi_r=%0d axi_w=%0d illegal=%0d",
             n_ooo, n_conc, n_qfull, dram.stalls, n_ntt, n_intt, n_cross, n_gneg, n_rot, n_sload, n_axr, n_axw, illegal_cnt);
    checks += 13;
    if (n_ooo == 0)        begin failures++; $display("FAIL no out-of-order issue"); end
    if (n_conc == 0)       begin failures++; $display("FAIL no concurrent FSMs"); end
    if (n_qfull == 0)      begin failures++; $display("FAIL queue never full"); end
    if (dram.stalls == 0)  begin failures++; $display("FAIL no memory stall"); end
    if (n_ntt == 0)        begin failures++; $display("FAIL no NTT"); end
    if (n_intt == 0)       begin failures++; $display("FAIL no INTT"); end
    if (n_cross == 0)      begin failures++; $display("FAIL no cross-bank stage"); end
    if (n_gneg == 0)       begin failures++; $display("FAIL no Galois sign flip"); end
    if (n_rot == 0)        begin failures++; $display("FAIL no rotation"); end
    if (n_sload == 0)      begin failures++; $display("FAIL no scalar broadcast"); end
    if (n_axr == 0)        begin failures++; $display("FAIL no AXI read"); end
    if (n_axw == 0)        begin failures++; $display("FAIL no AXI write"); end
    if (illegal_cnt == 0)  begin failures++; $display("FAIL no illegal drop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
