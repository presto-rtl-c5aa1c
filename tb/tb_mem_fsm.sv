// tb_mem_fsm: tests the data-movement sequencer in a small system of four PEs
// with the real inter-PE NoC, off-chip DMA and Galois fetcher, and a DRAM
// model that refuses grants at random. Control words go only to the PEs in
// cmask. Checks:
//   - VLOAD of random polynomials into both buffers of several PEs, VSTORE
//     back to other addresses, bit-exact round trip and the line rate
//     (256 DRAM beats per polynomial; the FSM adds at most the memory
//     latency and a few cycles after the last granted beat);
//   - SLOAD: every RF word of the masked PEs holds the scalar, others unchanged;
//   - AUTO X -> X^k over PEs 0-1 (dimension 1024) for several odd k, against a
//     reference permutation with sign, taking exactly 2 cycles per coefficient;
//   - host word write (acknowledged in its request cycle) and read (data and
//     acknowledge in the cycle after the request).
module tb_mem_fsm;
  import presto_pkg::*;
  import tb_fhe_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  logic start, busy, noc_free;
  he_dec_t dec;
  pemask_t mask, cmask;
  ctrl_t ctrl;
  ctrl_t pe_ctrl [NP];
  line_t pe_line [NP];
  word_t rf5 [NP][NBANK];   // RF[5] of every bank, probed
  line_t const_line, rd_line, wb_line, dma_ld_line;
  logic [4:0] noc_rd_pe;
  logic [1:0] noc_wb_src;
  logic dma_rd_start, dma_ld_valid, dma_wr_start, dma_st_valid, dma_st_ready, dma_busy;
  logic [31:0] dma_rd_addr, dma_wr_addr;
  logic [5:0] dma_rd_lines;
  logic gf_start, gf_next, gf_valid, gf_last, gf_neg;
  logic [14:0] gf_k;
  logic [3:0] gf_logn;
  logic [13:0] gf_src, gf_dst;
  logic cpu_req, cpu_we, cpu_ack;
  logic [14:0] cpu_addr;
  logic [31:0] cpu_wdata, cpu_rdata;
  logic mem_req, mem_gnt, mem_we, mem_rvalid;
  logic [31:0] mem_addr;
  logic [63:0] mem_wdata, mem_rdata;
  logic [31:0] q = 32'(Q);
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    wait (cyc == 200000); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  mem_fsm dut (
    .clk, .rst_n, .start, .dec, .busy, .mask, .cmask, .ctrl, .noc_free, .noc_rd_pe, .noc_wb_src,
    .const_line, .noc_rd_line(rd_line), .dma_rd_start, .dma_rd_addr, .dma_rd_lines, .dma_ld_valid,
    .dma_wr_start, .dma_wr_addr, .dma_st_valid, .dma_st_ready, .dma_busy,
    .gf_start, .gf_k, .gf_logn, .gf_next, .gf_valid, .gf_last, .gf_src, .gf_dst, .gf_neg,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_ack, .cpu_rdata
  );
  for (genvar p = 0; p < NP; p++) begin : g_pe
    assign pe_ctrl[p] = cmask[p] ? ctrl : CTRL_NOP;
    presto_pe u_pe (.clk, .rst_n, .ctrl(pe_ctrl[p]), .q, .line_in(wb_line), .line_out(pe_line[p]));
    for (genvar b = 0; b < NBANK; b++) begin : g_probe
      assign rf5[p][b] = u_pe.g_bank[b].u_bank.u_rf.mem[5];
    end
  end
  inter_pe_noc #(.N_PE(NP)) u_noc (
    .pe_line, .rd_pe(noc_rd_pe[1:0]), .wb_src(noc_wb_src), .cpu_word(cpu_wdata),
    .dma_line(dma_ld_line), .const_line, .rd_line, .wb_line
  );
  galois_fetcher #(.LOGN_MAX(14)) u_gf (
    .clk, .rst_n, .start(gf_start), .k(gf_k), .logn(gf_logn), .next(gf_next),
    .valid(gf_valid), .last(gf_last), .src(gf_src), .dst(gf_dst), .neg(gf_neg)
  );
  offchip_dma u_dma (
    .clk, .rst_n, .rd_start(dma_rd_start), .rd_addr(dma_rd_addr), .rd_lines(dma_rd_lines),
    .ld_valid(dma_ld_valid), .ld_line(dma_ld_line), .wr_start(dma_wr_start), .wr_addr(dma_wr_addr),
    .st_valid(dma_st_valid), .st_ready(dma_st_ready), .st_line(rd_line), .busy(dma_busy),
    .mem_req, .mem_gnt, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata
  );
  dram_model #(.WORDS(16384), .LAT(4)) dram (.*);

  // ---------------- helpers ----------------
  int st;   // memory stall cycles during the last run
  task automatic run(he_dec_t d, output int cycles);
    int t0, s0;
    s0 = dram.stalls;
    @(negedge clk); dec = d; start = 1;
    t0 = cyc;
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    while (dma_busy) @(negedge clk);
    cycles = cyc - t0;
    st = dram.stalls - s0;
  endtask
  function automatic he_dec_t mk(he_op_e op, int pe, bit dst, bit srca, bit srcb, int val,
                                 pemask_t m = '0, int aux = 0, int rfi = 0);
    he_dec_t d;
    d = '0; d.op = op; d.pe = 5'(pe); d.dst = dst; d.srca = srca; d.srcb = srcb;
    d.val = 32'(val);
    d.mask = (op == HE_VLOAD || op == HE_VSTORE) ? pemask_t'(1) << pe : m; d.aux = 32'(aux); d.rfi = 3'(rfi); d.cls = CL_MEM;
    return d;
  endfunction
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
  task automatic compare(int slot, poly_t e, string what);
    poly_t g;
    int bad = 0;
    g = get(slot);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (g[i] != e[i]) begin failures++; if (bad++ < 4) $display("FAIL %s [%0d] %0d != %0d", what, i, g[i], e[i]); end
    end
  endtask
  function automatic poly_t rndpoly();
    poly_t a;
    for (int i = 0; i < N; i++) a[i] = rnd();
    return a;
  endfunction

  initial begin
    poly_t a [NP][2], g [2], e [2];
    int c;
    logic [31:0] sc, rd;
    start = 0; dec = '0; noc_free = 1; cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // load/store round trip through all PEs and both buffers
    for (int p = 0; p < NP; p++) for (int b = 0; b < 2; b++) begin
      a[p][b] = rndpoly(); put(p*2 + b, a[p][b]);
      run(mk(HE_VLOAD, p, b, 0, 0, (p*2 + b) * 2048), c);
      checks++;
      if (c < 256 || c > 256 + 4 + 8 + st) begin failures++; $display("FAIL load cycles %0d", c); end
    end
    for (int p = 0; p < NP; p++) for (int b = 0; b < 2; b++) begin
      run(mk(HE_VSTORE, p, 0, 0, b, (16 + p*2 + b) * 2048), c);
      compare(16 + p*2 + b, a[p][b], "round trip");
    end

    // scalar broadcast to PEs 1 and 3, RF[5]
    sc = 32'(rnd());
    run(mk(HE_SLOAD, 0, 0, 0, 0, int'(sc), 32'hA, 0, 5), c);
    checks++; if (c != 2) begin failures++; $display("FAIL SLOAD cycles %0d", c); end
    for (int b = 0; b < NBANK; b++) begin
      checks += 2;
      if (rf5[1][b] !== sc) failures++;
      if (rf5[3][b] !== sc) failures++;
    end

    // automorphisms over PEs 0-1, P0 -> P1, then store P1 and compare
    for (int t = 0; t < 4; t++) begin
      int k;
      k = (t == 0) ? 1 : (t == 1) ? 5 : (t == 2) ? 2047 : 2 * int'($urandom_range(0, 1023)) + 1;
      for (int i = 0; i < 1024; i++) begin
        int j;
        j = (i * k) % 2048;
        if (j < 1024) e[j / 512][j % 512] = a[i / 512][0][i % 512];
        else          e[(j - 1024) / 512][(j - 1024) % 512] = msub(0, a[i / 512][0][i % 512], Q);
      end
      run(mk(HE_AUTO, 0, 1, 0, 0, k, 32'h3, 10), c);
      checks++; if (c != 2 * 1024 + 1) begin failures++; $display("FAIL AUTO k=%0d cycles %0d", k, c); end
      run(mk(HE_VSTORE, 0, 0, 0, 1, 40 * 2048), c);
      run(mk(HE_VSTORE, 1, 0, 0, 1, 41 * 2048), c);
      compare(40, e[0], $sformatf("auto k=%0d PE0", k));
      compare(41, e[1], $sformatf("auto k=%0d PE1", k));
    end

    // host word write then read (PE 2, PBUF1, coefficient 77)
    @(negedge clk); cpu_req = 1; cpu_we = 1; cpu_addr = {5'd2, 1'b1, 9'd77}; cpu_wdata = 32'h5A5A_0077;
    @(posedge clk); #1 checks++; if (!cpu_ack) begin failures++; $display("FAIL write ack"); end
    @(negedge clk); cpu_req = 1; cpu_we = 0;
    c = 0;
    do begin @(posedge clk); c++; #1; end while (!cpu_ack && c < 10);
    checks += 2;
    if (c != 1) begin failures++; $display("FAIL read latency %0d", c); end
    if (cpu_rdata !== 32'h5A5A_0077) begin failures++; $display("FAIL read data %h", cpu_rdata); end
    @(negedge clk); cpu_req = 0;
    // a neighbouring coefficient is untouched
    @(negedge clk); cpu_req = 1; cpu_we = 0; cpu_addr = {5'd2, 1'b1, 9'd78};
    do begin @(posedge clk); #1; end while (!cpu_ack);
    checks++; if (cpu_rdata !== 32'(a[2][1][78])) begin failures++; $display("FAIL neighbour %h", cpu_rdata); end
    @(negedge clk); cpu_req = 0;

    $display("memory stalls: %0d", dram.stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
