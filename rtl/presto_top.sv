// presto_top: the Presto co-processor for multi-scheme lattice FHE.
//
// A host RISC-V core dispatches custom instructions (opcodes custom-0/2/3,
// together with its rs1/rs2 values) on the inst_* port. The RISC-V extension
// controller decodes them, queues up to 32 and issues them out of order to
// four sequencers: MEM (loads, stores, scalar broadcast, Galois
// automorphism), ELM (add, sub, negate, copy, rotation by X^r), MUL (dyadic
// and scalar multiply) and NTT (forward/inverse 512-point NTT and the
// configuration of modulus and twiddles). The control fetching crossbar gives
// each of the 32 PEs the 57-bit control word of the sequencer that owns it.
// Each PE holds two 512-coefficient polynomials in 16 banks and computes on
// them in place. The inter-PE NoC joins the PEs with the AXI4-Lite CPU
// interface (single 32-bit words), the 64-bit off-chip DMA and the twiddle
// or scalar constant line.
//
// idle is high when no instruction is queued or running and the DMA is done.
// The block structure and the sizes (32 PEs, 16 banks, 2 x 32 x 32b PBUF and
// 8 x 32b RF per bank, 57-bit control, 512-bit lines, 32-bit AXI, 64-bit DMA,
// 32-deep queue) follow the document; encodings, protocols and schedules are
// this design's.
module presto_top
  import presto_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction port from the host's extension dispatcher
  input  logic        inst_valid,
  output logic        inst_ready,
  input  logic [31:0] inst,
  input  logic [31:0] inst_rs1,
  input  logic [31:0] inst_rs2,
  output logic        idle,
  output logic [15:0] illegal_cnt,
  output logic        cfg_err,
  // CPU interface, AXI4-Lite slave
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_awaddr,
  input  logic        s_wvalid,
  output logic        s_wready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  output logic        s_bvalid,
  input  logic        s_bready,
  output logic [1:0]  s_bresp,
  input  logic        s_arvalid,
  output logic        s_arready,
  input  logic [31:0] s_araddr,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  // off-chip memory port (64-bit)
  output logic        mem_req,
  input  logic        mem_gnt,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [63:0] mem_wdata,
  input  logic        mem_rvalid,
  input  logic [63:0] mem_rdata
);
  // ---------------- extension controller ----------------
  he_dec_t    dec, iss_dec;
  logic [3:0] iss_valid, fsm_busy;
  pemask_t    fsm_mask [4];     // instruction masks, for the scheduler
  pemask_t    cyc_mask [4];     // per-cycle masks, for the crossbar
  ctrl_t      fsm_ctrl [4];
  ctrl_t      pe_ctrl  [NPE];
  logic       sched_empty;
  logic [31:0] q;
  line_t      tw_line, mem_const, const_line, rd_line, wb_line;
  logic [4:0] mem_rd_pe;
  logic [1:0] mem_wb_src, wb_src;

  he_decoder u_dec (.inst(inst), .rs1(inst_rs1), .rs2(inst_rs2), .dec(dec));

  ext_scheduler #(.QDEPTH(32)) u_sched (
    .clk(clk), .rst_n(rst_n), .in_valid(inst_valid), .in_ready(inst_ready), .in_dec(dec),
    .iss_valid(iss_valid), .iss_dec(iss_dec), .fsm_busy(fsm_busy), .fsm_mask(fsm_mask),
    .empty(sched_empty), .illegal_cnt(illegal_cnt)
  );

  // DMA, Galois fetcher and CPU interface wires
  logic        dma_rd_start, dma_ld_valid, dma_wr_start, dma_st_valid, dma_st_ready, dma_busy;
  logic [31:0] dma_rd_addr, dma_wr_addr;
  logic [5:0]  dma_rd_lines;
  line_t       dma_ld_line;
  logic        gf_start, gf_next, gf_valid, gf_last, gf_neg;
  logic [14:0] gf_k;
  logic [3:0]  gf_logn;
  logic [13:0] gf_src, gf_dst;
  logic        cpu_req, cpu_we, cpu_ack;
  logic [14:0] cpu_addr;
  logic [31:0] cpu_wdata, cpu_rdata;

  mem_fsm u_mem (
    .clk(clk), .rst_n(rst_n), .start(iss_valid[CL_MEM]), .dec(iss_dec),
    .busy(fsm_busy[CL_MEM]), .mask(fsm_mask[CL_MEM]), .cmask(cyc_mask[CL_MEM]),
    .ctrl(fsm_ctrl[CL_MEM]), .noc_free(!fsm_busy[CL_NTT]), .noc_rd_pe(mem_rd_pe),
    .noc_wb_src(mem_wb_src), .const_line(mem_const), .noc_rd_line(rd_line),
    .dma_rd_start(dma_rd_start), .dma_rd_addr(dma_rd_addr), .dma_rd_lines(dma_rd_lines),
    .dma_ld_valid(dma_ld_valid), .dma_wr_start(dma_wr_start), .dma_wr_addr(dma_wr_addr),
    .dma_st_valid(dma_st_valid), .dma_st_ready(dma_st_ready), .dma_busy(dma_busy),
    .gf_start(gf_start), .gf_k(gf_k), .gf_logn(gf_logn), .gf_next(gf_next),
    .gf_valid(gf_valid), .gf_last(gf_last), .gf_src(gf_src), .gf_dst(gf_dst), .gf_neg(gf_neg),
    .cpu_req(cpu_req), .cpu_we(cpu_we), .cpu_addr(cpu_addr),
    .cpu_ack(cpu_ack), .cpu_rdata(cpu_rdata)
  );

  elm_fsm u_elm (
    .clk(clk), .rst_n(rst_n), .start(iss_valid[CL_ELM]), .dec(iss_dec),
    .busy(fsm_busy[CL_ELM]), .mask(fsm_mask[CL_ELM]), .ctrl(fsm_ctrl[CL_ELM])
  );
  assign cyc_mask[CL_ELM] = fsm_mask[CL_ELM];

  mul_fsm u_mul (
    .clk(clk), .rst_n(rst_n), .start(iss_valid[CL_MUL]), .dec(iss_dec),
    .busy(fsm_busy[CL_MUL]), .mask(fsm_mask[CL_MUL]), .ctrl(fsm_ctrl[CL_MUL])
  );
  assign cyc_mask[CL_MUL] = fsm_mask[CL_MUL];

  ntt_fsm u_ntt (
    .clk(clk), .rst_n(rst_n), .start(iss_valid[CL_NTT]), .dec(iss_dec),
    .busy(fsm_busy[CL_NTT]), .mask(fsm_mask[CL_NTT]), .ctrl(fsm_ctrl[CL_NTT]),
    .tw_line(tw_line), .q(q), .cfg_err(cfg_err)
  );
  assign cyc_mask[CL_NTT] = fsm_mask[CL_NTT];

  ctrl_xbar #(.N_PE(NPE), .NFSM(4)) u_xbar (
    .clk(clk), .rst_n(rst_n), .fsm_ctrl(fsm_ctrl), .fsm_mask(cyc_mask), .pe_ctrl(pe_ctrl)
  );

  // ---------------- in-situ datapath ----------------
  line_t pe_line [NPE];

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    presto_pe u_pe (
      .clk(clk), .rst_n(rst_n), .ctrl(pe_ctrl[p]), .q(q),
      .line_in(wb_line), .line_out(pe_line[p])
    );
  end

  // The NTT sequencer owns the constant line while it runs.
  assign const_line = fsm_busy[CL_NTT] ? tw_line : mem_const;
  assign wb_src     = fsm_busy[CL_NTT] ? 2'd3 : mem_wb_src;

  inter_pe_noc #(.N_PE(NPE)) u_noc (
    .pe_line(pe_line), .rd_pe(mem_rd_pe), .wb_src(wb_src), .cpu_word(cpu_wdata),
    .dma_line(dma_ld_line), .const_line(const_line), .rd_line(rd_line), .wb_line(wb_line)
  );

  galois_fetcher #(.LOGN_MAX(14)) u_gf (
    .clk(clk), .rst_n(rst_n), .start(gf_start), .k(gf_k), .logn(gf_logn), .next(gf_next),
    .valid(gf_valid), .last(gf_last), .src(gf_src), .dst(gf_dst), .neg(gf_neg)
  );

  cpu_if u_cpu (
    .clk(clk), .rst_n(rst_n),
    .s_awvalid(s_awvalid), .s_awready(s_awready), .s_awaddr(s_awaddr),
    .s_wvalid(s_wvalid), .s_wready(s_wready), .s_wdata(s_wdata), .s_wstrb(s_wstrb),
    .s_bvalid(s_bvalid), .s_bready(s_bready), .s_bresp(s_bresp),
    .s_arvalid(s_arvalid), .s_arready(s_arready), .s_araddr(s_araddr),
    .s_rvalid(s_rvalid), .s_rready(s_rready), .s_rdata(s_rdata), .s_rresp(s_rresp),
    .req(cpu_req), .req_we(cpu_we), .req_addr(cpu_addr), .req_wdata(cpu_wdata),
    .ack(cpu_ack), .ack_rdata(cpu_rdata)
  );

  offchip_dma u_dma (
    .clk(clk), .rst_n(rst_n),
    .rd_start(dma_rd_start), .rd_addr(dma_rd_addr), .rd_lines(dma_rd_lines),
    .ld_valid(dma_ld_valid), .ld_line(dma_ld_line),
    .wr_start(dma_wr_start), .wr_addr(dma_wr_addr),
    .st_valid(dma_st_valid), .st_ready(dma_st_ready), .st_line(rd_line), .busy(dma_busy),
    .mem_req(mem_req), .mem_gnt(mem_gnt), .mem_we(mem_we), .mem_addr(mem_addr),
    .mem_wdata(mem_wdata), .mem_rvalid(mem_rvalid), .mem_rdata(mem_rdata)
  );

  assign idle = sched_empty && (fsm_busy == 4'b0000) && !dma_busy;
endmodule
