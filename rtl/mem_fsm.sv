// mem_fsm: sequencer for all data movement of the co-processor.
//
// Instructions (one at a time, busy from the cycle after start):
//   VLOAD  32 lines from off-chip byte address val into PBUF dst of PE pe.
//          The DMA is started in the start cycle; every line it delivers is
//          written in the cycle it arrives.
//   VSTORE PBUF srcB of PE pe to off-chip address val: for each of 32 rows,
//          wait until the DMA line buffer is free, read the row into the PE
//          output register, hand the line to the DMA the next cycle. Ends when
//          the DMA has written everything.
//   SLOAD  broadcast scalar val into RF[rfi] of every bank of the PEs in mask
//          (one cycle, through the constant line of the inter-PE NoC).
//   AUTO   Galois automorphism X -> X^k (k = val) of a polynomial of dimension
//          2^aux spread over PEs pe, pe+1, ... (512 coefficients per PE), from
//          PBUF srcA to PBUF dst (must differ). For each coefficient the Galois
//          fetcher gives the destination and sign: cycle R reads the source row,
//          cycle W sends it through the inter-PE NoC, shifts it in the
//          destination PE's intra-PE NoC to the destination bank and writes
//          that single bank, negated if needed. 2 cycles per coefficient.
// Host word accesses from the CPU interface are served when no instruction is
// running and the write-back line is free: a write takes one cycle, a read two.
// busy covers these too; mask is the PE set of the running instruction (for
// the scheduler), cmask the PEs driven with ctrl in this cycle (for the
// control crossbar). All sequences are this design's; the document names the
// FSM and the data paths it uses.
module mem_fsm
  import presto_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  he_dec_t     dec,
  output logic        busy,
  output pemask_t     mask,
  output pemask_t     cmask,
  output ctrl_t       ctrl,
  input  logic        noc_free,
  output logic [4:0]  noc_rd_pe,
  output logic [1:0]  noc_wb_src,
  output line_t       const_line,
  input  line_t       noc_rd_line,
  // off-chip DMA
  output logic        dma_rd_start,
  output logic [31:0] dma_rd_addr,
  output logic [5:0]  dma_rd_lines,
  input  logic        dma_ld_valid,
  output logic        dma_wr_start,
  output logic [31:0] dma_wr_addr,
  output logic        dma_st_valid,
  input  logic        dma_st_ready,
  input  logic        dma_busy,
  // Galois fetcher
  output logic        gf_start,
  output logic [14:0] gf_k,
  output logic [3:0]  gf_logn,
  output logic        gf_next,
  input  logic        gf_valid,
  input  logic        gf_last,
  input  logic [13:0] gf_src,
  input  logic [13:0] gf_dst,
  input  logic        gf_neg,
  // CPU interface
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic [14:0] cpu_addr,
  output logic        cpu_ack,
  output logic [31:0] cpu_rdata
);
  typedef enum logic [3:0] {
    S_IDLE, S_LD, S_ST_RD, S_ST_PUSH, S_ST_WAIT, S_SLOAD, S_AU_R, S_AU_W, S_CPU_R2
  } state_e;

  state_e     state;
  he_dec_t    cur;
  logic [4:0] row;
  logic [3:0] sbank;
  logic [4:0] spe, dpe, cpe;
  logic       cpu_go;

  assign busy   = (state != S_IDLE);
  assign mask   = (busy && state != S_CPU_R2) ? cur.mask : '0;
  assign cpu_go = (state == S_IDLE) && !start && cpu_req && noc_free;
  assign spe    = cur.pe + gf_src[13:9];
  assign dpe    = cur.pe + gf_dst[13:9];
  assign cpe    = cpu_addr[14:10];

  assign dma_rd_start = start && dec.op == HE_VLOAD;
  assign dma_rd_addr  = dec.val;
  assign dma_rd_lines = 6'd32;
  assign dma_wr_start = start && dec.op == HE_VSTORE;
  assign dma_wr_addr  = dec.val;
  assign gf_start     = start && dec.op == HE_AUTO;
  assign gf_k         = dec.val[14:0];
  assign gf_logn      = dec.aux[3:0];
  assign const_line   = {NBANK{cur.val}};

  always_comb begin
    ctrl         = CTRL_NOP;
    cmask        = '0;
    noc_rd_pe    = cur.pe;
    noc_wb_src   = 2'd0;
    dma_st_valid = 1'b0;
    gf_next      = 1'b0;
    cpu_ack      = 1'b0;
    cpu_rdata    = noc_rd_line[cpu_addr[3:0]*W +: W];
    unique case (state)
      S_IDLE: if (cpu_go) begin
        cmask      = pemask_t'(1) << cpe;
        noc_wb_src = 2'd1;
        ctrl.ra    = cpu_addr[8:4];
        ctrl.a_pbuf = cpu_addr[9];
        if (cpu_we) begin
          ctrl.op      = OP_MOVY;
          ctrl.ysrc    = YS_TOP;
          ctrl.bank_en = NBANK'(1) << cpu_addr[3:0];
          ctrl.wa      = cpu_addr[8:4];
          ctrl.w_pbuf  = cpu_addr[9];
          ctrl.pbuf_we = 1'b1;
          cpu_ack      = 1'b1;
        end else begin
          ctrl.rd_en   = 1'b1;
        end
      end
      S_CPU_R2: begin
        noc_rd_pe = cpe;
        cpu_ack   = 1'b1;
      end
      S_LD: begin
        noc_wb_src = 2'd2;
        if (dma_ld_valid) begin
          cmask        = cur.mask;
          ctrl.op      = OP_MOVY;
          ctrl.ysrc    = YS_TOP;
          ctrl.bank_en = '1;
          ctrl.wa      = row;
          ctrl.w_pbuf  = cur.dst;
          ctrl.pbuf_we = 1'b1;
        end
      end
      S_ST_RD: if (dma_st_ready) begin
        cmask       = cur.mask;
        ctrl.rd_en  = 1'b1;
        ctrl.ra     = row;
        ctrl.a_pbuf = cur.srcb;
      end
      S_ST_PUSH: dma_st_valid = 1'b1;
      S_SLOAD: begin
        cmask        = cur.mask;
        noc_wb_src   = 2'd3;
        ctrl.op      = OP_MOVY;
        ctrl.ysrc    = YS_TOP;
        ctrl.bank_en = '1;
        ctrl.rf_we   = 1'b1;
        ctrl.rf_wa   = cur.rfi;
      end
      S_AU_R: begin
        cmask       = pemask_t'(1) << spe;
        ctrl.rd_en  = 1'b1;
        ctrl.ra     = gf_src[8:4];
        ctrl.a_pbuf = cur.srca;
      end
      S_AU_W: begin
        cmask        = pemask_t'(1) << dpe;
        noc_rd_pe    = spe;
        noc_wb_src   = 2'd0;
        ctrl.op      = gf_neg ? OP_NEGY : OP_MOVY;
        ctrl.ysrc    = YS_NOC;
        ctrl.sh_top  = 1'b1;
        ctrl.shift   = sbank - gf_dst[3:0];
        ctrl.bank_en = NBANK'(1) << gf_dst[3:0];
        ctrl.wa      = gf_dst[8:4];
        ctrl.w_pbuf  = cur.dst;
        ctrl.pbuf_we = 1'b1;
        gf_next      = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cur <= '0; row <= '0; sbank <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (start) begin
            cur <= dec;
            row <= '0;
            unique case (dec.op)
              HE_VLOAD:  state <= S_LD;
              HE_VSTORE: state <= S_ST_RD;
              HE_SLOAD:  state <= S_SLOAD;
              HE_AUTO:   state <= S_AU_R;
              default:   state <= S_IDLE;
            endcase
          end else if (cpu_go && !cpu_we) state <= S_CPU_R2;
        S_CPU_R2: state <= S_IDLE;
        S_LD: if (dma_ld_valid) begin
          row <= row + 1'b1;
          if (row == 5'd31) state <= S_IDLE;
        end
        S_ST_RD:   if (dma_st_ready) state <= S_ST_PUSH;
        S_ST_PUSH: begin
          row   <= row + 1'b1;
          state <= (row == 5'd31) ? S_ST_WAIT : S_ST_RD;
        end
        S_ST_WAIT: if (!dma_busy) state <= S_IDLE;
        S_SLOAD:   state <= S_IDLE;
        S_AU_R: if (gf_valid) begin
          sbank <= gf_src[3:0];
          state <= S_AU_W;
        end
        S_AU_W: state <= gf_last ? S_IDLE : S_AU_R;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
