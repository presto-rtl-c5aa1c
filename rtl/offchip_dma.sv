// offchip_dma: moves 512-bit lines between the inter-PE NoC and off-chip
// memory over a 64-bit port (8 beats per line, lowest 64 bits first, byte
// address advancing by 8 per beat).
//
// Load: rd_start with rd_addr and rd_lines launches rd_lines*8 read requests.
// Returned beats (mem_rvalid, in request order, any latency) are gathered; each
// completed line is shown for one cycle on ld_valid/ld_line. The consumer
// must take it in that cycle (the MEM FSM writes it straight into a PE).
// Store: wr_start loads the write address; each line offered with st_valid
// while st_ready is high is buffered and written as 8 beats. st_ready stays low
// while the buffer is busy. Writes win the memory port over reads.
// Memory port: a request is taken in a cycle with mem_req && mem_gnt.
// The 64-bit and 512-bit widths are the document's; the protocol is this design's.
module offchip_dma (
  input  logic         clk,
  input  logic         rst_n,
  // load side
  input  logic         rd_start,
  input  logic [31:0]  rd_addr,
  input  logic [5:0]   rd_lines,
  output logic         ld_valid,
  output logic [511:0] ld_line,
  // store side
  input  logic         wr_start,
  input  logic [31:0]  wr_addr,
  input  logic         st_valid,
  output logic         st_ready,
  input  logic [511:0] st_line,
  output logic         busy,
  // off-chip memory port
  output logic         mem_req,
  input  logic         mem_gnt,
  output logic         mem_we,
  output logic [31:0]  mem_addr,
  output logic [63:0]  mem_wdata,
  input  logic         mem_rvalid,
  input  logic [63:0]  mem_rdata
);
  logic [31:0]  raddr, waddr;
  logic [8:0]   rreq_left;     // read beats still to request
  logic [8:0]   rbeat_left;    // read beats still to receive
  logic [2:0]   rbeat;         // beat position inside the line being gathered
  logic [511:0] st_buf;
  logic [3:0]   wbeat_left;    // write beats of the buffered line still to send
  logic         wr_go, rd_go;

  assign st_ready  = (wbeat_left == 0);
  assign wr_go     = (wbeat_left != 0);
  assign rd_go     = !wr_go && (rreq_left != 0);
  assign mem_req   = wr_go || rd_go;
  assign mem_we    = wr_go;
  assign mem_addr  = wr_go ? waddr : raddr;
  assign mem_wdata = st_buf[63:0];
  assign busy      = wr_go || (rbeat_left != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raddr <= '0; waddr <= '0; rreq_left <= '0; rbeat_left <= '0; rbeat <= '0;
      st_buf <= '0; wbeat_left <= '0; ld_valid <= 1'b0; ld_line <= '0;
    end else begin
      ld_valid <= 1'b0;
      if (rd_start) begin
        raddr      <= rd_addr;
        rreq_left  <= {rd_lines, 3'b000};
        rbeat_left <= {rd_lines, 3'b000};
        rbeat      <= '0;
      end else if (rd_go && mem_gnt) begin
        raddr     <= raddr + 32'd8;
        rreq_left <= rreq_left - 1'b1;
      end
      if (mem_rvalid && rbeat_left != 0) begin
        ld_line    <= {mem_rdata, ld_line[511:64]};
        rbeat      <= rbeat + 1'b1;
        rbeat_left <= rbeat_left - 1'b1;
        if (rbeat == 3'd7) ld_valid <= 1'b1;
      end
      if (wr_start) waddr <= wr_addr;
      if (st_valid && st_ready) begin
        st_buf     <= st_line;
        wbeat_left <= 4'd8;
      end else if (wr_go && mem_gnt) begin
        st_buf     <= {64'd0, st_buf[511:64]};
        waddr      <= waddr + 32'd8;
        wbeat_left <= wbeat_left - 1'b1;
      end
    end
  end
endmodule
