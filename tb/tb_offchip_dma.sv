// tb_offchip_dma: the DMA against a behavioural 64-bit memory with random
// grant stalls and a 3-cycle read latency. Stores 8 random lines, loads them
// back and checks every line, its order and the memory contents; checks that
// a line takes at least 8 memory beats.
module tb_offchip_dma;
  logic clk = 0, rst_n = 0;
  logic rd_start, ld_valid, wr_start, st_valid, st_ready, busy;
  logic [31:0] rd_addr, wr_addr, mem_addr;
  logic [5:0] rd_lines;
  logic [511:0] ld_line, st_line;
  logic mem_req, mem_gnt, mem_we, mem_rvalid;
  logic [63:0] mem_wdata, mem_rdata;
  logic [63:0] dram [4096];
  logic [63:0] rpipe [3];
  logic [2:0]  vpipe;
  int checks = 0, failures = 0, cyc = 0;

  offchip_dma dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    wait (cyc == 100000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // memory model: random grant, writes immediate, reads after 3 cycles
  always @(negedge clk) mem_gnt = ($urandom % 4) != 0;
  always @(posedge clk) begin
    vpipe <= {vpipe[1:0], mem_req && mem_gnt && !mem_we};
    rpipe[0] <= dram[mem_addr[14:3]]; rpipe[1] <= rpipe[0]; rpipe[2] <= rpipe[1];
    if (mem_req && mem_gnt && mem_we) dram[mem_addr[14:3]] <= mem_wdata;
  end
  assign mem_rvalid = vpipe[2];
  assign mem_rdata  = rpipe[2];

  initial begin
    logic [511:0] lines [8];
    int c0, got;
    rd_start = 0; wr_start = 0; st_valid = 0; rd_addr = 0; wr_addr = 0; rd_lines = 0; st_line = 0;
    vpipe = 0;
    for (int i = 0; i < 4096; i++) dram[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); wr_start = 1; wr_addr = 32'h400; @(negedge clk); wr_start = 0;
    c0 = cyc;
    for (int l = 0; l < 8; l++) begin
      for (int b = 0; b < 16; b++) lines[l][b*32 +: 32] = $urandom;
      while (!st_ready) @(negedge clk);
      st_valid = 1; st_line = lines[l]; @(negedge clk); st_valid = 0;
    end
    while (busy) @(negedge clk);
    checks++;
    if (cyc - c0 < 64) begin failures++; $display("FAIL store too fast: %0d cycles", cyc - c0); end
    for (int l = 0; l < 8; l++)
      for (int bt = 0; bt < 8; bt++) begin
        checks++;
        if (dram[(32'h400 >> 3) + l*8 + bt] !== lines[l][bt*64 +: 64]) begin
          failures++; $display("FAIL dram line %0d beat %0d", l, bt);
        end
      end
    @(negedge clk); rd_start = 1; rd_addr = 32'h400; rd_lines = 8; @(negedge clk); rd_start = 0;
    got = 0;
    while (got < 8) begin
      @(posedge clk); #1;
      if (ld_valid) begin
        checks++;
        if (ld_line !== lines[got]) begin failures++; $display("FAIL load line %0d", got); end
        got++;
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
