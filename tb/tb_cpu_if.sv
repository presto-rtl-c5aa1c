// tb_cpu_if: AXI4-Lite master against the CPU interface with a behavioural
// word memory answering req after a random delay. Checks that writes reach
// the memory with the right word address, that reads return the stored word,
// and that responses hold until accepted (with random ready delays).
module tb_cpu_if;
  logic clk = 0, rst_n = 0;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_awaddr, s_wdata, s_araddr, s_rdata;
  logic [3:0] s_wstrb;
  logic [1:0] s_bresp, s_rresp;
  logic req, req_we, ack;
  logic [14:0] req_addr;
  logic [31:0] req_wdata, ack_rdata;
  logic [31:0] mem [32768];
  int checks = 0, failures = 0, cyc = 0, dly = 0;

  cpu_if dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    wait (cyc == 100000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // behavioural responder standing in for the MEM FSM
  always_comb begin
    ack = req && (dly == 0);
    ack_rdata = mem[req_addr];
  end
  always @(posedge clk) begin
    if (req && dly == 0) begin
      if (req_we) mem[req_addr] <= req_wdata;
      dly <= $urandom % 4;
    end else if (req) dly <= dly - 1;
  end

  task automatic axi_write(logic [14:0] wa, logic [31:0] d);
    @(negedge clk); s_awvalid = 1; s_wvalid = 1; s_awaddr = {15'd0, wa, 2'b00}; s_wdata = d;
    do @(posedge clk); while (!s_awready);
    #1 s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
    repeat ($urandom % 3) begin @(negedge clk); checks++; if (!s_bvalid) begin failures++; $display("FAIL bvalid dropped"); end end
    @(negedge clk); s_bready = 1; @(posedge clk); #1 s_bready = 0;
  endtask
  task automatic axi_read(logic [14:0] ra, output logic [31:0] d);
    @(negedge clk); s_arvalid = 1; s_araddr = {15'd0, ra, 2'b00};
    do @(posedge clk); while (!s_arready);
    #1 s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    repeat ($urandom % 3) begin @(negedge clk); checks++; if (!s_rvalid) begin failures++; $display("FAIL rvalid dropped"); end end
    d = s_rdata;
    @(negedge clk); s_rready = 1; @(posedge clk); #1 s_rready = 0;
  endtask

  initial begin
    logic [31:0] sh [int];
    logic [31:0] d;
    logic [14:0] a;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_wdata = 0; s_araddr = 0; s_wstrb = 4'hF;
    for (int i = 0; i < 32768; i++) mem[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      a = 15'($urandom);
      d = $urandom;
      axi_write(a, d); sh[int'(a)] = d;
      checks++;
      if (mem[a] !== d) begin failures++; $display("FAIL write %0h", a); end
    end
    foreach (sh[i]) begin
      axi_read(15'(i), d);
      checks++;
      if (d !== sh[i]) begin failures++; $display("FAIL read %0h got %0h exp %0h", i, d, sh[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
