// dram_model: behavioural off-chip memory for testbenches (not synthesizable
// intent). 64-bit words, byte addressed; requests are granted at random (about
// three cycles in four) and read data returns in order after LAT cycles.
// Testbenches read and write the array m directly to set up and check data.
module dram_model #(
  parameter int WORDS = 16384,
  parameter int LAT   = 4
) (
  input  logic        clk,
  input  logic        mem_req,
  output logic        mem_gnt,
  input  logic        mem_we,
  input  logic [31:0] mem_addr,
  input  logic [63:0] mem_wdata,
  output logic        mem_rvalid,
  output logic [63:0] mem_rdata
);
  logic [63:0] m [WORDS];
  logic [63:0] dpipe [LAT];
  logic        vpipe [LAT];
  int stalls = 0;

  initial begin
    for (int i = 0; i < WORDS; i++) m[i] = 0;
    for (int i = 0; i < LAT; i++) begin dpipe[i] = 0; vpipe[i] = 0; end
    mem_gnt = 0;
  end
  always @(negedge clk) mem_gnt = ($urandom % 4) != 0;
  always @(posedge clk) begin
    if (mem_req && !mem_gnt) stalls++;
    if (mem_req && mem_gnt && mem_we) m[(mem_addr >> 3) % WORDS] <= mem_wdata;
    vpipe[0] <= mem_req && mem_gnt && !mem_we;
    dpipe[0] <= m[(mem_addr >> 3) % WORDS];
    for (int i = 1; i < LAT; i++) begin vpipe[i] <= vpipe[i-1]; dpipe[i] <= dpipe[i-1]; end
  end
  assign mem_rvalid = vpipe[LAT-1];
  assign mem_rdata  = dpipe[LAT-1];
endmodule
