// pbuf: polynomial buffer of one bank, DEPTH words of W bits (32 x 32b).
//
// Two combinational read ports (A, B) and two write ports (A, B) so that a
// butterfly reads two coefficients and writes both results in one cycle.
// Writes take effect at the rising clock edge; if both ports write the same
// address, port B wins. The document builds this buffer as a latch array for
// density; this version uses flip-flops, which behave the same at the ports.
// No reset: the contents are data, always written before they are read.
module pbuf #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra,
  input  logic [AW-1:0] rb,
  output logic [W-1:0]  da,
  output logic [W-1:0]  db,
  input  logic          wea,
  input  logic [AW-1:0] waa,
  input  logic [W-1:0]  wda,
  input  logic          web,
  input  logic [AW-1:0] wab,
  input  logic [W-1:0]  wdb
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wea) mem[waa] <= wda;
    if (web) mem[wab] <= wdb;
  end

  assign da = mem[ra];
  assign db = mem[rb];
endmodule
