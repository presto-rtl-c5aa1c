// bank_rf: the 8 x 32b register file of one bank.
//
// Holds scalar operands (broadcast by a scalar load) and intermediate results,
// such as the first half of a cross-bank butterfly. One combinational read
// port and one write port that updates at the rising edge. The document uses
// latches for density; flip-flops are used here with the same port behaviour.
module bank_rf #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra,
  output logic [W-1:0]  rd,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) if (we) mem[wa] <= wd;

  assign rd = mem[ra];
endmodule
