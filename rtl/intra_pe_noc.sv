// intra_pe_noc: cyclic permutation path between the 16 banks of a PE.
//
// All banks move data at once: lane b of the output takes lane
// (b + shift) mod NBANK of the source line. The source is either the PE's own
// port-A line (cross-bank butterflies, rotations inside a PE) or the line
// arriving from the inter-PE NoC (placing one word in any bank). Each bank
// chooses between this output and the unshifted input line itself, which is
// the per-bank multiplexer of the document's drawing. Combinational.
module intra_pe_noc #(
  parameter int unsigned NBANK = 16,
  parameter int unsigned W     = 32,
  localparam int unsigned SW   = $clog2(NBANK)
) (
  input  logic [NBANK*W-1:0] line_own,
  input  logic [NBANK*W-1:0] line_top,
  input  logic               sel_top,
  input  logic [SW-1:0]      shift,
  output logic [NBANK*W-1:0] line_out
);
  logic [NBANK*W-1:0] src;
  assign src = sel_top ? line_top : line_own;

  always_comb begin
    for (int unsigned b = 0; b < NBANK; b++) begin
      line_out[b*W +: W] = src[((b + shift) % NBANK)*W +: W];
    end
  end
endmodule
