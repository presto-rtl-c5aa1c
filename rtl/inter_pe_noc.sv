// inter_pe_noc: data network between the 32 PEs and the outside.
//
// Read side: the registered 512-bit output lines of all PEs meet in one
// selecting multiplexer (rd_pe); the selected line (rd_line) feeds the CPU
// interface, the off-chip DMA and the write-back path.
// Write side: one 512-bit line is broadcast to every PE; which PEs take it is
// decided by their control words. The broadcast line is chosen by wb_src:
// 0 the selected PE line (PE-to-PE moves, Galois permutations across PEs),
// 1 the 32-bit CPU word repeated in all 16 lanes, 2 the line from the DMA,
// 3 a constant line from the controller (twiddles or a broadcast scalar).
// The constant source is this design's way of delivering twiddle factors.
// Combinational; the PE output registers hold rd_line stable for a cycle.
module inter_pe_noc
  import presto_pkg::*;
#(
  parameter int unsigned N_PE = 32
) (
  input  line_t                    pe_line [N_PE],
  input  logic [$clog2(N_PE)-1:0]  rd_pe,
  input  logic [1:0]               wb_src,
  input  logic [31:0]              cpu_word,
  input  line_t                    dma_line,
  input  line_t                    const_line,
  output line_t                    rd_line,
  output line_t                    wb_line
);
  assign rd_line = pe_line[rd_pe];

  always_comb begin
    unique case (wb_src)
      2'd0:    wb_line = rd_line;
      2'd1:    wb_line = {NBANK{cpu_word}};
      2'd2:    wb_line = dma_line;
      default: wb_line = const_line;
    endcase
  end
endmodule
