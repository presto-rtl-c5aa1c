// presto_pe: one processing engine of the in-situ datapath.
//
// Sixteen banks work in lockstep under one 57-bit control word, so the PE
// processes 16 coefficients per cycle and stores two 512-coefficient
// polynomials (PBUF0 and PBUF1 of all banks). Coefficient i of a polynomial is
// in bank i mod 16, entry i div 16. The intra-PE NoC shifts lines between
// banks; each bank sees lane b of the input line (line_in) and of the shifter.
//
// Top memory interface: when ctrl.rd_en is set, the port-A words of all banks
// are captured into a 512-bit output register, presented on line_out in the
// next cycle to the inter-PE NoC. line_in is used in the cycle it arrives.
module presto_pe
  import presto_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ctrl_t       ctrl,
  input  logic [31:0] q,
  input  line_t       line_in,
  output line_t       line_out
);
  line_t own_line, noc_line;

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    pe_bank #(.BANK_ID(b)) u_bank (
      .clk(clk), .ctrl(ctrl), .q(q),
      .top_lane(line_in[b*W +: W]), .noc_lane(noc_line[b*W +: W]),
      .xa(own_line[b*W +: W])
    );
  end

  intra_pe_noc #(.NBANK(NBANK), .W(W)) u_noc (
    .line_own(own_line), .line_top(line_in), .sel_top(ctrl.sh_top),
    .shift(ctrl.shift), .line_out(noc_line)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           line_out <= '0;
    else if (ctrl.rd_en)  line_out <= own_line;
  end
endmodule
