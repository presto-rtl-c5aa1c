// pe_bank: one in-situ near-memory processing bank.
//
// The bank decodes the 57-bit control word shared by all banks of its PE,
// reads operand x from port A of a PBUF, operand y from port B of a PBUF, the
// RF, its lane of the PE input line ("top") or its lane of the intra-PE
// shifter, and the twiddle w from its top lane. mod_alu computes the result in
// the same cycle, and the clock edge writes r0 to PBUF[w_pbuf][wa] or to
// RF[rf_wa], and for butterflies r1 to PBUF[w_pbuf][rb]. The bank acts only if
// its bit in bank_en is set. For half-butterflies the bank is the "upper"
// partner when bit hb_lg of its index is set.
//
// Structure (Control, Data Intf., RF 8x32b, two PBUFs 32x32b, Prog. Logic)
// follows the document; the control-word fields and single-cycle timing are
// this design's. Port-A data (xa) goes to the intra-PE NoC and the PE output.
module pe_bank
  import presto_pkg::*;
#(
  parameter int unsigned BANK_ID = 0
) (
  input  logic        clk,
  input  ctrl_t       ctrl,
  input  logic [31:0] q,
  input  logic [31:0] top_lane,
  input  logic [31:0] noc_lane,
  output logic [31:0] xa
);
  logic [31:0] p0a, p0b, p1a, p1b, rfd, y, r0, r1;
  logic        en, upper;
  logic [3:0]  bid;

  assign bid   = 4'(BANK_ID);
  assign en    = ctrl.bank_en[BANK_ID] && (ctrl.op != OP_NOP);
  assign upper = bid[ctrl.hb_lg];
  assign xa    = ctrl.a_pbuf ? p1a : p0a;

  always_comb begin
    unique case (ctrl.ysrc)
      YS_PBUF: y = ctrl.b_pbuf ? p1b : p0b;
      YS_RF:   y = rfd;
      YS_TOP:  y = top_lane;
      default: y = noc_lane;
    endcase
  end

  mod_alu u_alu (
    .op(ctrl.op), .q(q), .x(xa), .y(y), .w(top_lane), .upper(upper), .r0(r0), .r1(r1)
  );

  pbuf #(.DEPTH(DEPTH), .W(W)) u_pbuf0 (
    .clk(clk), .ra(ctrl.ra), .rb(ctrl.rb), .da(p0a), .db(p0b),
    .wea(en && ctrl.pbuf_we && !ctrl.w_pbuf), .waa(ctrl.wa), .wda(r0),
    .web(en && ctrl.dual_we && !ctrl.w_pbuf), .wab(ctrl.rb), .wdb(r1)
  );

  pbuf #(.DEPTH(DEPTH), .W(W)) u_pbuf1 (
    .clk(clk), .ra(ctrl.ra), .rb(ctrl.rb), .da(p1a), .db(p1b),
    .wea(en && ctrl.pbuf_we && ctrl.w_pbuf), .waa(ctrl.wa), .wda(r0),
    .web(en && ctrl.dual_we && ctrl.w_pbuf), .wab(ctrl.rb), .wdb(r1)
  );

  bank_rf #(.DEPTH(RFD), .W(W)) u_rf (
    .clk(clk), .ra(ctrl.rf_ra), .rd(rfd),
    .we(en && ctrl.rf_we), .wa(ctrl.rf_wa), .wd(r0)
  );
endmodule
