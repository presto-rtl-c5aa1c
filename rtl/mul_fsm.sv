// mul_fsm: sequencer for modular multiplication of polynomials.
//
// VMUL  dst = srcA * srcB coefficient by coefficient (dyadic product of two
//       polynomials in NTT form), VMULS dst = srcA * RF[rfi] (scalar).
// One 16-coefficient row per cycle in every PE of the mask: 32 cycles per
// instruction. busy rises the cycle after start and falls after the last row.
// The row order and timing are this design's.
module mul_fsm
  import presto_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  he_dec_t dec,
  output logic    busy,
  output pemask_t mask,
  output ctrl_t   ctrl
);
  he_dec_t    cur;
  logic [4:0] row;

  assign mask = busy ? cur.mask : '0;

  always_comb begin
    ctrl = CTRL_NOP;
    if (busy) begin
      ctrl.op      = OP_MUL;
      ctrl.bank_en = '1;
      ctrl.ra      = row;
      ctrl.rb      = row;
      ctrl.wa      = row;
      ctrl.a_pbuf  = cur.srca;
      ctrl.b_pbuf  = cur.srcb;
      ctrl.w_pbuf  = cur.dst;
      ctrl.rf_ra   = cur.rfi;
      ctrl.ysrc    = (cur.op == HE_VMULS) ? YS_RF : YS_PBUF;
      ctrl.pbuf_we = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cur <= '0; row <= '0;
    end else if (start) begin
      busy <= 1'b1; cur <= dec; row <= '0;
    end else if (busy) begin
      row <= row + 1'b1;
      if (row == 5'd31) busy <= 1'b0;
    end
  end
endmodule
