// elm_fsm: sequencer for element-wise operations and in-PE rotation.
//
// Drives the same control word to every PE of the instruction's mask, one
// 16-coefficient row (one PBUF entry in all banks) per cycle:
//   VADD  dst = srcA + srcB       VSUB  dst = srcA - srcB
//   VADDS dst = srcA + RF[rfi]    VNEG  dst = -srcB     VMOV dst = srcB
// 32 cycles per instruction. VROT multiplies a 512-coefficient polynomial by
// X^r in the negacyclic ring (X^512 = -1), r = rs2 mod 1024: coefficient i
// moves to i + r, negated for each wrap past 512. Destination row d takes two
// passes through the intra-PE shifter (shift 16 - r mod 16): banks
// b >= r mod 16 read source row d - r/16, the others row d - r/16 - 1; a
// source row below zero wraps and negates. 64 cycles. VROT needs dst != srcB.
// This is the MulByXai step of the document's TFHE example; the sequence is
// this design's. busy rises the cycle after start and falls after the last
// row is written.
module elm_fsm
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
  logic [5:0] step;     // row (and pass, for VROT)
  logic [4:0] d, rh, s;
  logic [3:0] rl;
  logic       pass, wrap, neg, rot, last;

  assign rot  = (cur.op == HE_VROT);
  assign d    = rot ? step[5:1] : step[4:0];
  assign pass = rot & step[0];
  assign rh   = cur.val[8:4];
  assign rl   = cur.val[3:0];
  assign s    = d - rh - 5'(pass);
  assign wrap = ({1'b0, d} < ({1'b0, rh} + 6'(pass)));
  assign neg  = wrap ^ cur.val[9];
  assign last = rot ? (step == 6'd63) : (step == 6'd31);
  assign mask = busy ? cur.mask : '0;

  always_comb begin
    ctrl = CTRL_NOP;
    if (busy) begin
      ctrl.bank_en = '1;
      ctrl.ra      = d;
      ctrl.rb      = d;
      ctrl.wa      = d;
      ctrl.a_pbuf  = cur.srca;
      ctrl.b_pbuf  = cur.srcb;
      ctrl.w_pbuf  = cur.dst;
      ctrl.rf_ra   = cur.rfi;
      ctrl.pbuf_we = 1'b1;
      ctrl.ysrc    = YS_PBUF;
      unique case (cur.op)
        HE_VADD:  ctrl.op = OP_ADD;
        HE_VSUB:  ctrl.op = OP_SUB;
        HE_VADDS: begin ctrl.op = OP_ADD; ctrl.ysrc = YS_RF; end
        HE_VNEG:  ctrl.op = OP_NEGY;
        HE_VMOV:  ctrl.op = OP_MOVY;
        HE_VROT: begin
          ctrl.op      = neg ? OP_NEGY : OP_MOVY;
          ctrl.ysrc    = YS_NOC;
          ctrl.ra      = s;
          ctrl.a_pbuf  = cur.srcb;
          ctrl.shift   = 4'(5'd16 - {1'b0, rl});
          ctrl.bank_en = pass ? ((16'd1 << rl) - 16'd1) : ~((16'd1 << rl) - 16'd1);
        end
        default: ctrl.op = OP_NOP;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cur <= '0; step <= '0;
    end else if (start) begin
      busy <= 1'b1; cur <= dec; step <= '0;
    end else if (busy) begin
      step <= step + 1'b1;
      if (last) busy <= 1'b0;
    end
  end
endmodule
