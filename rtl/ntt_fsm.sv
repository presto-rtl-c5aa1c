// ntt_fsm: sequencer for the 512-point negacyclic NTT and inverse NTT.
//
// Runs in place on PBUF dst of every PE in the mask; all PEs transform their
// own polynomial in lockstep. Coefficient i is in bank i mod 16, entry i div 16.
// Forward transform (Cooley-Tukey, natural order in, bit-reversed out):
//   - stages with butterfly distance len = 256..16: both coefficients are in
//     the same bank (entries e and e + len/16); each bank does one full
//     butterfly per cycle, 16 cycles per stage, one twiddle for all lanes;
//   - stages with len = 8..1: the partners are in banks b and b xor len of the
//     same entry. For every entry: cycle A, the shifter brings lane b+len to
//     the lower banks, which compute x + w*y into RF[7]; cycle B, the shifter
//     brings lane b-len to the upper banks, which compute y - w*x into RF[7];
//     cycle C, all banks copy RF[7] back to the PBUF. 96 cycles per stage.
// Inverse transform (Gentleman-Sande): the same stages in reverse order with
// the inverse twiddles, then 32 cycles multiplying every coefficient by n^-1.
// Cycle counts: forward 5*16 + 4*96 = 464, inverse 496. RF entry 7 of every
// bank is overwritten.
//
// Twiddles: a table of 1024 words (forward twiddle k = psi^bitrev9(k) at
// index k, inverse ones at 512 + k) plus the modulus q and n^-1 is written by
// configuration instructions (HE_CFG, index in aux, value in val), which take
// effect in their start cycle. The butterfly of stage len, group g uses
// twiddle k = 256/len + g. Each cycle this FSM puts one twiddle per bank on
// tw_line, which the inter-PE NoC broadcasts to the PEs.
// All of the schedule is this design's; the document gives the 512-dimension
// PE, the 16 banks and the cyclic intra-PE shifter.
module ntt_fsm
  import presto_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  he_dec_t     dec,
  output logic        busy,
  output pemask_t     mask,
  output ctrl_t       ctrl,
  output line_t       tw_line,
  output logic [31:0] q,
  output logic        cfg_err     // configuration index out of range (sticky)
);
  typedef enum logic [1:0] {PH_LOCAL, PH_CROSS, PH_SCALE} phase_e;

  logic [31:0] tab [1024];
  logic [31:0] ninv;
  he_dec_t     cur;
  phase_e      ph;
  logic [2:0]  lv;        // stage level: log2(len/16) in LOCAL, log2(len) in CROSS
  logic [4:0]  e;         // entry (CROSS, SCALE) or pair index (LOCAL, low 4 bits)
  logic [1:0]  sub;       // CROSS sub-cycle A/B/C
  logic        inv;
  logic        stage_end, last;

  // LOCAL addressing
  logic [4:0] p5, e_lo, e_hi, t5;
  logic [8:0] k_loc;
  assign p5    = {1'b0, e[3:0]};
  assign t5    = 5'd1 << lv;
  assign e_lo  = ((p5 >> lv) << (lv + 3'd1)) | (p5 & (t5 - 5'd1));
  assign e_hi  = e_lo | t5;
  assign k_loc = 9'((5'd16 >> lv) + (e_lo >> (lv + 3'd1)));

  logic [15:0] lowmask;
  always_comb begin
    unique case (lv[1:0])
      2'd0: lowmask = 16'h5555;
      2'd1: lowmask = 16'h3333;
      2'd2: lowmask = 16'h0F0F;
      default: lowmask = 16'h00FF;
    endcase
  end

  assign mask = busy ? cur.mask : '0;

  // Twiddle line
  always_comb begin
    logic [8:0] j, k;
    logic [3:0] len4;
    len4 = 4'd1 << lv[1:0];
    tw_line = '0;
    for (int b = 0; b < NBANK; b++) begin
      j = {e, 4'(b)} & ~9'(len4);
      k = 9'(9'd256 >> lv) + 9'(j >> (lv + 3'd1));
      unique case (ph)
        PH_LOCAL: tw_line[b*W +: W] = tab[{inv, k_loc}];
        PH_CROSS: tw_line[b*W +: W] = tab[{inv, k}];
        default:  tw_line[b*W +: W] = ninv;
      endcase
    end
  end

  // Control word
  always_comb begin
    ctrl = CTRL_NOP;
    if (busy) begin
      ctrl.bank_en = '1;
      ctrl.a_pbuf  = cur.dst;
      ctrl.b_pbuf  = cur.dst;
      ctrl.w_pbuf  = cur.dst;
      ctrl.hb_lg   = lv[1:0];
      ctrl.rf_ra   = 3'd7;
      ctrl.rf_wa   = 3'd7;
      unique case (ph)
        PH_LOCAL: begin
          ctrl.op      = inv ? OP_GS : OP_CT;
          ctrl.ra      = e_lo;
          ctrl.rb      = e_hi;
          ctrl.wa      = e_lo;
          ctrl.ysrc    = YS_PBUF;
          ctrl.pbuf_we = 1'b1;
          ctrl.dual_we = 1'b1;
        end
        PH_CROSS: begin
          ctrl.ra = e;
          ctrl.wa = e;
          if (sub == 2'd2) begin
            ctrl.op      = OP_MOVY;
            ctrl.ysrc    = YS_RF;
            ctrl.pbuf_we = 1'b1;
          end else begin
            ctrl.op      = inv ? OP_HBI : OP_HBF;
            ctrl.ysrc    = YS_NOC;
            ctrl.rf_we   = 1'b1;
            ctrl.bank_en = (sub == 2'd0) ? lowmask : ~lowmask;
            ctrl.shift   = (sub == 2'd0) ? (4'd1 << lv[1:0]) : 4'(5'd16 - (5'd1 << lv[1:0]));
          end
        end
        default: begin
          ctrl.op      = OP_MUL;
          ctrl.ra      = e;
          ctrl.wa      = e;
          ctrl.ysrc    = YS_TOP;
          ctrl.pbuf_we = 1'b1;
        end
      endcase
    end
  end

  assign stage_end = (ph == PH_LOCAL) ? (e[3:0] == 4'd15) :
                     (ph == PH_CROSS) ? (e == 5'd31 && sub == 2'd2) : (e == 5'd31);
  assign last = stage_end && (inv ? (ph == PH_SCALE) : (ph == PH_CROSS && lv == 3'd0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cur <= '0; ph <= PH_LOCAL; lv <= '0; e <= '0; sub <= '0; inv <= 1'b0;
      q <= '0; ninv <= '0; cfg_err <= 1'b0;
    end else if (start) begin
      if (dec.op == HE_CFG) begin
        if (dec.aux < 32'(CFG_Q))         tab[dec.aux[9:0]] <= dec.val;
        else if (dec.aux == 32'(CFG_Q))    q    <= dec.val;
        else if (dec.aux == 32'(CFG_NINV)) ninv <= dec.val;
        else cfg_err <= 1'b1;
      end else begin
        busy <= 1'b1; cur <= dec; e <= '0; sub <= '0;
        inv  <= (dec.op == HE_INTT);
        ph   <= (dec.op == HE_INTT) ? PH_CROSS : PH_LOCAL;
        lv   <= (dec.op == HE_INTT) ? 3'd0 : 3'd4;
      end
    end else if (busy) begin
      if (ph == PH_CROSS) begin
        sub <= (sub == 2'd2) ? 2'd0 : sub + 2'd1;
        if (sub == 2'd2) e <= e + 5'd1;
      end else begin
        e <= e + 5'd1;
      end
      if (last) busy <= 1'b0;
      else if (stage_end) begin
        e <= '0; sub <= '0;
        unique case (ph)
          PH_LOCAL:
            if (!inv && lv == 3'd0) begin ph <= PH_CROSS; lv <= 3'd3; end
            else if (inv && lv == 3'd4) begin ph <= PH_SCALE; end
            else lv <= inv ? lv + 3'd1 : lv - 3'd1;
          PH_CROSS:
            if (inv && lv == 3'd3) begin ph <= PH_LOCAL; lv <= 3'd0; end
            else lv <= inv ? lv + 3'd1 : lv - 3'd1;
          default: ;
        endcase
      end
    end
  end
endmodule
