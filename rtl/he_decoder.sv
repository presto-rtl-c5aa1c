// he_decoder: decodes one custom RISC-V instruction for the Presto controller.
//
// Presto instructions occupy three custom opcodes of the RISC-V base map:
// custom-0 (OP-HE, arithmetic), custom-2 (OP-HE-LOAD) and custom-3
// (OP-HE-STORE). The host's extension dispatcher hands over the instruction
// together with the values of its rs1 and rs2 registers. The fields inside
// the instruction are this design's (standard R-type positions):
//
//   OP-HE:       funct7 = operation (0 VADD, 1 VSUB, 2 VADDS, 3 VNEG, 4 VMOV,
//                5 VROT, 6 VMUL, 7 VMULS, 8 NTT, 9 INTT, 10 AUTO),
//                funct3 = {srcB pbuf, srcA pbuf, dst pbuf}, rd[9:7] = RF index.
//                rs1 = PE mask, rs2 = scalar (VROT: power r of X^r).
//                AUTO: rs1[4:0] = first PE, rs1[11:8] = log2 dimension (9..14),
//                rs2 = Galois element k; source srcA, destination dst.
//   OP-HE-LOAD:  funct3 0 vector load: rs1 = byte address, rs2[4:0] = PE, rd[7] = pbuf;
//                funct3 1 scalar load into RF[rd[9:7]] of all banks of PEs rs1;
//                funct3 2 configuration write: rs1 = index, rs2 = value.
//   OP-HE-STORE: funct3 0 vector store: rs1 = byte address, rs2[4:0] = PE, rd[7] = pbuf.
//
// Combinational. Anything else decodes to HE_ILLEGAL.
module he_decoder
  import presto_pkg::*;
(
  input  logic [31:0] inst,
  input  logic [31:0] rs1,
  input  logic [31:0] rs2,
  output he_dec_t     dec
);
  logic [6:0] opc, f7;
  logic [2:0] f3;
  logic [3:0] lgn;
  logic [5:0] npe;   // PEs covered by an automorphism

  assign opc = inst[6:0];
  assign f3  = inst[14:12];
  assign f7  = inst[31:25];
  assign lgn = rs1[11:8];
  assign npe = (lgn >= 4'd9 && lgn <= 4'd14) ? (6'd1 << (lgn - 4'd9)) : 6'd0;

  always_comb begin
    dec      = '0;
    dec.op   = HE_ILLEGAL;
    dec.cls  = CL_MEM;
    dec.dst  = inst[7];
    dec.srca = f3[1];
    dec.srcb = f3[2];
    dec.rfi  = inst[9:7];
    dec.val  = rs2;
    unique case (opc)
      OPC_HE: begin
        dec.dst  = f3[0];
        dec.mask = rs1;
        unique case (f7)
          7'd0:  begin dec.op = HE_VADD;  dec.cls = CL_ELM; end
          7'd1:  begin dec.op = HE_VSUB;  dec.cls = CL_ELM; end
          7'd2:  begin dec.op = HE_VADDS; dec.cls = CL_ELM; end
          7'd3:  begin dec.op = HE_VNEG;  dec.cls = CL_ELM; end
          7'd4:  begin dec.op = HE_VMOV;  dec.cls = CL_ELM; end
          7'd5:  begin dec.op = HE_VROT;  dec.cls = CL_ELM; end
          7'd6:  begin dec.op = HE_VMUL;  dec.cls = CL_MUL; end
          7'd7:  begin dec.op = HE_VMULS; dec.cls = CL_MUL; end
          7'd8:  begin dec.op = HE_NTT;   dec.cls = CL_NTT; end
          7'd9:  begin dec.op = HE_INTT;  dec.cls = CL_NTT; end
          7'd10: if (npe != 0 && 32'(rs1[4:0]) + 32'(npe) <= 32'(NPE)) begin
                   dec.op   = HE_AUTO; dec.cls = CL_MEM;
                   dec.pe   = rs1[4:0];
                   dec.aux  = 32'(lgn);
                   dec.mask = ((pemask_t'(1) << npe) - 1'b1) << rs1[4:0];
                   if (npe == 6'd32) dec.mask = '1;
                 end
          default: ;
        endcase
        if (dec.op == HE_ILLEGAL) dec.mask = '0;
      end
      OPC_HE_LOAD: begin
        unique case (f3)
          3'd0: begin dec.op = HE_VLOAD; dec.pe = rs2[4:0]; dec.val = rs1;
                      dec.mask = pemask_t'(1) << rs2[4:0]; end
          3'd1: begin dec.op = HE_SLOAD; dec.mask = rs1; end
          3'd2: begin dec.op = HE_CFG; dec.cls = CL_NTT; dec.aux = rs1; dec.mask = '1; end
          default: ;
        endcase
      end
      OPC_HE_STORE: begin
        if (f3 == 3'd0) begin
          dec.op = HE_VSTORE; dec.pe = rs2[4:0]; dec.val = rs1; dec.srcb = inst[7];
          dec.mask = pemask_t'(1) << rs2[4:0];
        end
      end
      default: ;
    endcase
  end
endmodule
