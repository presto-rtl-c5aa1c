// tb_he_decoder: builds instructions field by field (R-type layout) and checks
// the decoded operation, class, buffer selects, RF index and PE mask, and that
// foreign opcodes and unused function codes decode as illegal.
module tb_he_decoder;
  import presto_pkg::*;
  logic [31:0] inst, rs1, rs2;
  he_dec_t dec;
  int checks = 0, failures = 0;

  he_decoder dut (.*);

  function automatic logic [31:0] rtype(logic [6:0] f7, logic [2:0] f3, logic [4:0] rd, logic [6:0] opc);
    return {f7, 5'd3, 5'd4, f3, rd, opc};
  endfunction

  task automatic expect_dec(he_op_e op, fsm_class_e cls, pemask_t m, string what);
    #1;
    checks++;
    if (dec.op !== op || (op != HE_ILLEGAL && dec.cls !== cls) || dec.mask !== m) begin
      failures++;
      $display("FAIL %s: op %0d cls %0d mask %h", what, dec.op, dec.cls, dec.mask);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    he_op_e ops [10] = '{HE_VADD, HE_VSUB, HE_VADDS, HE_VNEG, HE_VMOV, HE_VROT, HE_VMUL, HE_VMULS, HE_NTT, HE_INTT};
    fsm_class_e cl [10] = '{CL_ELM, CL_ELM, CL_ELM, CL_ELM, CL_ELM, CL_ELM, CL_MUL, CL_MUL, CL_NTT, CL_NTT};
    for (int f = 0; f < 10; f++) begin
      rs1 = $urandom; rs2 = $urandom;
      inst = rtype(7'(f), 3'(f), 5'b00100 | 5'(f % 4), OPC_HE);
      expect_dec(ops[f], cl[f], rs1, $sformatf("op-he %0d", f));
      checks++;
      if (dec.dst !== f[0] || dec.srca !== f[1] || dec.srcb !== f[2] || dec.val !== rs2 || dec.rfi !== inst[9:7]) begin
        failures++; $display("FAIL fields %0d", f);
      end
    end
    // automorphism over 4 PEs from PE 8 (dimension 2048)
    rs1 = 32'h0000_0B08; rs2 = 32'd5;
    inst = rtype(7'd10, 3'b000, 5'd1, OPC_HE);
    expect_dec(HE_AUTO, CL_MEM, 32'h0000_0F00, "auto");
    rs1 = 32'h0000_0E00;  // 16384 over all PEs
    expect_dec(HE_AUTO, CL_MEM, 32'hFFFF_FFFF, "auto all");
    rs1 = 32'h0000_0E01;  // does not fit
    expect_dec(HE_ILLEGAL, CL_MEM, 32'h0, "auto overflow");
    // vector load / store / scalar load / config
    rs1 = 32'h1000; rs2 = 32'd17;
    inst = rtype(7'd0, 3'd0, 5'd1, OPC_HE_LOAD);
    expect_dec(HE_VLOAD, CL_MEM, 32'h0002_0000, "vload");
    checks++; if (dec.val !== 32'h1000 || dec.pe !== 5'd17 || dec.dst !== 1'b1) begin failures++; $display("FAIL vload fields"); end
    inst = rtype(7'd0, 3'd0, 5'd0, OPC_HE_STORE);
    expect_dec(HE_VSTORE, CL_MEM, 32'h0002_0000, "vstore");
    checks++; if (dec.srcb !== 1'b0) begin failures++; $display("FAIL vstore pbuf"); end
    rs1 = 32'h0000_00F0; rs2 = 32'd99;
    inst = rtype(7'd0, 3'd1, 5'd3, OPC_HE_LOAD);
    expect_dec(HE_SLOAD, CL_MEM, 32'h0000_00F0, "sload");
    checks++; if (dec.rfi !== 3'd3 || dec.val !== 32'd99) begin failures++; $display("FAIL sload fields"); end
    rs1 = 32'd1024;
    inst = rtype(7'd0, 3'd2, 5'd0, OPC_HE_LOAD);
    expect_dec(HE_CFG, CL_NTT, 32'hFFFF_FFFF, "cfg");
    // illegal
    inst = rtype(7'd0, 3'd0, 5'd0, 7'b0110011);
    expect_dec(HE_ILLEGAL, CL_MEM, 32'h0, "base OP");
    inst = rtype(7'd40, 3'd0, 5'd0, OPC_HE);
    expect_dec(HE_ILLEGAL, CL_MEM, 32'h0, "bad funct7");
    inst = rtype(7'd0, 3'd5, 5'd0, OPC_HE_STORE);
    expect_dec(HE_ILLEGAL, CL_MEM, 32'h0, "bad store funct3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
