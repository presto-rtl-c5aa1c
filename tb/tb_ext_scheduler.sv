// tb_ext_scheduler: the instruction queue with behavioural FSMs (busy for a
// fixed time after each issue). Checks: an instruction on free PEs overtakes
// an older blocked one (out-of-order issue); instructions on the same PEs keep
// program order; one class stays in order; MEM and NTT never run together;
// the queue takes exactly 32 entries; illegal instructions are dropped and
// counted; every issue goes to an idle FSM on PEs no running FSM holds.
module tb_ext_scheduler;
  import presto_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, empty;
  he_dec_t in_dec, iss_dec;
  logic [3:0] iss_valid, fsm_busy;
  pemask_t fsm_mask [4];
  logic [15:0] illegal_cnt;
  int left [4];
  int order [$];
  int checks = 0, failures = 0, cyc = 0, overtakes = 0;

  ext_scheduler #(.QDEPTH(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    wait (cyc == 20000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // behavioural FSMs: class c busy for 10*(c+1) cycles
  always @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      if (rst_n && iss_valid[c]) begin
        checks++;
        if (fsm_busy[c]) begin failures++; $display("FAIL issue to busy FSM %0d", c); end
        for (int o = 0; o < 4; o++)
          if (fsm_busy[o] && (fsm_mask[o] & iss_dec.mask) != 0) begin
            failures++; $display("FAIL overlapping issue");
          end
        if ((c == CL_MEM && fsm_busy[CL_NTT]) || (c == CL_NTT && fsm_busy[CL_MEM])) begin
          failures++; $display("FAIL MEM and NTT together");
        end
        fsm_busy[c] <= 1; fsm_mask[c] <= iss_dec.mask; left[c] <= (iss_dec.val == 100) ? 100 : 10 * (c + 1);
        order.push_back(int'(iss_dec.val));
      end else if (fsm_busy[c]) begin
        if (left[c] == 1) fsm_busy[c] <= 0;
        left[c] <= left[c] - 1;
      end
    end
  end

  task automatic push(he_op_e op, fsm_class_e cls, pemask_t m, int tag);
    in_dec = '0; in_dec.op = op; in_dec.cls = cls; in_dec.mask = m; in_dec.val = 32'(tag);
    in_valid = 1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 0;
  endtask
  task automatic drain();
    while (!empty || fsm_busy != 0) @(posedge clk);
    #1;
  endtask
  task automatic expect_order(int exp [$], string what);
    checks++;
    if (order != exp) begin
      failures++; $display("FAIL %s order:", what); foreach (order[i]) $display("  %0d", order[i]);
    end
    order.delete();
  endtask

  initial begin
    in_valid = 0; in_dec = '0; fsm_busy = 0;
    for (int c = 0; c < 4; c++) begin fsm_mask[c] = 0; left[c] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; #1;
    // 1: ELM on PE0 waits for MEM on PE0; MUL on PE1 overtakes it
    push(HE_VLOAD, CL_MEM, 32'h1, 1);
    push(HE_VADD, CL_ELM, 32'h1, 2);
    push(HE_VMUL, CL_MUL, 32'h2, 3);
    drain();
    expect_order('{1, 3, 2}, "overtake");
    // 2: same class in order even on disjoint PEs; ELM on PE2 overtakes nothing older
    push(HE_VADD, CL_ELM, 32'h1, 4);
    push(HE_VSUB, CL_ELM, 32'h2, 5);
    push(HE_VMUL, CL_MUL, 32'h4, 6);
    drain();
    expect_order('{4, 6, 5}, "class order");
    // 3: NTT on PE3 must not start while MEM runs on PE4
    push(HE_VSTORE, CL_MEM, 32'h10, 7);
    push(HE_NTT, CL_NTT, 32'h8, 8);
    push(HE_VNEG, CL_ELM, 32'h8, 9);
    drain();
    expect_order('{7, 8, 9}, "mem/ntt exclusion");
    // 4: capacity 32 while all FSMs are blocked behind a MEM instruction on all PEs
    push(HE_VLOAD, CL_MEM, 32'hFFFF_FFFF, 100);
    @(posedge clk); #1;
    for (int i = 0; i < 32; i++) begin
      in_dec = '0; in_dec.op = HE_VADD; in_dec.cls = CL_ELM; in_dec.mask = 32'h1; in_dec.val = 200 + i;
      in_valid = 1; #1;
      @(posedge clk); #1;
    end
    in_valid = 1; #1;
    checks++;
    if (in_ready) begin failures++; $display("FAIL queue accepts a 33rd entry"); end
    in_valid = 0;
    drain();
    checks++;
    if (order.size() != 33) begin failures++; $display("FAIL capacity: %0d issued", order.size()); end
    order.delete();
    // 5: illegal instruction dropped
    push(HE_ILLEGAL, CL_MEM, 32'h0, 999);
    drain();
    checks++;
    if (illegal_cnt != 1 || order.size() != 0) begin failures++; $display("FAIL illegal"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
