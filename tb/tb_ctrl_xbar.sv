// tb_ctrl_xbar: random disjoint PE masks for the four FSMs; each PE must get
// the control word of the FSM that owns it and the no-operation word otherwise.
module tb_ctrl_xbar;
  import presto_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_t fsm_ctrl [4];
  logic [31:0] fsm_mask [4];
  ctrl_t pe_ctrl [32];
  int checks = 0, failures = 0, cyc = 0;

  ctrl_xbar #(.N_PE(32), .NFSM(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    wait (cyc == 10000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int owner [32];
    for (int f = 0; f < 4; f++) begin fsm_mask[f] = 0; fsm_ctrl[f] = CTRL_NOP; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      for (int f = 0; f < 4; f++) begin fsm_mask[f] = 0; fsm_ctrl[f] = ctrl_t'({$urandom, $urandom}); end
      for (int p = 0; p < 32; p++) begin
        owner[p] = int'($urandom % 5) - 1;
        if (owner[p] >= 0) fsm_mask[owner[p]][p] = 1'b1;
      end
      #1;
      for (int p = 0; p < 32; p++) begin
        checks++;
        if (pe_ctrl[p] !== ((owner[p] >= 0) ? fsm_ctrl[owner[p]] : CTRL_NOP)) begin
          failures++; $display("FAIL pe %0d owner %0d", p, owner[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
