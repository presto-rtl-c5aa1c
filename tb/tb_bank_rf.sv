// tb_bank_rf: random writes and reads of the 8-word register file against a
// shadow array.
module tb_bank_rf;
  logic clk = 0;
  logic [2:0] ra, wa;
  logic [31:0] rd, wd;
  logic we;
  logic [31:0] shadow [8];
  int checks = 0, failures = 0, cyc = 0;

  bank_rf #(.DEPTH(8), .W(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); we = 1; wa = 3'(i); wd = $urandom; shadow[i] = wd;
    end
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      ra = 3'($urandom);
      #1;
      checks++;
      if (rd !== shadow[ra]) begin failures++; $display("FAIL rd %0d", ra); end
      we = $urandom % 2; wa = 3'($urandom); wd = $urandom;
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
