// tb_pbuf: random reads and dual-port writes of the polynomial buffer compared
// with a shadow array, including both ports writing the same address.
module tb_pbuf;
  logic clk = 0;
  logic [4:0] ra, rb, waa, wab;
  logic [31:0] da, db, wda, wdb;
  logic wea, web;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0, cyc = 0;

  pbuf #(.DEPTH(32), .W(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wea = 0; web = 0; ra = 0; rb = 0; waa = 0; wab = 0; wda = 0; wdb = 0;
    // fill
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); wea = 1; waa = 5'(i); wda = $urandom; shadow[i] = wda;
      web = 0;
    end
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      ra = 5'($urandom); rb = 5'($urandom);
      #1;
      checks += 2;
      if (da !== shadow[ra] || db !== shadow[rb]) begin
        failures++; $display("FAIL read %0d/%0d", ra, rb);
      end
      wea = $urandom % 2; web = $urandom % 2;
      waa = 5'($urandom); wab = (it % 7 == 0) ? waa : 5'($urandom);
      wda = $urandom; wdb = $urandom;
      if (wea) shadow[waa] = wda;
      if (web) shadow[wab] = wdb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
