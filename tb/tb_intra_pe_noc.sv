// tb_intra_pe_noc: every shift amount and both sources; lane b of the output
// must equal lane (b + shift) mod 16 of the chosen input.
module tb_intra_pe_noc;
  logic [511:0] own, top, out, src;
  logic sel;
  logic [3:0] sh;
  int checks = 0, failures = 0;

  intra_pe_noc #(.NBANK(16), .W(32)) dut (.line_own(own), .line_top(top), .sel_top(sel),
                                          .shift(sh), .line_out(out));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int b = 0; b < 16; b++) begin own[b*32 +: 32] = $urandom; top[b*32 +: 32] = $urandom; end
      sel = it[0]; sh = 4'(it);
      #1;
      for (int b = 0; b < 16; b++) begin
        checks++;
        src = sel ? top : own;
        if (out[b*32 +: 32] !== src[((b + int'(sh)) % 16)*32 +: 32]) begin
          failures++; $display("FAIL sh=%0d lane=%0d", sh, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
