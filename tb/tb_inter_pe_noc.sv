// tb_inter_pe_noc: random PE lines and sources; checks that rd_line is the
// selected PE's line and wb_line the chosen write-back source, with the CPU
// word repeated in all 16 lanes.
module tb_inter_pe_noc;
  import presto_pkg::*;
  line_t pe_line [32];
  logic [4:0] rd_pe;
  logic [1:0] wb_src;
  logic [31:0] cpu_word;
  line_t dma_line, const_line, rd_line, wb_line, expw;
  int checks = 0, failures = 0;

  inter_pe_noc #(.N_PE(32)) dut (.*);

  function automatic line_t rl();
    line_t l;
    for (int b = 0; b < 16; b++) l[b*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int it = 0; it < 400; it++) begin
      for (int p = 0; p < 32; p++) pe_line[p] = rl();
      dma_line = rl(); const_line = rl(); cpu_word = $urandom;
      rd_pe = 5'($urandom); wb_src = 2'(it);
      #1;
      unique case (wb_src)
        2'd0: expw = pe_line[rd_pe];
        2'd1: for (int b = 0; b < 16; b++) expw[b*32 +: 32] = cpu_word;
        2'd2: expw = dma_line;
        default: expw = const_line;
      endcase
      checks += 2;
      if (rd_line !== pe_line[rd_pe]) begin failures++; $display("FAIL rd_line pe %0d", rd_pe); end
      if (wb_line !== expw) begin failures++; $display("FAIL wb_line src %0d", wb_src); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
