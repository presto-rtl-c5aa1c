// tb_mod_alu: random and corner-case check of every mod_alu operation
// against 64-bit reference arithmetic, with a 32-bit prime modulus and a small
// one. Combinational block: no clock; a watchdog bounds the run anyway.
module tb_mod_alu;
  import presto_pkg::*;
  import tb_fhe_pkg::*;
  bank_op_e    op;
  logic [31:0] q, x, y, w, r0, r1;
  logic        upper;
  int checks = 0, failures = 0;

  mod_alu dut (.op(op), .q(q), .x(x), .y(y), .w(w), .upper(upper), .r0(r0), .r1(r1));

  task automatic chk(longint unsigned e0, longint unsigned e1, string what);
    checks++;
    if (r0 !== 32'(e0) || r1 !== 32'(e1)) begin
      failures++;
      $display("FAIL %s op=%0d x=%0d y=%0d w=%0d up=%0b: got %0d/%0d exp %0d/%0d",
               what, op, x, y, w, upper, r0, r1, e0, e1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned m, a, b, t;
    for (int it = 0; it < 4000; it++) begin
      m = (it % 2 == 0) ? Q : 64'd12289;
      q = 32'(m);
      a = (it < 8) ? m - 1 : rnd() % m;
      b = (it < 8) ? m - 1 - longint'(it % 3) : rnd() % m;
      t = rnd() % m;
      x = 32'(a); y = 32'(b); w = 32'(t); upper = it[2];
      op = OP_ADD;  #1 chk(madd(a, b, m), 0, "add");
      op = OP_SUB;  #1 chk(msub(a, b, m), 0, "sub");
      op = OP_MUL;  #1 chk(mmul(a, b, m), 0, "mul");
      op = OP_MOVY; #1 chk(b, 0, "movy");
      op = OP_NEGY; #1 chk(msub(0, b, m), 0, "negy");
      op = OP_CT;   #1 chk(madd(a, mmul(t, b, m), m), msub(a, mmul(t, b, m), m), "ct");
      op = OP_GS;   #1 chk(madd(a, b, m), mmul(msub(a, b, m), t, m), "gs");
      op = OP_HBF;  #1 chk(upper ? msub(b, mmul(t, a, m), m) : madd(a, mmul(t, b, m), m), 0, "hbf");
      op = OP_HBI;  #1 chk(upper ? mmul(msub(b, a, m), t, m) : madd(a, b, m), 0, "hbi");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
