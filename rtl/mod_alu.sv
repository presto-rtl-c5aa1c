// mod_alu: programmable modular arithmetic of one bank ("Prog. Logic").
//
// All arithmetic is modulo q, with q < 2^32 and operands already reduced.
// Sums use a 33-bit intermediate and one conditional subtraction; products are
// formed at 64 bits and reduced with a remainder operator, the simplest correct
// form (the document does not describe its reduction circuit).
//
// Operations (see presto_pkg::bank_op_e): add, sub, multiply, move, negate, the
// forward (Cooley-Tukey) and inverse (Gentleman-Sande) butterflies, and the two
// half-butterflies used when the two coefficients of a butterfly live in
// different banks: each bank then computes only its own output, the "upper"
// input telling it which half it is.
//
// Purely combinational: results are written by the bank at the next clock edge.
module mod_alu
  import presto_pkg::*;
(
  input  bank_op_e    op,
  input  logic [31:0] q,
  input  logic [31:0] x,
  input  logic [31:0] y,
  input  logic [31:0] w,
  input  logic        upper,
  output logic [31:0] r0,
  output logic [31:0] r1
);

  function automatic logic [31:0] madd(input logic [31:0] a, input logic [31:0] b,
                                       input logic [31:0] m);
    logic [32:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, m}) s = s - {1'b0, m};
    return s[31:0];
  endfunction

  function automatic logic [31:0] msub(input logic [31:0] a, input logic [31:0] b,
                                       input logic [31:0] m);
    logic [32:0] s;
    if (a >= b) s = {1'b0, a} - {1'b0, b};
    else        s = {1'b0, a} + {1'b0, m} - {1'b0, b};
    return s[31:0];
  endfunction

  function automatic logic [31:0] mmul(input logic [31:0] a, input logic [31:0] b,
                                       input logic [31:0] m);
    logic [63:0] p;
    logic [63:0] r;
    p = {32'd0, a} * {32'd0, b};
    r = (m == 32'd0) ? 64'd0 : p % {32'd0, m};
    return r[31:0];
  endfunction

  // One shared multiplier input pair: every operation uses at most one product.
  logic [31:0] ma, mb, prod, dxy, dyx;

  always_comb begin
    dxy = msub(x, y, q);
    dyx = msub(y, x, q);
    unique case (op)
      OP_MUL:  begin ma = x;   mb = y; end
      OP_CT:   begin ma = w;   mb = y; end
      OP_GS:   begin ma = dxy; mb = w; end
      OP_HBF:  begin ma = w;   mb = upper ? x : y; end
      OP_HBI:  begin ma = dyx; mb = w; end
      default: begin ma = x;   mb = y; end
    endcase
    prod = mmul(ma, mb, q);
  end

  always_comb begin
    r1 = '0;
    unique case (op)
      OP_ADD:  r0 = madd(x, y, q);
      OP_SUB:  r0 = dxy;
      OP_MUL:  r0 = prod;
      OP_MOVY: r0 = y;
      OP_NEGY: r0 = msub(32'd0, y, q);
      OP_CT:   begin r0 = madd(x, prod, q); r1 = msub(x, prod, q); end
      OP_GS:   begin r0 = madd(x, y, q);    r1 = prod;             end
      OP_HBF:  r0 = upper ? msub(y, prod, q) : madd(x, prod, q);
      OP_HBI:  r0 = upper ? prod : madd(x, y, q);
      default: r0 = '0;
    endcase
  end

endmodule
