// mulmod: multiplication modulo 2^16 + 1, the IDEA multiply.
//
// Operands and result are 16-bit; the value 0 stands for 2^16. The 32-bit
// product of the two operands comes from the Wallace-tree multiplier (mul16).
// With lo = product mod 2^16 and hi = product div 2^16, the result is lo - hi
// when lo >= hi and lo - hi + 2^16 + 1 otherwise; that low-minus-high reduction
// is the method this design is built on. An operand of 0 (that is 2^16 = -1
// modulo 2^16+1) is handled apart, as IDEA defines it: the result is then
// 1 - other operand, modulo 2^16. Purely combinational.
module mulmod
  import idea_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t p
);

  logic [31:0] prod;
  word_t       lo, hi;

  mul16 #(.N(16)) u_mul (.a(a), .b(b), .p(prod));

  always_comb begin
    lo = prod[15:0];
    hi = prod[31:16];
    if (a == '0)       p = 16'd1 - b;
    else if (b == '0)  p = 16'd1 - a;
    else if (lo >= hi) p = lo - hi;
    else               p = lo - hi + 16'd1;  // + (2^16 + 1), 2^16 drops out of 16 bits
  end

endmodule
