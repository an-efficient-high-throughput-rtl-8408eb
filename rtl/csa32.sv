// csa32: Wallace 3:2 compressor (carry-save adder) over W-bit vectors.
//
// Three operands A, B, C of equal weight are reduced, bit by bit with a full
// adder, to a sum vector of the same weight and a carry vector one place
// heavier: bit i of `carry` has weight 2^(i+1), so a+b+c == sum + (carry << 1).
// The shift is left to the user (the Wallace tree), as in the compressor symbol
// this follows. Purely combinational.
module csa32 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  always_comb begin
    sum   = a ^ b ^ c;
    carry = (a & b) | (a & c) | (b & c);
  end

endmodule
