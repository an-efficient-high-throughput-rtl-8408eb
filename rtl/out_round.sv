// out_round: IDEA output transformation.
//
// Takes the output of the last round (whose inner sub-blocks arrive swapped)
// and the sub-keys K49..K52 and loads, when `en` is high,
//   y = (x1 (*) K49, x3 (+) K50, x2 (+) K51, x4 (*) K52)
// where (*) is multiplication modulo 2^16+1 and (+) addition modulo 2^16.
// Reading x3 before x2 undoes the last round's swap, as IDEA requires.
// Combinational from x and k to the register; y changes only when `en` is high.
module out_round
  import idea_pkg::*;
(
  input  logic      clk,
  input  logic      en,
  input  block_t    x,
  input  out_keys_t k,
  output block_t    y
);

  word_t m0, m1;

  mulmod u_mul0 (.a(x.x1), .b(k[0]), .p(m0));
  mulmod u_mul1 (.a(x.x4), .b(k[3]), .p(m1));

  always_ff @(posedge clk) begin
    if (en) begin
      y.x1 <= m0;
      y.x2 <= x.x3 + k[1];
      y.x3 <= x.x2 + k[2];
      y.x4 <= m1;
    end
  end

endmodule
