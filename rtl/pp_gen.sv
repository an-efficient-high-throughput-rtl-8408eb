// pp_gen: partial product generator of an N x N unsigned multiplier.
//
// Row i is the multiplicand ANDed with multiplier bit i and shifted left by i,
// placed in a 2N-bit row so the rows can be summed directly (the sum of all rows
// is a * b). Bits below position i and above i+N-1 of row i are constant 0.
// Purely combinational; the summing is done by a Wallace tree.
module pp_gen #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]             a,
  input  logic [N-1:0]             b,
  output logic [N-1:0][2*N-1:0]    pp
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      pp[i] = (2*N)'(a & {N{b[i]}}) << i;
    end
  end

endmodule
