// cla_adder: block carry look-ahead adder, W bits (W a multiple of 4).
//
// Each bit forms generate g = x & y and propagate p = x | y. Inside a 4-bit
// block the three inner carries and the block's own generate G and propagate P
// are written out as two-level sum-of-products (carry look-ahead logic). The
// carry into each block is then G | P & (carry into the previous block), a
// second look-ahead level over the blocks. Sum bits are x ^ y ^ carry.
// Purely combinational. Using an OR for propagate follows the adder described
// for this design; the second-level block chaining is this design's own choice.
module cla_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NB = W / 4;

  logic [W-1:0]  g, p;
  logic [W:0]    c;
  logic [NB-1:0] bg, bp;
  logic [NB:0]   bc;

  initial assert (W % 4 == 0) else $error("cla_adder: W must be a multiple of 4");

  always_comb begin
    g = x & y;
    p = x | y;
    c = '0;
    bc = '0;
    bc[0] = cin;
    for (int unsigned j = 0; j < NB; j++) begin
      // block generate / propagate
      bg[j] = g[4*j+3] | (p[4*j+3] & g[4*j+2]) | (p[4*j+3] & p[4*j+2] & g[4*j+1])
            | (p[4*j+3] & p[4*j+2] & p[4*j+1] & g[4*j]);
      bp[j] = p[4*j+3] & p[4*j+2] & p[4*j+1] & p[4*j];
      bc[j+1] = bg[j] | (bp[j] & bc[j]);
      // look-ahead carries inside the block
      c[4*j]   = bc[j];
      c[4*j+1] = g[4*j] | (p[4*j] & bc[j]);
      c[4*j+2] = g[4*j+1] | (p[4*j+1] & g[4*j]) | (p[4*j+1] & p[4*j] & bc[j]);
      c[4*j+3] = g[4*j+2] | (p[4*j+2] & g[4*j+1]) | (p[4*j+2] & p[4*j+1] & g[4*j])
               | (p[4*j+2] & p[4*j+1] & p[4*j] & bc[j]);
    end
    c[W] = bc[NB];
    s    = x ^ y ^ c[W-1:0];
    cout = c[W];
  end

endmodule
