// mul16: unsigned N x N multiplier (N = 16 by default) with a 2N-bit product.
//
// Three parts: the partial product generator (pp_gen), a Wallace tree of 3:2
// compressors that adds all N rows at once down to two vectors, and a block
// carry look-ahead adder that adds those two vectors. Purely combinational.
module mul16 #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [N-1:0][2*N-1:0] pp;
  logic [2*N-1:0]        vs, vc;
  logic                  unused_cout;

  pp_gen #(.N(N)) u_ppg (.a(a), .b(b), .pp(pp));

  wallace_tree #(.ROWS(N), .W(2*N)) u_tree (.rows(pp), .sum(vs), .carry(vc));

  cla_adder #(.W(2*N)) u_cla (.x(vs), .y(vc), .cin(1'b0), .s(p), .cout(unused_cout));

endmodule
