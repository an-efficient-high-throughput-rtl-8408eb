// idea_round: one IDEA round, computed in three clock steps.
//
// Input sub-blocks x1..x4 and sub-keys K1..K6 must be stable for the whole
// three-step period. Using (*) for multiplication modulo 2^16+1 and (+) for
// addition modulo 2^16:
//   phase 0: t1 = x1 (*) K1, t2 = x2 (+) K2, t3 = x3 (+) K3, t4 = x4 (*) K4
//   phase 1: t7 = (t1 ^ t3) (*) K5, t8 = (t2 ^ t4) (+) t7
//   phase 2: t9 = t8 (*) K6, t10 = t7 (+) t9 and the output register is loaded
//            with (t1 ^ t9, t3 ^ t9, t2 ^ t10, t4 ^ t10).
// The two inner sub-blocks leave swapped, ready for the next round. Two modular
// multipliers are shared across the steps: both in phase 0, the first one in
// phases 1 and 2. The round function is IDEA's; the three-step split and the
// sharing are this design's choice, set by a stage rate of one block per three
// clocks. `y` changes only at the end of phase 2.
module idea_round
  import idea_pkg::*;
(
  input  logic        clk,
  input  logic [1:0]  phase,
  input  block_t      x,
  input  round_keys_t k,
  output block_t      y
);

  word_t t1, t2, t3, t4, t7, t8;
  word_t ma, mb, m0, m1, t10;

  // operand selection for the shared multiplier
  always_comb begin
    unique case (phase)
      2'd0:    begin ma = x.x1;    mb = k[0]; end
      2'd1:    begin ma = t1 ^ t3; mb = k[4]; end
      default: begin ma = t8;      mb = k[5]; end
    endcase
  end

  mulmod u_mul0 (.a(ma),   .b(mb),   .p(m0));
  mulmod u_mul1 (.a(x.x4), .b(k[3]), .p(m1));

  assign t10 = t7 + m0;

  always_ff @(posedge clk) begin
    unique case (phase)
      2'd0: begin
        t1 <= m0;
        t2 <= x.x2 + k[1];
        t3 <= x.x3 + k[2];
        t4 <= m1;
      end
      2'd1: begin
        t7 <= m0;
        t8 <= (t2 ^ t4) + m0;
      end
      default: begin
        y.x1 <= t1 ^ m0;
        y.x2 <= t3 ^ m0;
        y.x3 <= t2 ^ t10;
        y.x4 <= t4 ^ t10;
      end
    endcase
  end

endmodule
