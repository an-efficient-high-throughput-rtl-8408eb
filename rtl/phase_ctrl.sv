// phase_ctrl: step sequencer shared by all stages of an IDEA pipeline.
//
// A free-running counter 0, 1, ..., PHASES-1. Every pipeline stage does one
// part of its work per step and all stage registers advance together in the last
// step (`last`), so the pipeline takes a new block every PHASES clocks. With the
// default of 3 this gives 64 bits per 3 clocks, 1.42 Gbit/s at 66.67 MHz, the
// rate this design targets; the three-step split of a round is this design's own.
// Reset (asynchronous, active low) starts the count at 0.
module phase_ctrl #(
  parameter int unsigned PHASES = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [1:0] phase,
  output logic       last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     phase <= '0;
    else if (phase == 2'(PHASES-1)) phase <= '0;
    else                            phase <= phase + 2'd1;
  end

  assign last = (phase == 2'(PHASES-1));

endmodule
