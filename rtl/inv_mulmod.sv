// inv_mulmod: fast multiplicative inverse modulo 2^16+1, 30 clocks per operand.
//
// 2^16+1 is prime, so by Euler's theorem k^-1 = k^(2^16 - 1) = k^(1+2+4+...+2^15).
// One modular multiplier (mulmod) is used 30 times: 15 squarings build and store
// the powers P1 = k^2, P2 = k^4, ..., P15 = k^32768, then 15 multiplications form
// (((k * P15) * P1) * P2) ... * P14. The value 0 (meaning 2^16) comes out as 0,
// its own inverse.
// Interface: `start` with `k` is taken at a clock edge while `ready` is high.
// `done` is a one-cycle strobe 30 clocks after the edge that took `start`, and
// `inv` then holds the result until the next result replaces it. `ready` is also
// high during the last multiplication, so back-to-back operands are taken every
// 30 clocks. Reset is asynchronous, active low.
module inv_mulmod
  import idea_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t k,
  output logic  ready,
  output logic  busy,
  output logic  done,
  output word_t inv
);

  typedef enum logic [1:0] {S_IDLE, S_SQUARE, S_MULT} state_t;

  state_t      state;
  logic [3:0]  cnt;
  word_t       pw [16];   // pw[i] = k^(2^i)
  word_t       ma, mb, m;

  always_comb begin
    unique case (state)
      S_SQUARE: begin ma = pw[cnt - 4'd1]; mb = pw[cnt - 4'd1]; end
      S_MULT:   begin ma = (cnt == 4'd0) ? pw[0] : inv; mb = (cnt == 4'd0) ? pw[15] : pw[cnt]; end
      default:  begin ma = pw[0]; mb = pw[0]; end
    endcase
  end

  mulmod u_mul (.a(ma), .b(mb), .p(m));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
      inv   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cnt   <= 4'd1;
          state <= S_SQUARE;
        end
        S_SQUARE: begin
          if (cnt == 4'd15) begin
            cnt   <= 4'd0;
            state <= S_MULT;
          end else begin
            cnt <= cnt + 4'd1;
          end
        end
        default: begin   // S_MULT
          inv <= m;
          if (cnt == 4'd14) begin
            done  <= 1'b1;
            if (start) begin
              cnt   <= 4'd1;
              state <= S_SQUARE;
            end else begin
              state <= S_IDLE;
            end
          end else begin
            cnt <= cnt + 4'd1;
          end
        end
      endcase
    end
  end

  // stored powers of k (no reset needed: written before they are read)
  always_ff @(posedge clk) begin
    if (ready && start)           pw[0]   <= k;
    if (state == S_SQUARE)        pw[cnt] <= m;
  end

  assign busy  = (state != S_IDLE);
  assign ready = (state == S_IDLE) || (state == S_MULT && cnt == 4'd14);

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready)
    else $error("inv_mulmod: start while not ready");

endmodule
