// wallace_tree: reduces ROWS operand rows of W bits to two rows (sum and carry)
// whose sum, modulo 2^W, equals the sum of all rows.
//
// Each layer groups its rows in threes, each group into a 3:2 compressor
// (csa32); the compressor's carry is shifted one place left here. Rows left
// over from the grouping pass to the next layer unchanged. Layers follow until
// two rows remain: for 16 rows the layers hold 16, 11, 8, 6, 4, 3 and 2 rows,
// six compressor delays in all. Purely combinational.
module wallace_tree #(
  parameter int unsigned ROWS = 16,
  parameter int unsigned W    = 32
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);

  // rows present after `level` layers
  function automatic int unsigned rows_at(int unsigned level);
    int unsigned r;
    r = ROWS;
    for (int unsigned l = 0; l < level; l++)
      if (r > 2) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int unsigned num_layers();
    int unsigned n, r;
    n = 0;
    r = ROWS;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      n++;
    end
    return n;
  endfunction

  localparam int unsigned LAYERS = num_layers();

  // Each layer has its own input and output rows, so no variable spans layers.
  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    localparam int unsigned R      = rows_at(l);
    localparam int unsigned GROUPS = R / 3;
    localparam int unsigned REST   = R % 3;
    localparam int unsigned NEXT   = 2 * GROUPS + REST;

    logic [W-1:0] li [R];      // rows entering this layer
    logic [W-1:0] lo [NEXT];   // rows leaving it

    for (genvar i = 0; i < R; i++) begin : g_in
      if (l == 0) begin : g_first
        assign li[i] = rows[i];
      end else begin : g_next
        assign li[i] = g_layer[l-1].lo[i];
      end
    end

    for (genvar gi = 0; gi < GROUPS; gi++) begin : g_csa
      logic [W-1:0] s, c;
      csa32 #(.W(W)) u_csa (
        .a(li[3*gi]), .b(li[3*gi+1]), .c(li[3*gi+2]),
        .sum(s), .carry(c)
      );
      assign lo[2*gi]   = s;
      assign lo[2*gi+1] = c << 1;   // the top carry bit has weight 2^W and drops out
    end
    for (genvar ri = 0; ri < REST; ri++) begin : g_pass
      assign lo[2*GROUPS+ri] = li[3*GROUPS+ri];
    end
  end

  if (LAYERS == 0) begin : g_no_layer
    assign sum   = rows[0];
    assign carry = (ROWS >= 2) ? rows[ROWS > 1 ? 1 : 0] : '0;
  end else begin : g_out
    assign sum   = g_layer[LAYERS-1].lo[0];
    assign carry = g_layer[LAYERS-1].lo[1];
  end

endmodule
