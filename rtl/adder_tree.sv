// adder_tree: pipelined binary adder tree for unsigned operands.
//
// Adds N inputs (N a power of two, at least 2) in log2(N) levels with a
// register after every level, so the sum of the inputs presented in cycle c
// appears at `sum` in cycle c + log2(N).  The tree is free running: a new
// set of operands can be presented every clock.  The sum and squared-sum
// modules use two of these each and the product-sum module one, as in the
// document's figures; the register after each level is this design's choice.
module adder_tree #(
  parameter int unsigned N     = 4,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = IN_W + $clog2(N)
) (
  input  logic             clk,
  input  logic [IN_W-1:0]  in  [N],
  output logic [OUT_W-1:0] sum
);
  localparam int unsigned LV = $clog2(N);

  initial begin
    assert (N >= 2 && (1 << LV) == N)
      else $error("adder_tree: N must be a power of two of at least 2");
  end

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    logic [OUT_W-1:0] v [N >> l];
    if (l == 0) begin : g_in
      always_comb
        for (int i = 0; i < N; i++) v[i] = OUT_W'(in[i]);
    end else begin : g_add
      always_ff @(posedge clk)
        for (int i = 0; i < (N >> l); i++)
          v[i] <= g_lvl[l-1].v[2*i] + g_lvl[l-1].v[2*i+1];
    end
  end

  assign sum = g_lvl[LV].v[0];
endmodule
