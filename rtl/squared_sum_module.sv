// squared_sum_module: sliding m' x m' window sum of squared pixels.
//
// The squares are not computed with multipliers: as in the document, a
// block-RAM look-up table holds x*x at address x.  Each of the m' pixels of
// the incoming column is squared by one registered read of that table
// (a block RAM gives two read ports, so m' = 4 reads take two RAMs or one
// RAM at twice the clock; here the table is written once as an array with
// m' read ports).  The squares then pass through the same structure as the
// sum module: a column adder tree, m' shift-register entries of column sums
// and a second adder tree.
//
// Timing: sum(I'^2) for the column presented in cycle c is on `sumsq` in
// cycle c + 2*log2(m') + 2 (tm_pkg::sqsum_lat).  The table contents are
// fixed at configuration time by the initial block.
module squared_sum_module #(
  parameter int unsigned PIXEL_W = 8,
  parameter int unsigned MP      = 4,
  parameter int unsigned SQ_W    = 2 * PIXEL_W + 2 * $clog2(MP)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               col_valid,
  input  logic [PIXEL_W-1:0] col [MP],
  output logic [SQ_W-1:0]    sumsq
);
  localparam int unsigned LV    = $clog2(MP);
  localparam int unsigned P2_W  = 2 * PIXEL_W;
  localparam int unsigned COL_W = P2_W + LV;

  // Square table: sq_rom[x] = x*x.
  logic [P2_W-1:0] sq_rom [2**PIXEL_W];
  initial begin
    for (int x = 0; x < 2**PIXEL_W; x++) sq_rom[x] = P2_W'(x * x);
  end

  logic [P2_W-1:0]  sq [MP];
  logic             sq_valid;
  logic [COL_W-1:0] col_sum;
  logic             col_sum_valid;
  logic [COL_W-1:0] sr [MP];

  always_ff @(posedge clk)
    for (int i = 0; i < MP; i++) sq[i] <= sq_rom[col[i]];

  pipe_delay #(.W(1), .D(1)) u_sq_vdly (
    .clk, .rst_n, .d(col_valid), .q(sq_valid)
  );

  adder_tree #(.N(MP), .IN_W(P2_W), .OUT_W(COL_W)) u_col_tree (
    .clk, .in(sq), .sum(col_sum)
  );

  pipe_delay #(.W(1), .D(LV)) u_vdly (
    .clk, .rst_n, .d(sq_valid), .q(col_sum_valid)
  );

  always_ff @(posedge clk) begin
    if (col_sum_valid) begin
      sr[0] <= col_sum;
      for (int i = 1; i < MP; i++) sr[i] <= sr[i-1];
    end
  end

  adder_tree #(.N(MP), .IN_W(COL_W), .OUT_W(SQ_W)) u_win_tree (
    .clk, .in(sr), .sum(sumsq)
  );
endmodule
