// sum_module: sliding m' x m' window sum of the low-resolution base image.
//
// Each clock the line buffers deliver one column of m' vertically adjacent
// pixels.  A first adder tree adds the column; a shift register of m'
// entries keeps the sums of the last m' columns; a second adder tree adds
// those entries, giving sum(I') over the window whose right column is the
// newest one.  This is the structure of the document's sum module (two
// adder trees and m' shift registers).
//
// Timing: the window sum for the column presented in cycle c is on `sum`
// in cycle c + 2*log2(m') + 1 (tm_pkg::sum_lat).  The shift register
// advances only for valid columns, so gaps in the stream are allowed.
// Windows that straddle a row boundary give meaningless sums; the top
// level marks them invalid.
module sum_module #(
  parameter int unsigned PIXEL_W = 8,
  parameter int unsigned MP      = 4,
  parameter int unsigned SUM_W   = PIXEL_W + 2 * $clog2(MP)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               col_valid,
  input  logic [PIXEL_W-1:0] col [MP],
  output logic [SUM_W-1:0]   sum
);
  localparam int unsigned LV    = $clog2(MP);
  localparam int unsigned COL_W = PIXEL_W + LV;

  logic [COL_W-1:0] col_sum;
  logic             col_sum_valid;
  logic [COL_W-1:0] sr [MP];

  adder_tree #(.N(MP), .IN_W(PIXEL_W), .OUT_W(COL_W)) u_col_tree (
    .clk, .in(col), .sum(col_sum)
  );

  pipe_delay #(.W(1), .D(LV)) u_vdly (
    .clk, .rst_n, .d(col_valid), .q(col_sum_valid)
  );

  always_ff @(posedge clk) begin
    if (col_sum_valid) begin
      sr[0] <= col_sum;
      for (int i = 1; i < MP; i++) sr[i] <= sr[i-1];
    end
  end

  adder_tree #(.N(MP), .IN_W(COL_W), .OUT_W(SUM_W)) u_win_tree (
    .clk, .in(sr), .sum(sum)
  );
endmodule
