// product_sum_module: sum of I'*T' over the current m' x m' window.
//
// As in the document, every window row has its own chain of m' cascaded
// DSP slices (m'*m' multipliers in all) and an adder tree adds the m' row
// results.  Each chain is a transposed-form FIR filter: the pixel of that
// row in the newest column is broadcast to all m' slices, slice d
// multiplies it by T'(d, row) and adds the P register of slice d-1, which
// still holds the partial sum of the previous pixels.  After the newest
// pixel reaches the last slice, its P register holds
//   sum_{d} T'(d, row) * I'(x + d, row)
// for the window whose left column is x = newest column - (m'-1).
//
// Ports: `col` is the line-buffer column (col[0] the newest row, col[r]
// r rows above), `tpl[y][x]` the template pixel T'(x, y).
// Timing: the product sum for the column presented in cycle c is on `psum`
// in cycle c + 3 + log2(m') (tm_pkg::psum_lat).  The DSP registers step
// only for valid columns, with the enables of each register stage driven
// by the valid flag delayed to that stage, so the stream may have gaps.
// Pixels and template values are unsigned and zero-extended into the
// slice's signed operands.
module product_sum_module #(
  parameter int unsigned PIXEL_W = 8,
  parameter int unsigned MP      = 4,
  parameter int unsigned PS_W    = 2 * PIXEL_W + 2 * $clog2(MP)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               col_valid,
  input  logic [PIXEL_W-1:0] col [MP],
  input  logic [PIXEL_W-1:0] tpl [MP][MP],
  output logic [PS_W-1:0]    psum
);
  localparam int unsigned LV    = $clog2(MP);
  localparam int unsigned ROW_W = 2 * PIXEL_W + LV;
  localparam int unsigned A_W   = 25;
  localparam int unsigned B_W   = 18;
  localparam int unsigned P_W   = 48;

  initial begin
    assert (PIXEL_W < B_W) else $error("product_sum_module: pixels must fit the DSP B port");
  end

  logic v1, v2;   // valid at the M and P register stages
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= col_valid;
      v2 <= v1;
    end
  end

  logic [ROW_W-1:0] row_sum [MP];

  for (genvar j = 0; j < MP; j++) begin : g_row
    // Window row j (0 = top) comes from the line-buffer tap MP-1-j.
    logic signed [P_W-1:0] p [MP];
    for (genvar d = 0; d < MP; d++) begin : g_dsp
      dsp_mac #(.A_W(A_W), .B_W(B_W), .P_W(P_W)) u_dsp (
        .clk,
        .ce_ab (col_valid),
        .ce_m  (v1),
        .ce_p  (v2),
        .a     (A_W'(col[MP-1-j])),
        .b     (B_W'(tpl[j][d])),
        .pcin  ((d == 0) ? '0 : p[(d == 0) ? 0 : d-1]),
        .p     (p[d])
      );
    end
    assign row_sum[j] = ROW_W'(p[MP-1]);
  end

  adder_tree #(.N(MP), .IN_W(ROW_W), .OUT_W(PS_W)) u_tree (
    .clk, .in(row_sum), .sum(psum)
  );
endmodule
