// tb_product_sum_module: self-checking test of the DSP-based product sum.
//
// Loads a random 4x4 template, streams random pixel columns with random
// gaps, and checks sum(I'T') for every window of m' consecutive valid
// columns against a direct double loop over window and template.  Each
// result must appear exactly tm_pkg::psum_lat(m') clocks after the newest
// column.  A second run uses all-ones pixels and template to reach the
// largest sum.
module tb_product_sum_module;
  localparam int unsigned PIXEL_W = 8;
  localparam int unsigned MP      = 4;
  localparam int unsigned PS_W    = 2 * PIXEL_W + 2 * $clog2(MP);
  localparam int unsigned LAT     = tm_pkg::psum_lat(MP);
  localparam int unsigned NCOL    = 300;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               col_valid = 1'b0;
  logic [PIXEL_W-1:0] col [MP];
  logic [PIXEL_W-1:0] tpl [MP][MP];
  logic [PS_W-1:0]    psum;

  int unsigned checks = 0, failures = 0, cyc = 0;

  product_sum_module #(.PIXEL_W(PIXEL_W), .MP(MP)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  longint expv [int];
  logic [PIXEL_W-1:0] hist [$][MP];   // hist[i][r]: column i, tap r

  initial begin : watchdog
    repeat (NCOL * 10 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && expv.exists(cyc)) begin
    checks++;
    if (longint'(psum) != expv[cyc]) begin
      failures++;
      $display("FAIL: cycle %0d got %0d expected %0d", cyc, psum, expv[cyc]);
    end
  end

  task automatic run(input bit ones);
    hist.delete();
    for (int y = 0; y < MP; y++) for (int x = 0; x < MP; x++)
      tpl[y][x] = ones ? '1 : PIXEL_W'($urandom);
    for (int i = 0; i < NCOL; i++) begin
      logic [PIXEL_W-1:0] c [MP];
      @(negedge clk);
      while ($urandom_range(3) == 0) begin
        col_valid = 1'b0;
        for (int r = 0; r < MP; r++) col[r] = PIXEL_W'($urandom);
        @(negedge clk);
      end
      for (int r = 0; r < MP; r++) begin
        c[r] = ones ? '1 : PIXEL_W'($urandom);
        col[r] = c[r];
      end
      col_valid = 1'b1;
      hist.push_back(c);
      if (i >= MP - 1) begin
        longint s;
        s = 0;
        // Window column x (0 = left) is column i-(MP-1)+x; window row y
        // (0 = top) is tap MP-1-y.
        for (int y = 0; y < MP; y++)
          for (int x = 0; x < MP; x++)
            s += longint'(tpl[y][x]) * longint'(hist[i - (MP - 1) + x][MP - 1 - y]);
        expv[cyc + LAT] = s;
      end
    end
    @(negedge clk);
    col_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
  endtask

  initial begin
    for (int r = 0; r < MP; r++) col[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0);
    run(1'b1);
    if (checks != 2 * (NCOL - MP + 1)) begin
      failures++; $display("FAIL: %0d results checked", checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
