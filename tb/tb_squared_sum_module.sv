// tb_squared_sum_module: self-checking test of the squared_sum_module.
//
// Drives random pixel columns, with random gaps in col_valid, and checks
// the window sum of the squared pixels over every run of m' consecutive valid columns
// against a sum the test computes itself.  Each result must appear exactly
// the module's documented latency after the newest column of its window.
module tb_squared_sum_module;
  localparam int unsigned PIXEL_W = 8;
  localparam int unsigned MP      = 4;
  localparam int unsigned OUT_W   = 2 * PIXEL_W + 2 * $clog2(MP);
  localparam int unsigned LAT     = tm_pkg::sqsum_lat(MP);
  localparam int unsigned NCOL    = 400;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               col_valid = 1'b0;
  logic [PIXEL_W-1:0] col [MP];
  logic [OUT_W-1:0]   sumsq;

  int unsigned checks = 0, failures = 0, cyc = 0;

  squared_sum_module #(.PIXEL_W(PIXEL_W), .MP(MP)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Expected value per cycle; -1 where nothing is checked.
  longint expv [int];
  logic [PIXEL_W-1:0] hist [$][MP];

  initial begin : watchdog
    repeat (NCOL * 4 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && expv.exists(cyc)) begin
    checks++;
    if (longint'(sumsq) != expv[cyc]) begin
      failures++;
      $display("FAIL: cycle %0d got %0d expected %0d", cyc, sumsq, expv[cyc]);
    end
  end

  initial begin
    for (int r = 0; r < MP; r++) col[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NCOL; i++) begin
      logic [PIXEL_W-1:0] c [MP];
      @(negedge clk);
      while ($urandom_range(3) == 0) begin
        col_valid = 1'b0;
        for (int r = 0; r < MP; r++) col[r] = PIXEL_W'($urandom);
        @(negedge clk);
      end
      for (int r = 0; r < MP; r++) begin
        // Mix extreme values in to exercise the full width.
        c[r] = (i % 50 < 5) ? '1 : PIXEL_W'($urandom);
        col[r] = c[r];
      end
      col_valid = 1'b1;
      hist.push_back(c);
      if (i >= MP - 1) begin
        longint s;
        s = 0;
        for (int k = 0; k < MP; k++) begin
          c = hist[i - k];
          for (int r = 0; r < MP; r++) s += int'(c[r]) * int'(c[r]);
        end
        expv[cyc + LAT] = s;
      end
    end
    @(negedge clk);
    col_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    if (checks != NCOL - MP + 1) begin
      failures++; $display("FAIL: %0d results checked, expected %0d", checks, NCOL - MP + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
