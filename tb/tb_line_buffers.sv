// tb_line_buffers: self-checking test of the row FIFOs.
//
// Streams two frames of an 8-pixel-wide image with random gaps in the
// pixel stream.  Every output column is compared with the image the test
// wrote: col[r] must be the pixel r rows above the newest one (checked
// wherever that row exists in the current frame), and each column must
// appear exactly one clock after its pixel.
module tb_line_buffers;
  localparam int unsigned PIXEL_W = 8;
  localparam int unsigned WIDTH   = 8;
  localparam int unsigned ROWS    = 4;
  localparam int unsigned HEIGHT  = 6;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               in_valid = 1'b0, in_sof = 1'b0;
  logic [PIXEL_W-1:0] in_pixel = '0;
  logic               col_valid;
  logic [PIXEL_W-1:0] col [ROWS];

  int unsigned checks = 0, failures = 0, cyc = 0;

  line_buffers #(.PIXEL_W(PIXEL_W), .WIDTH(WIDTH), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic [PIXEL_W-1:0] img [HEIGHT][WIDTH];
  typedef struct { int x; int y; int due; } exp_t;
  exp_t q[$];

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output check on the falling edge, before new inputs are driven.
  always @(negedge clk) if (rst_n) begin
    if (col_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL: unexpected column at cycle %0d", cyc);
      end else begin
        e = q.pop_front();
        if (e.due != cyc) begin
          failures++; $display("FAIL: column for (%0d,%0d) at cycle %0d, expected %0d", e.x, e.y, cyc, e.due);
        end
        for (int r = 0; r < ROWS; r++) if (r <= e.y) begin
          checks++;
          if (col[r] !== img[e.y - r][e.x]) begin
            failures++;
            $display("FAIL: (%0d,%0d) tap %0d = %0d, expected %0d", e.x, e.y, r, col[r], img[e.y - r][e.x]);
          end
        end
      end
    end else if (q.size() != 0 && q[0].due == cyc) begin
      failures++; $display("FAIL: missing column at cycle %0d", cyc);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < HEIGHT; y++) for (int x = 0; x < WIDTH; x++) img[y][x] = PIXEL_W'($urandom);
      for (int y = 0; y < HEIGHT; y++) for (int x = 0; x < WIDTH; x++) begin
        @(negedge clk);
        while ($urandom_range(3) == 0) begin
          in_valid = 1'b0; in_sof = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_sof   = (x == 0 && y == 0);
        in_pixel = img[y][x];
        q.push_back('{x: x, y: y, due: cyc + 1});
      end
      @(negedge clk);
      in_valid = 1'b0; in_sof = 1'b0;
      repeat (5) @(negedge clk);
    end
    if (q.size() != 0) begin failures++; $display("FAIL: %0d columns never appeared", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
