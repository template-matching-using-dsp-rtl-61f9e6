// line_buffers: turns a raster-order pixel stream into vertical columns.
//
// The low-resolution base image arrives one pixel per clock in raster
// order.  To present an m' x m' window every clock the pipeline needs, with
// each new pixel, the m'-1 pixels directly above it.  As in the document
// this is done with m'-1 row FIFOs, each a block RAM holding one image row
// of WIDTH = n/k pixels, cascaded so that FIFO j returns the pixel j+1 rows
// above the current one.
//
// All FIFOs share one address counter that steps once per valid pixel and
// wraps after WIDTH pixels; `in_sof` restarts it at 0.  Each RAM is used in
// a read-then-write fashion that maps onto a simple dual-port block RAM:
// in the cycle a pixel arrives, every FIFO reads the word at the current
// address (the pixel of its row WIDTH pixels ago); one cycle later it
// writes back, at the same address, the word that has to move one FIFO
// down (the new pixel for FIFO 0, the word just read from FIFO j-1 for
// FIFO j).  Because consecutive pixels use different addresses, WIDTH must
// be at least 2.
//
// Timing: the column for the pixel presented in cycle c appears on
// `col`/`col_valid` in cycle c+1.  col[0] is that pixel, col[r] the pixel
// r rows above it.  Before ROWS-1 rows of a frame have arrived, the upper
// entries hold stale data; the top level marks such windows invalid.
// Pixels may arrive with gaps (in_valid low); the FIFOs then hold still.
// The shared counter and the read-then-write scheme are this design's own.
module line_buffers #(
  parameter int unsigned PIXEL_W = 8,
  parameter int unsigned WIDTH   = 256,   // n/k pixels per row
  parameter int unsigned ROWS    = 4      // m' rows in the output column
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_sof,
  input  logic [PIXEL_W-1:0] in_pixel,
  output logic               col_valid,
  output logic [PIXEL_W-1:0] col [ROWS]
);
  localparam int unsigned AW = $clog2(WIDTH);

  initial begin
    assert (WIDTH >= 2) else $error("line_buffers: WIDTH must be at least 2");
    assert (ROWS >= 2)  else $error("line_buffers: ROWS must be at least 2");
  end

  logic [AW-1:0]      ptr;      // address of the next pixel
  logic [AW-1:0]      addr;     // address used by the present pixel
  logic [AW-1:0]      addr_q;   // address to write back one cycle later
  logic [PIXEL_W-1:0] pix_q;

  assign addr = in_sof ? '0 : ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr       <= '0;
      col_valid <= 1'b0;
      addr_q    <= '0;
      pix_q     <= '0;
    end else begin
      col_valid <= in_valid;
      if (in_valid) begin
        ptr    <= (addr == AW'(WIDTH - 1)) ? '0 : addr + 1'b1;
        addr_q <= addr;
        pix_q  <= in_pixel;
      end
    end
  end

  assign col[0] = pix_q;

  for (genvar j = 0; j < ROWS - 1; j++) begin : g_fifo
    logic [PIXEL_W-1:0] mem [WIDTH];
    logic [PIXEL_W-1:0] rd;
    always_ff @(posedge clk) begin
      if (in_valid)  rd <= mem[addr];
      if (col_valid) mem[addr_q] <= col[j];
    end
    assign col[j+1] = rd;
  end

endmodule
