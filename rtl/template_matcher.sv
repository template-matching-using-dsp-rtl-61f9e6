// template_matcher: step 2 of coarse-to-fine template matching with pixel
// rearrangement, for every window of a low-resolution base image.
//
// A host reduces the n x n base image to I' (every k-th pixel in both
// directions, n/k x n/k) and splits the m x m template into k*k templates
// T'_{s,t}(x, y) = T(kx+s, ky+t) of m' x m' pixels, m' = m/k.  One of those
// templates is an exact subsampling of any place where the template occurs
// in the base image, so matching I' against all k*k of them cannot miss it.
// This block streams I' in raster order, one pixel per clock, and for every
// m' x m' window reports which of the k*k templates have a normalized
// correlation coefficient of at least the threshold t.  The host then
// refines the reported positions at full resolution.
//
// Structure (as in the document): line buffers of m'-1 row FIFOs produce a
// pixel column per clock; one sum module and one squared-sum module compute
// sum(I') and sum(I'^2) of the window for all units; k*k template matching
// units, each with its own product-sum and comparator module, work in
// parallel.  Unit u = s*k + t holds T'_{s,t}.
//
// Interface:
//   cfg         template pixels and constants, written before a frame
//               (tm_pkg::tm_cfg_t; `unit` selects the unit)
//   in_valid    one pixel of I' on in_pixel; in_sof marks the first pixel
//               of a frame.  Pixels may come every clock or with gaps.
//   out_valid   one result per pixel whose window lies inside the image:
//               out_x/out_y is the window's top-left pixel in I' and
//               out_match[u] is set when unit u matched.
// Timing: the result for the pixel on the input pins in cycle c is on the
// output pins in cycle c + LATENCY, LATENCY = 2*log2(m') + 11 (15 for the
// default m' = 4, the latency the document reports), so a frame of
// (n/k)^2 back-to-back pixels takes (n/k)^2 + LATENCY cycles.  The split
// into pipeline stages is this design's own; the document gives only the
// total.  Reset is synchronous and active low; it clears the template
// registers, the valid flags and the position counters.
module template_matcher
  import tm_pkg::*;
#(
  parameter int unsigned N       = 1024,   // base image is N x N
  parameter int unsigned M       = 16,     // template is M x M
  parameter int unsigned K       = 4,      // sampling interval
  parameter int unsigned PIXEL_W = 8,
  localparam int unsigned NP     = N / K,  // low-resolution image width
  localparam int unsigned MP     = M / K,  // low-resolution template width
  localparam int unsigned K2     = K * K,  // number of units
  localparam int unsigned XW     = $clog2(NP)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  tm_cfg_t            cfg,
  input  logic               in_valid,
  input  logic               in_sof,
  input  logic [PIXEL_W-1:0] in_pixel,
  output logic               out_valid,
  output logic [XW-1:0]      out_x,
  output logic [XW-1:0]      out_y,
  output logic [K2-1:0]      out_match
);
  localparam int unsigned SH      = 2 * $clog2(MP);
  localparam int unsigned SUM_W   = PIXEL_W + SH;
  localparam int unsigned SQ_W    = 2 * PIXEL_W + SH;
  localparam int unsigned LATENCY = tm_latency(MP);
  // Stages between the registered input pixel and the comparator output.
  localparam int unsigned TAG_D   = 1 + sqsum_lat(MP) + CMP_LAT;

  initial begin
    assert (N % K == 0 && M % K == 0) else $error("template_matcher: N and M must be multiples of K");
    assert ((1 << $clog2(MP)) == MP && MP >= 2) else $error("template_matcher: m' must be a power of two of at least 2");
    assert ((1 << XW) == NP) else $error("template_matcher: n/k must be a power of two");
    assert (K2 <= 2**CFG_UNIT_W) else $error("template_matcher: too many units for the configuration port");
  end

  // ---------------------------------------------------------------- input
  logic               v0, sof0;
  logic [PIXEL_W-1:0] pix0;
  logic [XW-1:0]      cnt_x, cnt_y;   // position of the next pixel
  logic [XW-1:0]      cx, cy;         // position of the registered pixel

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v0   <= 1'b0;
      sof0 <= 1'b0;
      pix0 <= '0;
    end else begin
      v0   <= in_valid;
      sof0 <= in_valid && in_sof;
      pix0 <= in_pixel;
    end
  end

  assign cx = sof0 ? '0 : cnt_x;
  assign cy = sof0 ? '0 : cnt_y;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_x <= '0;
      cnt_y <= '0;
    end else if (v0) begin
      cnt_x <= cx + 1'b1;                       // wraps at NP
      if (cx == XW'(NP - 1)) cnt_y <= cy + 1'b1;
      else                   cnt_y <= cy;
    end
  end

  // A window exists once m'-1 rows and columns precede the pixel.
  logic          win_valid;
  logic [XW-1:0] win_x, win_y;
  assign win_valid = v0 && cx >= XW'(MP - 1) && cy >= XW'(MP - 1);
  assign win_x     = cx - XW'(MP - 1);
  assign win_y     = cy - XW'(MP - 1);

  logic          tag_valid;
  logic [XW-1:0] tag_x, tag_y;
  pipe_delay #(.W(1 + 2 * XW), .D(TAG_D)) u_tag (
    .clk, .rst_n,
    .d({win_valid, win_x, win_y}),
    .q({tag_valid, tag_x, tag_y})
  );

  // --------------------------------------------------------- line buffers
  logic               col_valid;
  logic [PIXEL_W-1:0] col [MP];

  line_buffers #(.PIXEL_W(PIXEL_W), .WIDTH(NP), .ROWS(MP)) u_lb (
    .clk, .rst_n,
    .in_valid (v0),
    .in_sof   (sof0),
    .in_pixel (pix0),
    .col_valid,
    .col
  );

  // ---------------------------------------------------- window statistics
  logic [SUM_W-1:0] sum_i, sum_i_al;
  logic [SQ_W-1:0]  sumsq_i;

  sum_module #(.PIXEL_W(PIXEL_W), .MP(MP), .SUM_W(SUM_W)) u_sum (
    .clk, .rst_n, .col_valid, .col, .sum(sum_i)
  );

  pipe_delay #(.W(SUM_W), .D(sqsum_lat(MP) - sum_lat(MP))) u_sum_align (
    .clk, .rst_n, .d(sum_i), .q(sum_i_al)
  );

  squared_sum_module #(.PIXEL_W(PIXEL_W), .MP(MP), .SQ_W(SQ_W)) u_sqsum (
    .clk, .rst_n, .col_valid, .col, .sumsq(sumsq_i)
  );

  // ------------------------------------------------------ matching units
  logic [K2-1:0] match;

  for (genvar u = 0; u < K2; u++) begin : g_unit
    template_matching_unit #(.PIXEL_W(PIXEL_W), .MP(MP)) u_tmu (
      .clk, .rst_n,
      .cfg_we   (cfg.we && cfg.unit == CFG_UNIT_W'(u)),
      .cfg_addr (cfg.addr),
      .cfg_data (cfg.data),
      .col_valid,
      .col,
      .sum_i    (sum_i_al),
      .sumsq_i  (sumsq_i),
      .match    (match[u])
    );
  end

  // --------------------------------------------------------------- output
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_match <= '0;
    end else begin
      out_valid <= tag_valid;
      out_x     <= tag_x;
      out_y     <= tag_y;
      out_match <= tag_valid ? match : '0;
    end
  end

  // ----------------------------------------------------------- checks
  a_sof_has_pixel: assert property (@(posedge clk) disable iff (!rst_n) in_sof |-> in_valid)
    else $error("template_matcher: in_sof without in_valid");
  a_cfg_unit: assert property (@(posedge clk) disable iff (!rst_n) cfg.we |-> int'(cfg.unit) < K2)
    else $error("template_matcher: configuration write to a unit that does not exist");

  // LATENCY is the documented pin-to-pin delay.
  initial assert (LATENCY == 1 + TAG_D + 1) else $error("template_matcher: latency bookkeeping");
endmodule
