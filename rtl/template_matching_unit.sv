// template_matching_unit: matches one low-resolution template T'_{s,t}
// against the window stream.
//
// The unit holds its m' x m' template pixels and the two template-only
// constants of the matching condition, sum(T') and C_T, in registers that
// are written through the configuration port before matching starts (the
// document states that these values are computed beforehand and loaded
// into registers).  Its datapath is the document's pair of modules: a
// product-sum module computing sum(I'T') with m'*m' DSP slices, and a
// comparator module evaluating the matching condition with four
// multipliers.  sum(I') and sum(I'^2) come from the sum and squared-sum
// modules that all k*k units share.
//
// Configuration: a write with cfg_we high stores cfg_data at cfg_addr:
// addresses 0 .. m'*m'-1 are T'(x, y) at y*m' + x, tm_pkg::CFG_ADDR_SUM_T is
// sum(T') and tm_pkg::CFG_ADDR_C_T is C_T.  All are cleared by reset.
// Timing: `sum_i` and `sumsq_i` must arrive tm_pkg::sqsum_lat(MP) cycles
// after the column on `col`; the product sum is delayed inside the unit to
// meet them, and `match` follows tm_pkg::CMP_LAT cycles later.
module template_matching_unit
  import tm_pkg::*;
#(
  parameter int unsigned PIXEL_W = 8,
  parameter int unsigned MP      = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [CFG_ADDR_W-1:0] cfg_addr,
  input  logic [CFG_DATA_W-1:0] cfg_data,
  input  logic                  col_valid,
  input  logic [PIXEL_W-1:0]    col [MP],
  input  logic [PIXEL_W+2*$clog2(MP)-1:0]   sum_i,
  input  logic [2*PIXEL_W+2*$clog2(MP)-1:0] sumsq_i,
  output logic                  match
);
  localparam int unsigned SH    = 2 * $clog2(MP);
  localparam int unsigned SUM_W = PIXEL_W + SH;
  localparam int unsigned SQ_W  = 2 * PIXEL_W + SH;
  localparam int unsigned PS_W  = 2 * PIXEL_W + SH;
  localparam int unsigned ALIGN = sqsum_lat(MP) - psum_lat(MP);

  initial begin
    assert (MP * MP <= int'(CFG_ADDR_SUM_T)) else $error("template_matching_unit: template too large for the configuration address space");
  end

  logic [PIXEL_W-1:0] tpl [MP][MP];
  logic [SUM_W-1:0]   sum_t;
  logic [CT_W-1:0]    c_t;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int y = 0; y < MP; y++)
        for (int x = 0; x < MP; x++) tpl[y][x] <= '0;
      sum_t <= '0;
      c_t   <= '0;
    end else if (cfg_we) begin
      if (cfg_addr == CFG_ADDR_SUM_T)  sum_t <= SUM_W'(cfg_data);
      else if (cfg_addr == CFG_ADDR_C_T) c_t <= CT_W'(cfg_data);
      else if (int'(cfg_addr) < MP * MP)
        tpl[int'(cfg_addr) / MP][int'(cfg_addr) % MP] <= PIXEL_W'(cfg_data);
    end
  end

  logic [PS_W-1:0] psum, psum_al;

  product_sum_module #(.PIXEL_W(PIXEL_W), .MP(MP), .PS_W(PS_W)) u_psum (
    .clk, .rst_n, .col_valid, .col, .tpl, .psum
  );

  pipe_delay #(.W(PS_W), .D(ALIGN)) u_align (
    .clk, .rst_n, .d(psum), .q(psum_al)
  );

  comparator_module #(
    .MP(MP), .SUM_W(SUM_W), .SQ_W(SQ_W), .PS_W(PS_W),
    .CT_W(CT_W), .TSQ_FRAC(TSQ_FRAC)
  ) u_cmp (
    .clk, .sum_i, .sumsq_i, .psum(psum_al), .sum_t, .c_t, .match
  );
endmodule
