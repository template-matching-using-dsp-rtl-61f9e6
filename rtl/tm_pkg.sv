// tm_pkg: types and constants shared by the template matching pipeline.
//
// The pipeline compares one m' x m' window of a low-resolution base image
// per clock against k*k low-resolution templates.  This package holds the
// configuration-port record used to load the templates and their
// precomputed constants, the fixed addresses of that port, the fixed-point
// format of the threshold, and functions that give the latency of each
// pipeline section so that the top level can align them.
//
// The document specifies that template data and the threshold term are
// loaded into registers before matching starts; the record layout, the
// addresses and the fixed-point format are choices of this design.
package tm_pkg;

  // Fraction bits of t^2 inside the precomputed constant
  // C_T = round(t^2 * 2^TSQ_FRAC) * (m'^2*sum(T'^2) - (sum T')^2).
  localparam int unsigned TSQ_FRAC   = 16;
  // Width of C_T: up to 2^TSQ_FRAC times a 24-bit template variance term.
  localparam int unsigned CT_W       = 41;

  localparam int unsigned CFG_UNIT_W = 8;
  localparam int unsigned CFG_ADDR_W = 8;
  localparam int unsigned CFG_DATA_W = CT_W;

  // Configuration addresses inside one unit.  Addresses 0 .. m'*m'-1 hold
  // the template pixel T'(x, y) at address y*m' + x.
  localparam logic [CFG_ADDR_W-1:0] CFG_ADDR_SUM_T = 8'hFE;  // sum of T'
  localparam logic [CFG_ADDR_W-1:0] CFG_ADDR_C_T   = 8'hFF;  // C_T

  // One write to the template storage of unit `unit`.
  typedef struct packed {
    logic                  we;
    logic [CFG_UNIT_W-1:0] unit;
    logic [CFG_ADDR_W-1:0] addr;
    logic [CFG_DATA_W-1:0] data;
  } tm_cfg_t;

  // Pipelined adder tree over n inputs: one register per level.
  function automatic int unsigned tree_lat(int unsigned n);
    return $clog2(n);
  endfunction

  // Column tree, shift register, row tree.
  function automatic int unsigned sum_lat(int unsigned mp);
    return 2 * tree_lat(mp) + 1;
  endfunction

  // Square look-up, then as sum_lat.
  function automatic int unsigned sqsum_lat(int unsigned mp);
    return 2 * tree_lat(mp) + 2;
  endfunction

  // DSP A/B, M and P registers, then the row adder tree.
  function automatic int unsigned psum_lat(int unsigned mp);
    return 3 + tree_lat(mp);
  endfunction

  // Two-stage multipliers, subtraction, two-stage multipliers, compare.
  localparam int unsigned CMP_LAT = 6;

  // Pixel pin to result pin: input register, line buffer read, window
  // statistics (the slowest is the squared sum), comparator, output register.
  function automatic int unsigned tm_latency(int unsigned mp);
    return 1 + 1 + sqsum_lat(mp) + CMP_LAT + 1;
  endfunction

endpackage
