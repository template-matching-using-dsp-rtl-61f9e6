// tb_template_matching_unit: self-checking test of one matching unit.
//
// Loads a random 4x4 template and its constants (sum(T') and C_T for
// t = 0.9) through the configuration port, then streams a 4-row band of
// pixels, with random gaps, in which copies of the template (exact and
// with added noise) are planted.  The test supplies sum(I') and sum(I'^2)
// with the alignment the unit expects, and checks each match bit, due
// sqsum_lat + CMP_LAT clocks after its column, against the correlation
// condition evaluated directly on the window.  Matches and rejections
// must both occur, and at least one exact copy must be matched.
module tb_template_matching_unit;
  import tm_pkg::*;
  localparam int unsigned PIXEL_W = 8;
  localparam int unsigned MP      = 4;
  localparam int unsigned SH      = 2 * $clog2(MP);
  localparam int unsigned LEN     = 600;
  localparam int unsigned ALAT    = sqsum_lat(MP);

  logic                          clk = 1'b0;
  logic                          rst_n = 1'b0;
  logic                          cfg_we = 1'b0;
  logic [CFG_ADDR_W-1:0]         cfg_addr = '0;
  logic [CFG_DATA_W-1:0]         cfg_data = '0;
  logic                          col_valid = 1'b0;
  logic [PIXEL_W-1:0]            col [MP];
  logic [PIXEL_W+SH-1:0]         sum_i = '0;
  logic [2*PIXEL_W+SH-1:0]       sumsq_i = '0;
  logic                          match;

  int unsigned checks = 0, failures = 0, cyc = 0;
  int unsigned n_match = 0, n_reject = 0, n_exact = 0;

  template_matching_unit #(.PIXEL_W(PIXEL_W), .MP(MP)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int  tp [MP][MP];            // tp[y][x]
  int  band [MP][LEN];         // band[y][x], y = 0 top row
  bit  exact [LEN];            // window ending at column x is an exact copy
  longint si_at [int], si2_at [int];
  bit  exp_at [int];
  bit  exact_at [int];
  longint ct;

  initial begin : watchdog
    repeat (LEN * 6 + 300) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Statistics are driven on the cycle the unit expects them.
  always @(negedge clk) begin
    if (si_at.exists(cyc)) begin
      sum_i   = (PIXEL_W+SH)'(si_at[cyc]);
      sumsq_i = (2*PIXEL_W+SH)'(si2_at[cyc]);
    end else begin
      sum_i   = (PIXEL_W+SH)'($urandom);
      sumsq_i = (2*PIXEL_W+SH)'($urandom);
    end
  end

  always @(negedge clk) if (exp_at.exists(cyc)) begin
    checks++;
    if (match !== exp_at[cyc]) begin
      failures++; $display("FAIL: cycle %0d match=%0b expected %0b", cyc, match, exp_at[cyc]);
    end
    if (match) n_match++; else n_reject++;
    if (match && exact_at[cyc]) n_exact++;
  end

  task automatic cfg_write(input int a, input longint d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = CFG_ADDR_W'(a); cfg_data = CFG_DATA_W'(d);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  initial begin
    longint st, st2, tsq;
    for (int r = 0; r < MP; r++) col[r] = '0;
    // Template and host-side constants.
    st = 0; st2 = 0;
    for (int y = 0; y < MP; y++) for (int x = 0; x < MP; x++) begin
      tp[y][x] = $urandom_range(255);
      st += tp[y][x]; st2 += tp[y][x] * tp[y][x];
    end
    tsq = longint'(0.81 * real'(1 << TSQ_FRAC) + 0.5);
    ct  = tsq * (MP*MP * st2 - st * st);
    // Band with planted copies.
    for (int y = 0; y < MP; y++) for (int x = 0; x < LEN; x++) band[y][x] = $urandom_range(255);
    for (int x0 = 10; x0 + MP <= LEN; x0 += 37) begin
      int noise;
      noise = (x0 / 37) % 3 == 0 ? 0 : $urandom_range(60);
      for (int y = 0; y < MP; y++) for (int x = 0; x < MP; x++)
        band[y][x0 + x] = tp[y][x] + ((noise == 0) ? 0 : int'($urandom_range(noise)));
      for (int y = 0; y < MP; y++) for (int x = 0; x < MP; x++)
        if (band[y][x0 + x] > 255) band[y][x0 + x] = 255;
      if (noise == 0) exact[x0 + MP - 1] = 1'b1;
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int y = 0; y < MP; y++) for (int x = 0; x < MP; x++) cfg_write(y * MP + x, tp[y][x]);
    cfg_write(int'(CFG_ADDR_SUM_T), st);
    cfg_write(int'(CFG_ADDR_C_T), ct);

    for (int i = 0; i < LEN; i++) begin
      @(negedge clk);
      while ($urandom_range(4) == 0) begin
        col_valid = 1'b0;
        @(negedge clk);
      end
      for (int r = 0; r < MP; r++) col[r] = PIXEL_W'(band[MP - 1 - r][i]);
      col_valid = 1'b1;
      if (i >= MP - 1) begin
        longint si, si2, sit, num, vi, vt;
        logic [127:0] lhs, rhs;
        si = 0; si2 = 0; sit = 0;
        for (int y = 0; y < MP; y++) for (int x = 0; x < MP; x++) begin
          int p;
          p = band[y][i - (MP - 1) + x];
          si += p; si2 += p * p; sit += p * tp[y][x];
        end
        si_at[cyc + ALAT]  = si;
        si2_at[cyc + ALAT] = si2;
        num = MP*MP * sit - si * st;
        vi  = MP*MP * si2 - si * si;
        lhs = 128'(num * num) << TSQ_FRAC;
        rhs = 128'(ct) * 128'(vi);
        exp_at[cyc + ALAT + CMP_LAT]   = (num >= 0) && (lhs >= rhs);
        exact_at[cyc + ALAT + CMP_LAT] = exact[i];
      end
    end
    @(negedge clk);
    col_valid = 1'b0;
    repeat (ALAT + CMP_LAT + 3) @(negedge clk);
    $display("matches=%0d rejects=%0d exact_copies_matched=%0d", n_match, n_reject, n_exact);
    if (n_match == 0 || n_reject == 0 || n_exact == 0) begin
      failures++; $display("FAIL: matches, rejections or exact copies missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
