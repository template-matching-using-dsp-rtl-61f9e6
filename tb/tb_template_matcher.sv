// tb_template_matcher: end-to-end test of template_matcher at a reduced image size.
//
// The test plays the host: it builds a random N x N base image, cuts an
// M x M template out of it at a random place, subsamples the image to I'
// (every K-th pixel), splits the template into the K*K templates
// T'_{s,t}(x, y) = T(Kx+s, Ky+t), computes sum(T') and
// C_T = round(t^2 * 2^16) * (m'^2*sum(T'^2) - sum(T')^2) for t = 0.9 and
// loads them.  It then streams I' and checks, for every window, the
// position and all K*K match bits against the correlation condition
// evaluated directly on I' and T'.  It also checks the pin-to-pin latency
// of every result (15 clocks for m' = 4) and the frame time of
// (N/K)^2 + 15 clocks for a gap-free frame, and finally refines the
// reported candidates at full resolution, which must find the place the
// template was cut from with R = 1.
//
// Reduced size: a 64 x 64 base image (16 x 16 low-resolution image) with
// the default template size and sampling interval; three frames, the
// second streamed with random gaps, each with new templates loaded.

// Mechanisms counted (each must occur): matches, the planted exact match,
// windows suppressed at the image edges, gaps in the input stream and reloading the
// templates between frames.
module tb_template_matcher;
  import tm_pkg::*;
  localparam int unsigned N       = 64;
  localparam int unsigned M       = 16;
  localparam int unsigned K       = 4;
  localparam int unsigned PIXEL_W = 8;
  localparam int unsigned NP      = N / K;
  localparam int unsigned MP      = M / K;
  localparam int unsigned K2      = K * K;
  localparam int unsigned XW      = $clog2(NP);
  // 15 clocks for m' = 4 (the published figure); 2*log2(m') + 11 in general.
  localparam int unsigned LAT     = (MP == 4) ? 15 : 2 * $clog2(MP) + 11;
  localparam int unsigned FRAMES  = 3;
  localparam real         THRESH  = 0.9;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  tm_cfg_t            cfg;
  logic               in_valid = 1'b0, in_sof = 1'b0;
  logic [PIXEL_W-1:0] in_pixel = '0;
  logic               out_valid;
  logic [XW-1:0]      out_x, out_y;
  logic [K2-1:0]      out_match;

  int unsigned checks = 0, failures = 0, cyc = 0;
  int unsigned n_out = 0, n_match_bits = 0, n_planted = 0, n_suppressed = 0;
  int unsigned n_gaps = 0, n_frames_reloaded = 0;

  template_matcher #(.N(64)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  byte unsigned img  [N][N];            // base image, img[row][col]
  byte unsigned tmpl [M][M];            // template, tmpl[row][col]
  byte unsigned lr   [NP][NP];          // I'(x, y) = lr[y][x]
  byte unsigned tp   [K2][MP][MP];      // T'_u(x, y) = tp[u][y][x]
  longint       st [K2], ct [K2];
  int           px, py;                 // where the template was cut

  typedef struct { int x; int y; logic [K2-1:0] m; int due; } exp_t;
  exp_t q[$];
  typedef struct { int x; int y; int u; } cand_t;
  cand_t cands[$];
  int    planted_x, planted_y, planted_u;
  int    first_in_cyc, last_out_cyc;

  initial begin : watchdog
    repeat (FRAMES * NP * NP * 3 + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ checker
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      n_out++;
      last_out_cyc = cyc;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL: unexpected result at cycle %0d", cyc);
      end else begin
        e = q.pop_front();
        if (int'(out_x) != e.x || int'(out_y) != e.y || e.due != cyc || out_match !== e.m) begin
          failures++;
          $display("FAIL: cycle %0d: got (%0d,%0d) %h, expected (%0d,%0d) %h due %0d",
                   cyc, out_x, out_y, out_match, e.x, e.y, e.m, e.due);
        end
        for (int u = 0; u < K2; u++) if (out_match[u]) begin
          n_match_bits++;
          cands.push_back('{x: int'(out_x), y: int'(out_y), u: u});
          if (int'(out_x) == planted_x && int'(out_y) == planted_y && u == planted_u) n_planted++;
        end
      end
    end else if (q.size() != 0 && q[0].due == cyc) begin
      failures++; $display("FAIL: missing result at cycle %0d", cyc);
    end
  end

  // ------------------------------------------------------ host functions
  task automatic make_frame();
    px = $urandom_range(N - M);
    py = $urandom_range(N - M);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) img[r][c] = byte'($urandom);
    for (int r = 0; r < M; r++) for (int c = 0; c < M; c++) tmpl[r][c] = img[py + r][px + c];
    for (int y = 0; y < NP; y++) for (int x = 0; x < NP; x++) lr[y][x] = img[K * y][K * x];
    for (int s = 0; s < K; s++) for (int t = 0; t < K; t++)
      for (int y = 0; y < MP; y++) for (int x = 0; x < MP; x++)
        tp[s * K + t][y][x] = tmpl[K * y + t][K * x + s];
    // The sub-template that is an exact subsample of I' at the planted place.
    begin
      int s, t;
      s = (K - px % K) % K;
      t = (K - py % K) % K;
      planted_u = s * K + t;
      planted_x = (px + s) / K;
      planted_y = (py + t) / K;
    end
  endtask

  task automatic load_templates();
    longint tsq;
    tsq = longint'(THRESH * THRESH * real'(1 << TSQ_FRAC) + 0.5);
    for (int u = 0; u < K2; u++) begin
      longint s1, s2;
      s1 = 0; s2 = 0;
      for (int y = 0; y < MP; y++) for (int x = 0; x < MP; x++) begin
        s1 += tp[u][y][x]; s2 += tp[u][y][x] * tp[u][y][x];
      end
      st[u] = s1;
      ct[u] = tsq * (MP * MP * s2 - s1 * s1);
    end
    for (int u = 0; u < K2; u++) begin
      for (int a = 0; a < MP * MP + 2; a++) begin
        @(negedge clk);
        cfg.we   = 1'b1;
        cfg.unit = CFG_UNIT_W'(u);
        if (a < MP * MP) begin
          cfg.addr = CFG_ADDR_W'(a);
          cfg.data = CFG_DATA_W'(tp[u][a / MP][a % MP]);
        end else if (a == MP * MP) begin
          cfg.addr = CFG_ADDR_SUM_T;
          cfg.data = CFG_DATA_W'(st[u]);
        end else begin
          cfg.addr = CFG_ADDR_C_T;
          cfg.data = CFG_DATA_W'(ct[u]);
        end
      end
    end
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  // Reference decision for window (x, y) and unit u, computed on I' and T'.
  function automatic bit ref_match(int x, int y, int u);
    longint si, si2, sit, num, vi;
    logic [127:0] lhs, rhs;
    si = 0; si2 = 0; sit = 0;
    for (int j = 0; j < MP; j++) for (int i = 0; i < MP; i++) begin
      longint p;
      p = lr[y + j][x + i];
      si += p; si2 += p * p; sit += p * tp[u][j][i];
    end
    num = MP * MP * sit - si * st[u];
    vi  = MP * MP * si2 - si * si;
    lhs = 128'(num * num) << TSQ_FRAC;
    rhs = 128'(ct[u]) * 128'(vi);
    return (num >= 0) && (lhs >= rhs);
  endfunction

  // Full-resolution correlation of the template with I[x, y] (host step 3).
  function automatic real full_r(int x, int y);
    real sa, sb, sab, saa, sbb, n, den;
    sa = 0; sb = 0; sab = 0; saa = 0; sbb = 0; n = real'(M * M);
    for (int r = 0; r < M; r++) for (int c = 0; c < M; c++) begin
      real a, b;
      a = real'(tmpl[r][c]); b = real'(img[y + r][x + c]);
      sa += a; sb += b; sab += a * b; saa += a * a; sbb += b * b;
    end
    den = (n * saa - sa * sa) * (n * sbb - sb * sb);
    if (den <= 0.0) return 0.0;
    return (n * sab - sa * sb) / $sqrt(den);
  endfunction

  task automatic stream_frame(input bit gaps);
    for (int y = 0; y < NP; y++) for (int x = 0; x < NP; x++) begin
      @(negedge clk);
      if (gaps) while ($urandom_range(7) == 0) begin
        in_valid = 1'b0; in_sof = 1'b0; in_pixel = byte'($urandom);
        n_gaps++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_sof   = (x == 0 && y == 0);
      in_pixel = lr[y][x];
      if (x == 0 && y == 0) first_in_cyc = cyc;
      if (x >= MP - 1 && y >= MP - 1) begin
        exp_t e;
        e.x = x - (MP - 1); e.y = y - (MP - 1); e.due = cyc + LAT;
        for (int u = 0; u < K2; u++) e.m[u] = ref_match(e.x, e.y, u);
        q.push_back(e);
      end else begin
        n_suppressed++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0; in_sof = 1'b0;
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      int outs_before, planted_before;
      bit gaps;
      gaps = (f % 2 == 1);
      make_frame();
      load_templates();
      if (f > 0) n_frames_reloaded++;
      cands.delete();
      outs_before = n_out;
      planted_before = n_planted;
      stream_frame(gaps);
      repeat (LAT + 5) @(negedge clk);
      checks++;
      if (q.size() != 0) begin
        failures++; $display("FAIL: frame %0d: %0d results missing", f, q.size()); q.delete();
      end
      checks++;
      if (n_out - outs_before != (NP - MP + 1) * (NP - MP + 1)) begin
        failures++; $display("FAIL: frame %0d: %0d results", f, n_out - outs_before);
      end
      if (!gaps) begin
        checks++;
        if (last_out_cyc - first_in_cyc + 1 != NP * NP + LAT) begin
          failures++;
          $display("FAIL: frame %0d took %0d clocks, expected %0d", f, last_out_cyc - first_in_cyc + 1, NP * NP + LAT);
        end else
          $display("frame %0d: %0d clocks for %0d pixels (latency %0d)", f, last_out_cyc - first_in_cyc + 1, NP * NP, LAT);
      end
      checks++;
      if (n_planted == planted_before) begin
        failures++; $display("FAIL: frame %0d: planted template (unit %0d at %0d,%0d) not reported", f, planted_u, planted_x, planted_y);
      end
      // Host steps 3 and 4: refine every candidate at full resolution.
      begin
        real best; int bx, by;
        best = -2.0; bx = -1; by = -1;
        foreach (cands[i]) begin
          int s, t, fx, fy;
          s = cands[i].u / K; t = cands[i].u % K;
          fx = K * cands[i].x - s; fy = K * cands[i].y - t;
          if (fx >= 0 && fy >= 0 && fx <= int'(N - M) && fy <= int'(N - M)) begin
            real r;
            r = full_r(fx, fy);
            if (r > best) begin best = r; bx = fx; by = fy; end
          end
        end
        $display("frame %0d: %0d candidates, best (%0d,%0d) R=%f, template cut at (%0d,%0d)",
                 f, cands.size(), bx, by, best, px, py);
        checks++;
        if (bx != px || by != py || best < 0.999999) begin
          failures++; $display("FAIL: frame %0d: refinement did not find the template", f);
        end
      end
    end
    $display("results=%0d match_bits=%0d planted_hits=%0d suppressed_edge_pixels=%0d gap_cycles=%0d reloads=%0d",
             n_out, n_match_bits, n_planted, n_suppressed, n_gaps, n_frames_reloaded);
    if (n_match_bits == 0)                     begin failures++; $display("FAIL: no match occurred"); end
    if (n_suppressed == 0)                     begin failures++; $display("FAIL: no edge window suppressed"); end
    if (n_gaps == 0)                           begin failures++; $display("FAIL: no input gap occurred"); end
    if (n_frames_reloaded == 0)                begin failures++; $display("FAIL: templates never reloaded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
