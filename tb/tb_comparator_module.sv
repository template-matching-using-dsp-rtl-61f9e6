// tb_comparator_module: self-checking test of the matching condition.
//
// For each clock the test builds a 4x4 template and window (random,
// correlated with the template, anti-correlated, or flat), computes their
// sums and the template constants for a random threshold t, and drives the
// comparator.  The result, due exactly tm_pkg::CMP_LAT clocks later, is
// checked against the exact integer condition evaluated at 128 bits, and,
// where R is not within 1e-6 of t, also against R >= t computed in floating
// point.  The run must contain matches, rejections by the sign of the
// numerator and rejections by the threshold.
module tb_comparator_module;
  import tm_pkg::*;
  localparam int unsigned PIXEL_W = 8;
  localparam int unsigned MP      = 4;
  localparam int unsigned SH      = 2 * $clog2(MP);
  localparam int unsigned SUM_W   = PIXEL_W + SH;
  localparam int unsigned SQ_W    = 2 * PIXEL_W + SH;
  localparam int unsigned PS_W    = 2 * PIXEL_W + SH;
  localparam int unsigned NVEC    = 4000;

  logic             clk = 1'b0;
  logic [SUM_W-1:0] sum_i = '0, sum_t = '0;
  logic [SQ_W-1:0]  sumsq_i = '0;
  logic [PS_W-1:0]  psum = '0;
  logic [CT_W-1:0]  c_t = '0;
  logic             match;

  int unsigned checks = 0, failures = 0, cyc = 0;
  int unsigned n_match = 0, n_neg = 0, n_thr = 0;

  comparator_module #(.MP(MP), .SUM_W(SUM_W), .SQ_W(SQ_W), .PS_W(PS_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  bit  exp_int [int];
  int  exp_real [int];   // 1/0, or -1 when too close to call

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (exp_int.exists(cyc)) begin
    checks++;
    if (match !== exp_int[cyc]) begin
      failures++; $display("FAIL: cycle %0d match=%0b expected %0b", cyc, match, exp_int[cyc]);
    end
    if (exp_real[cyc] >= 0) begin
      checks++;
      if (match !== exp_real[cyc][0]) begin
        failures++; $display("FAIL: cycle %0d match=%0b, floating point says %0d", cyc, match, exp_real[cyc]);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    for (int v = 0; v < NVEC; v++) begin
      int tp [MP*MP], im [MP*MP];
      longint si, si2, sit, st, st2, num, var_i, var_t, tsq;
      logic [127:0] lhs, rhs;
      real t, r;
      int mode;
      mode = $urandom_range(4);
      for (int i = 0; i < MP*MP; i++) begin
        tp[i] = $urandom_range(255);
        case (mode)
          0, 1: im[i] = $urandom_range(255);
          2: im[i] = (tp[i] * 3) / 4 + $urandom_range(40);          // correlated
          3: im[i] = 255 - tp[i] + $urandom_range(0, 0);           // anti-correlated
          default: im[i] = (v % 2) ? 77 : ((tp[i] > 128) ? 250 : 3); // flat or binary
        endcase
      end
      si = 0; si2 = 0; sit = 0; st = 0; st2 = 0;
      for (int i = 0; i < MP*MP; i++) begin
        si  += im[i];  si2 += im[i] * im[i];
        st  += tp[i];  st2 += tp[i] * tp[i];
        sit += im[i] * tp[i];
      end
      case ($urandom_range(3))
        0: t = 0.5;  1: t = 0.8;  2: t = 0.9;  default: t = 0.97;
      endcase
      tsq   = longint'(t * t * real'(1 << TSQ_FRAC) + 0.5);
      num   = MP*MP * sit - si * st;
      var_i = MP*MP * si2 - si * si;
      var_t = MP*MP * st2 - st * st;
      lhs   = (128'(num * num)) << TSQ_FRAC;
      rhs   = 128'(tsq * var_t) * 128'(var_i);

      @(negedge clk);
      sum_i = SUM_W'(si); sumsq_i = SQ_W'(si2); psum = PS_W'(sit);
      sum_t = SUM_W'(st); c_t = CT_W'(tsq * var_t);

      exp_int[cyc + CMP_LAT] = (num >= 0) && (lhs >= rhs);
      if (num < 0) n_neg++;
      else if (lhs < rhs) n_thr++;
      else n_match++;
      exp_real[cyc + CMP_LAT] = -1;
      if (var_i > 0 && var_t > 0) begin
        r = real'(num) / $sqrt(real'(var_i) * real'(var_t));
        if (r > t + 1e-6) exp_real[cyc + CMP_LAT] = 1;
        else if (r < t - 1e-6) exp_real[cyc + CMP_LAT] = 0;
      end
    end
    repeat (CMP_LAT + 2) @(negedge clk);
    $display("matches=%0d negative=%0d below_threshold=%0d", n_match, n_neg, n_thr);
    if (n_match == 0 || n_neg == 0 || n_thr == 0) begin
      failures++; $display("FAIL: a decision path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
