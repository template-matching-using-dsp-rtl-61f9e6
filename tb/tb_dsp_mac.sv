// tb_dsp_mac: self-checking test of the DSP slice model.
//
// Phase 1 runs all clock enables high with random signed operands and
// checks P = A*B + PCIN three clocks after A and B were presented (PCIN
// taken in the last of those clocks).  Phase 2 drops all enables and checks
// that P holds while the operands keep changing, then raises them again
// and checks that the operands captured before the stall come out.
module tb_dsp_mac;
  localparam int unsigned A_W = 25, B_W = 18, P_W = 48;

  logic                  clk = 1'b0;
  logic                  ce_ab = 1'b1, ce_m = 1'b1, ce_p = 1'b1;
  logic signed [A_W-1:0] a = '0;
  logic signed [B_W-1:0] b = '0;
  logic signed [P_W-1:0] pcin = '0;
  logic signed [P_W-1:0] p;

  int unsigned checks = 0, failures = 0;

  dsp_mac #(.A_W(A_W), .B_W(B_W), .P_W(P_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint av [$], bv [$];

  task automatic check(input longint expv, input string what);
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      $display("FAIL: %s: p=%0d expected %0d", what, p, expv);
    end
  endtask

  initial begin
    // Phase 1: streaming.
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (i >= 3) check(av[i-3] * bv[i-3] + longint'(pcin), "stream");
      // New operands for cycle i; pcin for cycle i is added to the product
      // of operands presented two clocks earlier.
      a = A_W'(signed'($urandom));
      b = B_W'(signed'($urandom));
      if (i % 97 == 0) begin a = {1'b1, {(A_W-1){1'b0}}}; b = {1'b1, {(B_W-1){1'b0}}}; end
      av.push_back(longint'(a));
      bv.push_back(longint'(b));
      pcin = P_W'(signed'({$urandom, $urandom}) >>> 20);
    end
    // After the loop: p holds av[997]*bv[997] + pcin(driven at i=998).
    // Phase 2: stall everything.
    begin
      longint hold;
      @(negedge clk);
      ce_ab = 1'b0; ce_m = 1'b0; ce_p = 1'b0;
      hold = longint'(p);
      for (int i = 0; i < 10; i++) begin
        a = A_W'(signed'($urandom)); b = B_W'(signed'($urandom)); pcin = P_W'(signed'($urandom));
        @(negedge clk);
        check(hold, "stalled");
      end
      // Resume with constant pcin: the product of operands presented at
      // i=998 (in M) comes out first, then i=999 (in the A/B registers).
      ce_ab = 1'b1; ce_m = 1'b1; ce_p = 1'b1;
      pcin = 48'sd12345;
      @(negedge clk);
      check(av[998] * bv[998] + 12345, "resume 1");
      @(negedge clk);
      check(av[999] * bv[999] + 12345, "resume 2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
