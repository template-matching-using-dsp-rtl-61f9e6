// pipe_delay: a W-bit shift register of D stages with synchronous reset.
//
// `q` equals `d` delayed by D clocks (D = 0 is a plain wire).  Used to carry
// the valid flag and window position alongside the datapath and to align
// the window statistics that leave their modules at different latencies.
// All stages clear to zero while rst_n is low.
module pipe_delay #(
  parameter int unsigned W = 1,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_pipe
    logic [W-1:0] sr [D];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < D; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < D; i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[D-1];
  end
endmodule
