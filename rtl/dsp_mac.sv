// dsp_mac: the part of a DSP48E1 slice used by the product-sum module.
//
// P = A*B + PCIN with the slice's three pipeline registers, each with its
// own clock enable: the A/B input registers, the M (product) register and
// the P (output) register.  A is 25 bits and B 18 bits two's complement and
// P is 48 bits, the widths the document gives for the DSP48E1 multiplier.
// PCIN is the cascade input driven by the P register of the neighbouring
// slice, so a chain of these forms a transposed-form FIR filter whose
// partial sums ripple from slice to slice.
//
// Timing: with all enables high, operands presented in cycle c reach P in
// cycle c+3; PCIN is added in the last of those cycles.  Only the
// multiply-add path with cascade is written here; the slice's pre-adder,
// ALU modes and pattern detector are not used by the design.  The registers
// have no reset, as their contents are flushed by valid data.
module dsp_mac #(
  parameter int unsigned A_W = 25,
  parameter int unsigned B_W = 18,
  parameter int unsigned P_W = 48
) (
  input  logic                  clk,
  input  logic                  ce_ab,
  input  logic                  ce_m,
  input  logic                  ce_p,
  input  logic signed [A_W-1:0] a,
  input  logic signed [B_W-1:0] b,
  input  logic signed [P_W-1:0] pcin,
  output logic signed [P_W-1:0] p
);
  logic signed [A_W-1:0]     a_q;
  logic signed [B_W-1:0]     b_q;
  logic signed [A_W+B_W-1:0] m_q;

  always_ff @(posedge clk) begin
    if (ce_ab) begin
      a_q <= a;
      b_q <= b;
    end
    if (ce_m) m_q <= a_q * b_q;
    if (ce_p) p   <= P_W'(m_q) + pcin;
  end
endmodule
