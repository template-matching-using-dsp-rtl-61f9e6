// comparator_module: decides whether R(T', I') >= t without root or divide.
//
// With s = m'^2 (m' a power of two, so a multiplication by s is a shift),
// the correlation coefficient is
//   R = (s*sum(I'T') - sum(I')*sum(T'))
//       / sqrt((s*sum(I'^2) - sum(I')^2) * (s*sum(T'^2) - sum(T')^2)).
// For t >= 0, R >= t holds exactly when the numerator N is not negative and
//   N^2 >= t^2 * (s*sum(T'^2) - sum(T')^2) * (s*sum(I'^2) - sum(I')^2).
// The template-only factor C_T = t^2 * (s*sum(T'^2) - sum(T')^2) is loaded
// beforehand, as in the document, here with t^2 in fixed point with
// tm_pkg::TSQ_FRAC fraction bits, so the test made is
//   N >= 0  and  N^2 * 2^TSQ_FRAC >= C_T * (s*sum(I'^2) - sum(I')^2).
// The four multipliers of the document are sum(I')*sum(T'), sum(I')^2, N^2
// and C_T times the image variance term.
//
// Timing: inputs presented in cycle c give `match` in cycle c + 6
// (tm_pkg::CMP_LAT): two register stages per multiplier level, one for the
// subtractions and one for the final compare.  The stage split is this
// design's choice.  The pipeline is free running.
module comparator_module #(
  parameter int unsigned MP       = 4,
  parameter int unsigned SUM_W    = 12,
  parameter int unsigned SQ_W     = 20,
  parameter int unsigned PS_W     = 20,
  parameter int unsigned CT_W     = tm_pkg::CT_W,
  parameter int unsigned TSQ_FRAC = tm_pkg::TSQ_FRAC
) (
  input  logic             clk,
  input  logic [SUM_W-1:0] sum_i,    // sum(I') of the window
  input  logic [SQ_W-1:0]  sumsq_i,  // sum(I'^2) of the window
  input  logic [PS_W-1:0]  psum,     // sum(I'T') of the window
  input  logic [SUM_W-1:0] sum_t,    // sum(T'), precomputed
  input  logic [CT_W-1:0]  c_t,      // C_T, precomputed
  output logic             match
);
  localparam int unsigned SH    = 2 * $clog2(MP);           // log2(m'^2)
  localparam int unsigned PR_W  = 2 * SUM_W;                // sum products
  localparam int unsigned NUM_W = ((PS_W + SH > PR_W) ? PS_W + SH : PR_W) + 1;
  localparam int unsigned VAR_W = (SQ_W + SH > PR_W) ? SQ_W + SH : PR_W;
  localparam int unsigned N2_W  = 2 * NUM_W;
  localparam int unsigned RHS_W = CT_W + VAR_W;
  localparam int unsigned CMP_W = ((N2_W + TSQ_FRAC > RHS_W) ? N2_W + TSQ_FRAC : RHS_W) + 1;

  initial begin
    assert ((1 << $clog2(MP)) == MP) else $error("comparator_module: m' must be a power of two");
  end

  // Stages 1-2: sum(I')*sum(T') and sum(I')^2.
  logic [PR_W-1:0] p_it_1, p_it_2, p_ii_1, p_ii_2;
  logic [PS_W-1:0] psum_1, psum_2;
  logic [SQ_W-1:0] sumsq_1, sumsq_2;
  logic [CT_W-1:0] c_t_1, c_t_2, c_t_3;

  // Stage 3: numerator and image variance term.
  logic signed [NUM_W-1:0] num_3;
  logic [VAR_W-1:0]        var_3;

  // Stages 4-5: N^2 and C_T * variance.
  logic [N2_W-1:0]  n2_4, n2_5;
  logic [RHS_W-1:0] rhs_4, rhs_5;
  logic             neg_4, neg_5;

  always_ff @(posedge clk) begin
    p_it_1  <= PR_W'(sum_i) * PR_W'(sum_t);
    p_ii_1  <= PR_W'(sum_i) * PR_W'(sum_i);
    psum_1  <= psum;
    sumsq_1 <= sumsq_i;
    c_t_1   <= c_t;

    p_it_2  <= p_it_1;
    p_ii_2  <= p_ii_1;
    psum_2  <= psum_1;
    sumsq_2 <= sumsq_1;
    c_t_2   <= c_t_1;

    num_3   <= $signed({1'b0, (NUM_W-1)'(psum_2) << SH}) - $signed({1'b0, (NUM_W-1)'(p_it_2)});
    var_3   <= (VAR_W'(sumsq_2) << SH) - VAR_W'(p_ii_2);
    c_t_3   <= c_t_2;

    n2_4    <= N2_W'(num_3 * num_3);
    rhs_4   <= RHS_W'(c_t_3) * RHS_W'(var_3);
    neg_4   <= num_3[NUM_W-1];

    n2_5    <= n2_4;
    rhs_5   <= rhs_4;
    neg_5   <= neg_4;

    match   <= !neg_5 && ((CMP_W'(n2_5) << TSQ_FRAC) >= CMP_W'(rhs_5));
  end
endmodule
