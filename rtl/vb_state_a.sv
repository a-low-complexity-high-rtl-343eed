// vb_state_a: state A of the VB search, expansion to the next lower layer.
//
// With the indices u_j of layers j >= k fixed, the centre and remaining
// squared radius of layer k-1 are
//   S_{k-1} = rho_{k-1} + sum_{j=k}^{M-1} q_{k-1,j} (rho_j - u_j)
//   T_{k-1} = T_k - q_kk (S_k - u_k)^2
// where rho is the unconstrained (zero-forcing) solution, q_ij = r_ij/r_ii
// and q_kk = r_kk^2 for the Cholesky factor R of the Gram matrix. This is
// the classic Viterbo-Boutros recursion that state A evaluates in the
// source design; its fully parallel form (M multipliers for the sum plus
// one for T, all in one cycle) is this design's choice.
// Combinational; valid for 1 <= k <= M-1. Fixed point with F fraction bits;
// products are truncated toward minus infinity. q_kk (S_k - u_k)^2 is formed
// at full precision and saturated, since a nearly singular channel pairs a
// tiny q_kk with a large S_k; the sum for S wraps (the preprocessing must
// keep rho and q in range).
module vb_state_a #(
  parameter int unsigned M  = vb_pkg::DEF_M,
  parameter int unsigned W  = vb_pkg::DEF_W,
  parameter int unsigned F  = vb_pkg::DEF_F,
  parameter int unsigned UW = vb_pkg::DEF_UW
) (
  input  logic [$clog2(M)-1:0] k,
  input  logic signed [W-1:0]  rho [M],
  input  logic signed [W-1:0]  q   [M][M],  // upper off-diagonal q_ij, i<j
  input  logic signed [W-1:0]  qd  [M],     // diagonal q_ii
  input  logic signed [UW-1:0] u   [M],
  input  logic signed [W-1:0]  s_k,
  input  logic signed [W-1:0]  t_k,
  output logic signed [W-1:0]  s_next,
  output logic signed [W-1:0]  t_next
);
  localparam logic signed [W-1:0] MAXW = {1'b0, {(W-1){1'b1}}};

  function automatic logic signed [W-1:0] fxmul(input logic signed [W-1:0] a,
                                                input logic signed [W-1:0] b);
    logic signed [2*W-1:0] p;
    p = (2*W)'(a) * (2*W)'(b);
    return W'(p >>> F);
  endfunction

  // q e^2 at full precision (3W-bit product), then saturated to W bits:
  // with a nearly singular channel e is large and q tiny, so e^2 alone
  // would overflow a word
  function automatic logic signed [W-1:0] fxqee(input logic signed [W-1:0] qv,
                                                input logic signed [W-1:0] ev);
    logic signed [3*W-1:0] p;
    p = (((3*W)'(qv) * (3*W)'(ev)) * (3*W)'(ev)) >>> (2 * F);
    if (p > (3*W)'(MAXW))      return MAXW;
    else if (p < -(3*W)'(MAXW)) return -MAXW;
    else                        return W'(p);
  endfunction

  function automatic logic signed [W-1:0] fx_int(input logic signed [UW-1:0] v);
    return W'(v) <<< F;
  endfunction

  logic [$clog2(M)-1:0] km1;
  logic signed [W-1:0]  acc, e;
  always_comb begin
    km1 = k - 1'b1;
    acc = rho[km1];
    for (int j = 0; j < M; j++) begin
      if (j >= int'(k)) acc = acc + fxmul(q[km1][j], rho[j] - fx_int(u[j]));
    end
    s_next = acc;
    e      = s_k - fx_int(u[k]);
    t_next = t_k - fxqee(qd[k], e);
  end
endmodule
