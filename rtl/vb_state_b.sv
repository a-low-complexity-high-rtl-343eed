// vb_state_b: state B of the VB search, distance of a complete point.
//
// When the search reaches the last layer (k = 0) every index is fixed and
// the squared distance of the lattice point to the received point is
//   d_new = C - T_0 + q_00 (S_0 - u_0)^2
// with C the squared radius the current pass started from. better is high
// when d_new < d_best, i.e. a closer point than any found so far (d_best
// starts equal to the initial radius). The formula and the comparison are
// the source design's; squared distances instead of distances (no square
// root needed here) are this design's choice. Combinational.
module vb_state_b #(
  parameter int unsigned W  = vb_pkg::DEF_W,
  parameter int unsigned F  = vb_pkg::DEF_F,
  parameter int unsigned UW = vb_pkg::DEF_UW
) (
  input  logic signed [W-1:0]  radius,  // C of the current pass
  input  logic signed [W-1:0]  t0,
  input  logic signed [W-1:0]  s0,
  input  logic signed [W-1:0]  q00,
  input  logic signed [UW-1:0] u0,
  input  logic signed [W-1:0]  d_best,
  output logic signed [W-1:0]  d_new,
  output logic                 better
);
  localparam logic signed [3*W-1:0] MAXW = (3*W)'({1'b0, {(W-1){1'b1}}});
  logic signed [W-1:0]   e, qe2;
  logic signed [3*W-1:0] p;
  always_comb begin
    e      = s0 - (W'(u0) <<< F);
    // q e^2 at full precision, saturated (see vb_state_a)
    p      = (((3*W)'(q00) * (3*W)'(e)) * (3*W)'(e)) >>> (2 * F);
    if (p > MAXW)       qe2 = W'(MAXW);
    else if (p < -MAXW) qe2 = W'(-MAXW);
    else                qe2 = W'(p);
    d_new  = radius - t0 + qe2;
    better = (d_new < d_best);
  end
endmodule
