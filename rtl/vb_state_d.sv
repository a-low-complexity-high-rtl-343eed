// vb_state_d: state D of the VB search, the bounds of the current layer.
//
// For layer k the admissible indices are those with
//   q_kk (S_k - u)^2 <= T_k,   i.e.   |S_k - u| <= sqrt(T_k / q_kk)
// so the unit forms r = sqrt(T_k * invq) (invq = 1/q_kk, supplied by the
// preprocessing) and returns
//   lo = ceil(S_k - r),  hi = floor(S_k + r)
// clipped to the constellation 0..UMAX (lo to at most UMAX+1, hi to at
// least -1, so an empty interval still shows as lo > hi). lo is the first
// candidate index, i.e. the VB "u_k + 1" of step 2 applied at once; hi is
// the upper bound L_k. A negative T (possible only through rounding) is
// treated as 0. If T * invq exceeds the word range (a nearly singular
// channel makes q_kk tiny) the interval is wider than anything the word can
// hold, and the whole constellation 0..UMAX is returned.
// Timing: start pulses with S, T and invq valid; they are captured. done
// pulses (W+F)/2/RB cycles later (RB root bits per cycle, see vb_sqrt)
// with lo, hi and empty valid; they stay valid until the next start. The square root makes this the
// slowest state, as the source design notes; its multi-cycle digit-serial
// form is this design's choice.
module vb_state_d #(
  parameter int unsigned W    = vb_pkg::DEF_W,
  parameter int unsigned F    = vb_pkg::DEF_F,
  parameter int unsigned UMAX = vb_pkg::DEF_UMAX,
  parameter int unsigned UW   = vb_pkg::DEF_UW,
  parameter int unsigned RB   = vb_pkg::DEF_RB
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [W-1:0]  s_in,   // S_k, centre of the interval
  input  logic signed [W-1:0]  t_in,   // T_k, remaining squared radius
  input  logic signed [W-1:0]  invq,   // 1 / q_kk
  output logic                 done,
  output logic signed [UW-1:0] lo,
  output logic signed [UW-1:0] hi,
  output logic                 empty
);
  localparam int unsigned XW = ((W + F + 1) / 2) * 2;  // even radicand width
  localparam int unsigned RW = XW / 2;

  logic signed [W-1:0]   s_q;
  logic                  wide, wide_q;  // T * invq beyond the word range
  logic [XW-1:0]         rad;
  logic [RW-1:0]         root;

  // radicand = (T * invq) in Q.F, shifted left by F so the root is Q.F
  logic signed [2*W-1:0] prod;
  logic signed [2*W-1:0] arg;
  always_comb begin
    prod = (t_in[W-1] ? '0 : (2*W)'(t_in)) * (2*W)'(invq);
    arg  = prod >>> F;
    wide = 1'b0;
    if (arg < 0) arg = '0;
    if (arg > (2*W)'({1'b0, {(W-1){1'b1}}})) begin
      arg  = (2*W)'({1'b0, {(W-1){1'b1}}});
      wide = 1'b1;
    end
    rad  = XW'(arg) << F;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q    <= '0;
      wide_q <= 1'b0;
    end else if (start) begin
      s_q    <= s_in;
      wide_q <= wide;
    end
  end

  vb_sqrt #(.XW(XW), .RB(RB)) u_sqrt (
    .clk, .rst_n, .start, .x(rad), .busy(), .done, .root
  );

  // interval ends in Q.F, then ceil / floor to integers and clip
  localparam int unsigned EW = W + 2;
  localparam logic signed [EW-1:0] LO_MAX = EW'(UMAX + 1);
  localparam logic signed [EW-1:0] HI_MAX = EW'(UMAX);
  localparam logic signed [EW-1:0] HI_MIN = -EW'(1);
  logic signed [EW-1:0] lo_fx, hi_fx, lo_int, hi_int;
  always_comb begin
    lo_fx  = EW'(s_q) - EW'(root);
    hi_fx  = EW'(s_q) + EW'(root);
    lo_int = (lo_fx + EW'((1 << F) - 1)) >>> F;   // ceil
    hi_int = hi_fx >>> F;                          // floor
    if (lo_int < 0)           lo = '0;
    else if (lo_int > LO_MAX) lo = UW'(LO_MAX);
    else                      lo = UW'(lo_int);
    if (hi_int < HI_MIN)      hi = UW'(HI_MIN);
    else if (hi_int > HI_MAX) hi = UW'(HI_MAX);
    else                      hi = UW'(hi_int);
    if (wide_q) begin
      lo = '0;
      hi = UW'(HI_MAX);
    end
    empty = (lo > hi);
  end
endmodule
