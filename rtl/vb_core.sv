// vb_core: one Viterbo-Boutros closest-lattice-point search engine.
//
// Solves  min_u || R (rho - u) ||^2  over integer vectors u in 0..UMAX per
// dimension, for an upper-triangular R given through the VB coefficients
// q_ii = r_ii^2 (qd), q_ij = r_ij / r_ii for i < j (q), invq_i = 1/q_ii
// (iq) and the unconstrained solution rho, all computed beforehand by the
// preprocessing software. The search is a depth-first walk over layers
// M-1 .. 0 inside the sphere of squared radius C: state D (vb_state_d)
// bounds each layer, state A (vb_state_a) descends, state B (vb_state_b)
// evaluates complete points and, on finding a closer one, records it,
// shrinks the radius to its distance and restarts from the top layer, and
// state C climbs back up. vb_fsm sequences these.
// Interface: when ready, a start pulse captures all inputs, so the
// preprocessing of the next problem may change them at once while this
// one is searched. done pulses for one cycle at the end; u_best, d_best
// and found then hold until the next start. found = 0 means no lattice
// point lies strictly inside the initial radius (u_best is then all 0).
// Timing: data dependent; each visit to D costs (W+F)/2/RB + 1 cycles, A, B
// and C one cycle each. Fixed-point format: W-bit words, F fraction bits.
module vb_core
  import vb_pkg::*;
#(
  parameter int unsigned M    = vb_pkg::DEF_M,
  parameter int unsigned W    = vb_pkg::DEF_W,
  parameter int unsigned F    = vb_pkg::DEF_F,
  parameter int unsigned UMAX = vb_pkg::DEF_UMAX,
  parameter int unsigned UW   = vb_pkg::DEF_UW,
  parameter int unsigned RB   = vb_pkg::DEF_RB
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 ready,
  input  logic signed [W-1:0]  q      [M][M],
  input  logic signed [W-1:0]  qd     [M],
  input  logic signed [W-1:0]  iq     [M],
  input  logic signed [W-1:0]  rho    [M],
  input  logic signed [W-1:0]  radius,
  output logic                 done,
  output logic                 found,
  output logic signed [UW-1:0] u_best [M],
  output logic signed [W-1:0]  d_best,
  output vb_state_e            state
);
  localparam int unsigned KW = $clog2(M);
  localparam logic signed [UW-1:0] ONE = UW'(1);

  // captured problem
  logic signed [W-1:0]  q_r   [M][M];
  logic signed [W-1:0]  qd_r  [M];
  logic signed [W-1:0]  iq_r  [M];
  logic signed [W-1:0]  rho_r [M];
  // search registers
  logic signed [W-1:0]  c_r;         // squared radius of the current pass
  logic signed [UW-1:0] u_r [M];     // current index per layer
  logic signed [UW-1:0] l_r [M];     // upper bound L per layer
  logic signed [W-1:0]  s_r [M];     // interval centre S per layer
  logic signed [W-1:0]  t_r [M];     // remaining squared radius T per layer

  // controller
  logic [KW-1:0] k, kp1;
  logic init, d_start, ld_d, a_go, b_accept, b_inc, c_up;
  logic d_done, d_empty, better, over_u0, over_up;

  // state units
  logic signed [UW-1:0] d_lo, d_hi;
  logic signed [W-1:0]  a_s, a_t, b_d;

  always_comb begin
    kp1     = k + 1'b1;
    over_u0 = (u_r[0] + ONE) > l_r[0];
    over_up = (u_r[kp1] + ONE) > l_r[kp1];
  end

  vb_fsm #(.M(M)) u_fsm (
    .clk, .rst_n, .start, .d_done, .d_empty, .better, .over_u0, .over_up,
    .state, .k, .init, .d_start, .ld_d, .a_go, .b_accept, .b_inc, .c_up,
    .ready, .done
  );

  vb_state_d #(.W(W), .F(F), .UMAX(UMAX), .UW(UW), .RB(RB)) u_d (
    .clk, .rst_n, .start(d_start), .s_in(s_r[k]), .t_in(t_r[k]),
    .invq(iq_r[k]), .done(d_done), .lo(d_lo), .hi(d_hi), .empty(d_empty)
  );

  vb_state_a #(.M(M), .W(W), .F(F), .UW(UW)) u_a (
    .k, .rho(rho_r), .q(q_r), .qd(qd_r), .u(u_r), .s_k(s_r[k]), .t_k(t_r[k]),
    .s_next(a_s), .t_next(a_t)
  );

  vb_state_b #(.W(W), .F(F), .UW(UW)) u_b (
    .radius(c_r), .t0(t_r[0]), .s0(s_r[0]), .q00(qd_r[0]), .u0(u_r[0]),
    .d_best, .d_new(b_d), .better
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r    <= '{default: '0};
      qd_r   <= '{default: '0};
      iq_r   <= '{default: '0};
      rho_r  <= '{default: '0};
      c_r    <= '0;
      u_r    <= '{default: '0};
      l_r    <= '{default: '0};
      s_r    <= '{default: '0};
      t_r    <= '{default: '0};
      u_best <= '{default: '0};
      d_best <= '0;
      found  <= 1'b0;
    end else begin
      if (init) begin
        q_r         <= q;
        qd_r        <= qd;
        iq_r        <= iq;
        rho_r       <= rho;
        c_r         <= radius;
        d_best      <= radius;
        found       <= 1'b0;
        u_best      <= '{default: '0};
        s_r[M-1]    <= rho[M-1];
        t_r[M-1]    <= radius;
      end
      if (ld_d) begin
        u_r[k] <= d_lo;
        l_r[k] <= d_hi;
      end
      if (a_go) begin
        s_r[k-1'b1] <= a_s;
        t_r[k-1'b1] <= a_t;
      end
      if (b_accept) begin
        u_best   <= u_r;
        d_best   <= b_d;
        found    <= 1'b1;
        c_r      <= b_d;
        s_r[M-1] <= rho_r[M-1];
        t_r[M-1] <= b_d;
      end
      if (b_inc) u_r[0]   <= u_r[0] + ONE;
      if (c_up)  u_r[kp1] <= u_r[kp1] + ONE;
    end
  end
endmodule
