// vb_mimo_decoder: 4x4 16-QAM MIMO detector built from two VB cores.
//
// With a real-valued channel matrix H the in-phase and quadrature parts of
// the received vector are two independent real lattice problems sharing
// one Gram matrix, so one vb_core searches the in-phase indices and a
// second one the quadrature indices at the same time (the real/imaginary
// parallelism of the source design). Both cores take the same VB
// coefficients q, qd, iq; each takes its own rho and initial radius.
// The search runs in index space u in 0..3 (PAM level 2u-3); the decided
// levels are fed through one qam16_demod per antenna, which returns the
// 4 bits of each stream.
// Handshake: in_valid/in_ready; a transfer starts both cores and captures
// the inputs, so the next problem can be prepared meanwhile. in_valid must
// stay high until in_ready. When the slower core has finished, out_valid
// pulses for one cycle with the results registered; they hold until the
// next out_valid. in_ready returns the cycle out_valid is high.
module vb_mimo_decoder
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
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W-1:0]  q         [M][M],
  input  logic signed [W-1:0]  qd        [M],
  input  logic signed [W-1:0]  iq        [M],
  input  logic signed [W-1:0]  rho_re    [M],
  input  logic signed [W-1:0]  rho_im    [M],
  input  logic signed [W-1:0]  radius_re,
  input  logic signed [W-1:0]  radius_im,
  output logic                 out_valid,
  output logic [3:0]           out_bits  [M],
  output logic signed [UW-1:0] u_re      [M],
  output logic signed [UW-1:0] u_im      [M],
  output logic                 found_re,
  output logic                 found_im,
  output logic signed [W-1:0]  d_re,
  output logic signed [W-1:0]  d_im
);
  logic rdy_re, rdy_im, done_re, done_im, start;
  logic active, seen_re, seen_im, both_done;
  logic                 c_found_re, c_found_im;
  logic signed [UW-1:0] c_u_re [M], c_u_im [M];
  logic signed [W-1:0]  c_d_re, c_d_im;
  vb_state_e            st_re, st_im;
  logic [3:0]           bits [M];

  always_comb begin
    in_ready  = !active && rdy_re && rdy_im;
    start     = in_valid && in_ready;
    both_done = active && (seen_re || done_re) && (seen_im || done_im);
  end

  vb_core #(.M(M), .W(W), .F(F), .UMAX(UMAX), .UW(UW), .RB(RB)) u_core_re (
    .clk, .rst_n, .start, .ready(rdy_re), .q, .qd, .iq, .rho(rho_re),
    .radius(radius_re), .done(done_re), .found(c_found_re), .u_best(c_u_re),
    .d_best(c_d_re), .state(st_re)
  );

  vb_core #(.M(M), .W(W), .F(F), .UMAX(UMAX), .UW(UW), .RB(RB)) u_core_im (
    .clk, .rst_n, .start, .ready(rdy_im), .q, .qd, .iq, .rho(rho_im),
    .radius(radius_im), .done(done_im), .found(c_found_im), .u_best(c_u_im),
    .d_best(c_d_im), .state(st_im)
  );

  for (genvar a = 0; a < M; a++) begin : g_demod
    logic signed [W-1:0] lvl_i, lvl_q;
    always_comb begin
      lvl_i = (W'(c_u_re[a]) * W'(2) - W'(3)) <<< F;
      lvl_q = (W'(c_u_im[a]) * W'(2) - W'(3)) <<< F;
    end
    qam16_demod #(.W(W), .F(F)) u_demod (
      .rx_i(lvl_i), .rx_q(lvl_q), .bits(bits[a])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      seen_re   <= 1'b0;
      seen_im   <= 1'b0;
      out_valid <= 1'b0;
      out_bits  <= '{default: '0};
      u_re      <= '{default: '0};
      u_im      <= '{default: '0};
      found_re  <= 1'b0;
      found_im  <= 1'b0;
      d_re      <= '0;
      d_im      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        active  <= 1'b1;
        seen_re <= 1'b0;
        seen_im <= 1'b0;
      end else if (both_done) begin
        active    <= 1'b0;
        seen_re   <= 1'b0;
        seen_im   <= 1'b0;
        out_valid <= 1'b1;
        out_bits  <= bits;
        u_re      <= c_u_re;
        u_im      <= c_u_im;
        found_re  <= c_found_re;
        found_im  <= c_found_im;
        d_re      <= c_d_re;
        d_im      <= c_d_im;
      end else begin
        if (done_re) seen_re <= 1'b1;
        if (done_im) seen_im <= 1'b1;
      end
    end
  end

  // valid/ready rule: a request is held until it is accepted
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid && !in_ready |=> in_valid);
endmodule
