// vb_mimo_top: 4x4 MIMO link with 16-QAM, transmit mapping and VB receiver.
//
// Transmit side: the data of the four spatial streams arrive as four 4-bit
// words; one qam16_mod per stream maps them to I/Q levels, registered and
// flagged by tx_sym_valid one cycle after tx_valid. The radio channel and
// noise lie outside this design.
// Receive side: the channel preprocessing (Cholesky factorisation of the
// Gram matrix, inversion, zero-forcing estimate rho, initial radius) runs in
// software on an embedded processor, which hands the VB coefficients to
// vb_mimo_decoder through plain input ports; the decoder searches the
// in-phase and quadrature lattices in parallel and returns 16 bits per
// received vector (rx_bits[a] for antenna a, [3:2] in-phase, [1:0]
// quadrature), with the decided PAM indices (level 2u-3) alongside. Timing of the receive ports is that of vb_mimo_decoder.
module vb_mimo_top
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
  // transmit mapping
  input  logic                 tx_valid,
  input  logic [3:0]           tx_bits   [M],
  output logic                 tx_sym_valid,
  output logic signed [2:0]    tx_sym_i  [M],
  output logic signed [2:0]    tx_sym_q  [M],
  // receive: preprocessed problem from the processor
  input  logic                 rx_valid,
  output logic                 rx_ready,
  input  logic signed [W-1:0]  q         [M][M],
  input  logic signed [W-1:0]  qd        [M],
  input  logic signed [W-1:0]  iq        [M],
  input  logic signed [W-1:0]  rho_re    [M],
  input  logic signed [W-1:0]  rho_im    [M],
  input  logic signed [W-1:0]  radius_re,
  input  logic signed [W-1:0]  radius_im,
  // receive: decisions
  output logic                 rx_out_valid,
  output logic [3:0]           rx_bits   [M],
  output logic signed [UW-1:0] rx_u_re   [M],
  output logic signed [UW-1:0] rx_u_im   [M],
  output logic                 found_re,
  output logic                 found_im,
  output logic signed [W-1:0]  d_re,
  output logic signed [W-1:0]  d_im
);
  logic signed [2:0]    sym_i [M], sym_q [M];

  for (genvar a = 0; a < M; a++) begin : g_mod
    qam16_mod u_mod (.bits(tx_bits[a]), .sym_i(sym_i[a]), .sym_q(sym_q[a]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sym_valid <= 1'b0;
      tx_sym_i     <= '{default: '0};
      tx_sym_q     <= '{default: '0};
    end else begin
      tx_sym_valid <= tx_valid;
      if (tx_valid) begin
        tx_sym_i <= sym_i;
        tx_sym_q <= sym_q;
      end
    end
  end

  vb_mimo_decoder #(.M(M), .W(W), .F(F), .UMAX(UMAX), .UW(UW), .RB(RB)) u_dec (
    .clk, .rst_n, .in_valid(rx_valid), .in_ready(rx_ready), .q, .qd, .iq,
    .rho_re, .rho_im, .radius_re, .radius_im, .out_valid(rx_out_valid),
    .out_bits(rx_bits), .u_re(rx_u_re), .u_im(rx_u_im), .found_re, .found_im, .d_re, .d_im
  );
endmodule
