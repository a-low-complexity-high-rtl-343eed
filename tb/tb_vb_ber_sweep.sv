// tb_vb_ber_sweep: the 4x4 16-QAM link at Eb/N0 = 10, 15 and 20 dB, all
// parameters at their defaults.
//
// At each point runs NVEC received vectors through vb_mimo_top over an i.i.d. Gaussian
// real channel (unit-variance entries, the same matrix for the in-phase
// and quadrature parts). With average symbol energy 10 and four transmit
// antennas, the energy per bit at a receive antenna is Eb = 4 * 10 / 16 =
// 2.5, so Eb/N0 = 20 dB gives N0 = 0.025; the noise standard deviation
// per real dimension is sqrt(N0 / 2). Every decision is compared with
// exhaustive ML search (a near-tie within 0.02 in distance is accepted);
// the bit error rates of the hardware and of ML search, and the average
// number of clock cycles per vector (16 bits) are reported per point; the
// hardware must not make more bit errors than ML search plus those of the
// accepted near-ties. The search
// must never fail to find a point (the initial radius is the distance of
// the rounded zero-forcing point plus a margin).
module tb_vb_ber_sweep;
  import vb_tb_pkg::*;
  localparam int M = 4, W = vb_pkg::DEF_W, UW = 4, NVEC = 1000, NPT = 3;
  localparam real EBN0_DB [NPT] = '{10.0, 15.0, 20.0};

  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_valid = 1'b0, tx_sym_valid;
  logic [3:0]           tx_bits [M];
  logic signed [2:0]    tx_sym_i [M], tx_sym_q [M];
  logic rx_valid = 1'b0, rx_ready, rx_out_valid, found_re, found_im;
  logic signed [W-1:0]  q [M][M], qd [M], iq [M], rho_re [M], rho_im [M];
  logic signed [W-1:0]  radius_re, radius_im, d_re, d_im;
  logic [3:0]           rx_bits [M];
  logic signed [UW-1:0] rx_u_re [M], rx_u_im [M];

  vb_mimo_top dut (.clk, .rst_n, .tx_valid, .tx_bits, .tx_sym_valid,
    .tx_sym_i, .tx_sym_q, .rx_valid, .rx_ready, .q, .qd, .iq, .rho_re,
    .rho_im, .radius_re, .radius_im, .rx_out_valid, .rx_bits, .rx_u_re,
    .rx_u_im, .found_re, .found_im, .d_re, .d_im);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] gray(int i);
    return 2'(i ^ (i >> 1));
  endfunction

  initial begin
    rmat_t h; rvec_t yr, yi, ypr, ypi; ivec_t ur, ui, mr, mi, hr, hi;
    vbprob_t pr, pi; real dr, di, sigma;
    logic [3:0] b [M];
    int hw_err, ml_err, busy_cycles, cyc, ties;
    tx_bits = '{default: '0};
    q = '{default: '0}; qd = '{default: '0}; iq = '{default: '0};
    rho_re = '{default: '0}; rho_im = '{default: '0}; radius_re = '0; radius_im = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int pt = 0; pt < NPT; pt++) begin
    sigma = $sqrt(2.5 / $pow(10.0, EBN0_DB[pt] / 10.0) / 2.0);
    hw_err = 0; ml_err = 0; busy_cycles = 0; ties = 0;
    for (int v = 0; v < NVEC; v++) begin
      for (int j = 0; j < M; j++) b[j] = 4'($urandom);
      tx_bits = b; tx_valid = 1'b1;
      @(negedge clk);
      tx_valid = 1'b0;
      for (int j = 0; j < M; j++) begin
        ur[j] = (int'(tx_sym_i[j]) + 3) / 2;
        ui[j] = (int'(tx_sym_q[j]) + 3) / 2;
      end
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) h[i][j] = gauss();
      yr = channel(h, ur, sigma); yi = channel(h, ui, sigma);
      ypr = shift_obs(h, yr);     ypi = shift_obs(h, yi);
      mr = ml_search(h, ypr, dr); mi = ml_search(h, ypi, di);
      pr = preprocess(h, ypr, 1.01);
      pi = preprocess(h, ypi, 1.01);
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++) q[i][j] = fx(pr.q[i][j]);
        qd[i] = fx(pr.qd[i]); iq[i] = fx(pr.iq[i]);
        rho_re[i] = fx(pr.rho[i]); rho_im[i] = fx(pi.rho[i]);
      end
      radius_re = fx(pr.radius); radius_im = fx(pi.radius);
      rx_valid = 1'b1;
      while (!rx_ready) @(negedge clk);
      @(negedge clk);
      rx_valid = 1'b0;
      cyc = 1;
      while (!rx_out_valid) begin @(negedge clk); cyc++; end
      busy_cycles += cyc;
      for (int j = 0; j < M; j++) begin hr[j] = int'(rx_u_re[j]); hi[j] = int'(rx_u_im[j]); end
      check(found_re && found_im, $sformatf("vector %0d: no point found", v));
      check(hr == mr || metric(h, ypr, hr) <= dr + 0.02,
            $sformatf("vector %0d: in-phase %p ml %p", v, hr, mr));
      check(hi == mi || metric(h, ypi, hi) <= di + 0.02,
            $sformatf("vector %0d: quadrature %p ml %p", v, hi, mi));
      if (hr != mr || hi != mi) ties++;
      for (int j = 0; j < M; j++) begin
        hw_err += $countones(rx_bits[j] ^ b[j]);
        ml_err += $countones({gray(mr[j]), gray(mi[j])} ^ b[j]);
      end
    end
    $display("Eb/N0 %4.1f dB: BER hardware %e, ML %e over %0d bits; near-ties %0d; %0.1f cycles per vector",
             EBN0_DB[pt], real'(hw_err) / real'(16 * NVEC), real'(ml_err) / real'(16 * NVEC),
             16 * NVEC, ties, real'(busy_cycles) / real'(NVEC));
    check(hw_err <= ml_err + 8 * ties, "hardware BER above ML BER");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
