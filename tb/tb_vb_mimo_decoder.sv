// tb_vb_mimo_decoder: checks the two-core 16-QAM MIMO detector.
//
// Each trial draws a real 4x4 channel, 16 random bits (four 16-QAM
// symbols, Gray map bits[3:2] in-phase, bits[1:0] quadrature) and noise on
// both parts, runs the preprocessing model for the in-phase and the
// quadrature observation (shared Gram matrix) and hands both problems to
// the decoder. Checked against exhaustive ML search per part: decided
// indices (or equal distance at a near-tie), the output bits as the Gray
// code of those indices, found flags, and the handshake (in_ready low while
// busy, one out_valid pulse per transfer). Inputs are scrambled after each
// transfer. At the lowest noise the bits must equal the transmitted ones.
module tb_vb_mimo_decoder;
  import vb_tb_pkg::*;
  localparam int M = 4, W = vb_pkg::DEF_W, UW = 4, NTRIAL = 150;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_ready, out_valid;
  logic signed [W-1:0]  q [M][M], qd [M], iq [M], rho_re [M], rho_im [M];
  logic signed [W-1:0]  radius_re, radius_im, d_re, d_im;
  logic [3:0]           out_bits [M];
  logic signed [UW-1:0] u_re [M], u_im [M];
  logic                 found_re, found_im;
  int checks = 0, failures = 0;

  vb_mimo_decoder dut (.clk, .rst_n, .in_valid, .in_ready, .q, .qd, .iq,
    .rho_re, .rho_im, .radius_re, .radius_im, .out_valid, .out_bits, .u_re,
    .u_im, .found_re, .found_im, .d_re, .d_im);
  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [1:0] gray(int i);
    return 2'(i ^ (i >> 1));
  endfunction

  initial begin
    rmat_t h; rvec_t yr, yi, ypr, ypi; ivec_t ur, ui, mr, mi, hr, hi;
    vbprob_t pr, pi; real dr, di, sigma;
    int npulse, nvalid_busy;
    q = '{default: '0}; qd = '{default: '0}; iq = '{default: '0};
    rho_re = '{default: '0}; rho_im = '{default: '0}; radius_re = '0; radius_im = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTRIAL; t++) begin
      h = rand_channel();
      for (int j = 0; j < M; j++) begin
        ur[j] = $urandom_range(0, 3);
        ui[j] = $urandom_range(0, 3);
      end
      sigma = (t % 3 == 0) ? 0.05 : 0.4;
      yr = channel(h, ur, sigma); yi = channel(h, ui, sigma);
      ypr = shift_obs(h, yr);     ypi = shift_obs(h, yi);
      mr = ml_search(h, ypr, dr); mi = ml_search(h, ypi, di);
      pr = preprocess(h, ypr, 1.01);
      pi = preprocess(h, ypi, (t % 2 == 0) ? 5.0 : 1.01);
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++) q[i][j] = fx(pr.q[i][j]);
        qd[i] = fx(pr.qd[i]); iq[i] = fx(pr.iq[i]);
        rho_re[i] = fx(pr.rho[i]); rho_im[i] = fx(pi.rho[i]);
      end
      radius_re = fx(pr.radius); radius_im = fx(pi.radius);
      in_valid = 1'b1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 1'b0;
      rho_re = '{default: '0}; rho_im = '{default: '0};
      npulse = 0; nvalid_busy = 0;
      while (!out_valid) begin
        if (in_ready) nvalid_busy++;
        @(negedge clk);
      end
      check(nvalid_busy == 0, "in_ready high while decoding");
      for (int j = 0; j < M; j++) begin hr[j] = int'(u_re[j]); hi[j] = int'(u_im[j]); end
      check(found_re && found_im, $sformatf("trial %0d: not found", t));
      check(hr == mr || metric(h, ypr, hr) <= dr + 0.02,
            $sformatf("trial %0d: in-phase %p ml %p", t, hr, mr));
      check(hi == mi || metric(h, ypi, hi) <= di + 0.02,
            $sformatf("trial %0d: quadrature %p ml %p", t, hi, mi));
      for (int j = 0; j < M; j++) begin
        check(out_bits[j] == {gray(hr[j]), gray(hi[j])},
              $sformatf("trial %0d: bits[%0d] %b", t, j, out_bits[j]));
        if (sigma < 0.1)
          check(out_bits[j] == {gray(ur[j]), gray(ui[j])},
                $sformatf("trial %0d: low-noise bits[%0d] %b sent %b", t, j,
                          out_bits[j], {gray(ur[j]), gray(ui[j])}));
      end
      @(negedge clk);
      check(!out_valid, "out_valid longer than one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
