// tb_vb_mimo_top: end-to-end run of the 4x4 16-QAM MIMO link, all
// parameters at their defaults.
//
// A producer sends random 16-bit words through the top's modulators, takes
// the symbols it returns through a random real channel with noise (in-phase
// and quadrature alike), runs the preprocessing model and offers the
// problem to the receiver. It prepares the next problem while the previous
// one is being decoded and holds rx_valid until rx_ready. A consumer takes
// every rx_out_valid and compares with exhaustive ML search per part and,
// at low noise, with the bits sent. Some problems use a large radius
// (several radius shrinks) and some an in-phase radius below the ML
// distance (found must stay 0).
// Counted, and each required at least once: visits of states A, B, C, D;
// radius shrinks, and searches with two or more; empty intervals; index
// upgrades folded into B and C; searches that find no point; a problem
// offered while the receiver is busy; one core waiting for the other; a
// layer interval too wide for the word (from occasional nearly singular
// channels).
module tb_vb_mimo_top;
  import vb_tb_pkg::*;
  import vb_pkg::*;
  localparam int M = 4, W = vb_pkg::DEF_W, UW = 4, NVEC = 200;

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
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    rmat_t h; rvec_t ypr, ypi; ivec_t mr, mi, ur, ui;
    real dr, di; bit tight; bit lownoise;
  } exp_t;
  exp_t expq [$];

  // ---- mechanism counters ----
  int n_a, n_b, n_c, n_d, n_accept, n_multi, n_empty, n_fold, n_nofound;
  int n_offer_busy, n_join_wait, acc_re, acc_im, n_wide;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dec.u_core_re.state == S_A) n_a++;
    if (dut.u_dec.u_core_re.state == S_B) n_b++;
    if (dut.u_dec.u_core_re.state == S_C) n_c++;
    if (dut.u_dec.u_core_re.u_fsm.d_start) n_d++;
    if (dut.u_dec.u_core_re.u_fsm.b_accept) begin n_accept++; acc_re++; end
    if (dut.u_dec.u_core_im.u_fsm.b_accept) acc_im++;
    if (dut.u_dec.u_core_re.u_fsm.ld_d && dut.u_dec.u_core_re.u_fsm.d_empty) n_empty++;
    if (dut.u_dec.u_core_re.u_fsm.b_inc || dut.u_dec.u_core_re.u_fsm.c_up) n_fold++;
    if (rx_valid && !rx_ready) n_offer_busy++;
    if (dut.u_dec.u_core_re.u_fsm.ld_d && dut.u_dec.u_core_re.u_d.wide_q) n_wide++;
    if (dut.u_dec.u_core_re.done && !dut.u_dec.u_core_im.ready) n_join_wait++;
    if (dut.u_dec.u_core_im.done && !dut.u_dec.u_core_re.ready) n_join_wait++;
    if (dut.u_dec.u_core_re.done) begin
      if (acc_re >= 2) n_multi++;
      acc_re = 0;
    end
    if (dut.u_dec.u_core_im.done) begin
      if (acc_im >= 2) n_multi++;
      acc_im = 0;
    end
  end

  function automatic logic [1:0] gray(int i);
    return 2'(i ^ (i >> 1));
  endfunction

  // ---- producer ----
  initial begin
    exp_t e; vbprob_t pr, pi; rvec_t yr, yi; real sigma;
    logic [3:0] b [M];
    tx_bits = '{default: '0};
    q = '{default: '0}; qd = '{default: '0}; iq = '{default: '0};
    rho_re = '{default: '0}; rho_im = '{default: '0}; radius_re = '0; radius_im = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < NVEC; v++) begin
      // transmit mapping through the top's modulators
      for (int j = 0; j < M; j++) b[j] = 4'($urandom);
      tx_bits = b; tx_valid = 1'b1;
      @(negedge clk);
      tx_valid = 1'b0;
      check(tx_sym_valid, "tx_sym_valid missing");
      for (int j = 0; j < M; j++) begin
        e.ur[j] = (int'(tx_sym_i[j]) + 3) / 2;
        e.ui[j] = (int'(tx_sym_q[j]) + 3) / 2;
        check(gray(e.ur[j]) == b[j][3:2] && gray(e.ui[j]) == b[j][1:0],
              $sformatf("vector %0d: modulator %b -> (%0d,%0d)", v, b[j],
                        tx_sym_i[j], tx_sym_q[j]));
      end
      // channel and preprocessing
      e.h = rand_channel();
      // now and then a nearly singular channel: last column almost equal
      // to the third, so q_33 is tiny and the layer-3 interval overflows
      if (v % 25 == 12)
        for (int i = 0; i < M; i++) e.h[i][3] = e.h[i][2] + 1.0e-3 * gauss();
      e.lownoise = (v % 3 == 0) && (v % 25 != 12);  // even ML may err on a singular channel
      sigma = e.lownoise ? 0.05 : 0.35;
      yr = channel(e.h, e.ur, sigma); yi = channel(e.h, e.ui, sigma);
      e.ypr = shift_obs(e.h, yr);     e.ypi = shift_obs(e.h, yi);
      e.mr = ml_search(e.h, e.ypr, e.dr);
      e.mi = ml_search(e.h, e.ypi, e.di);
      pr = preprocess(e.h, e.ypr, (v % 4 == 1) ? 6.0 : 1.01);
      pi = preprocess(e.h, e.ypi, (v % 5 == 2) ? 6.0 : 1.01);
      e.tight = (v % 16 == 7) && (e.dr > 0.4);
      if (e.tight) pr.radius = e.dr * 0.5;
      // offer it; the previous one may still be decoding
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++) q[i][j] = fx(pr.q[i][j]);
        qd[i] = fx(pr.qd[i]); iq[i] = fx(pr.iq[i]);
        rho_re[i] = fx(pr.rho[i]); rho_im[i] = fx(pi.rho[i]);
      end
      radius_re = fx(pr.radius); radius_im = fx(pi.radius);
      expq.push_back(e);
      rx_valid = 1'b1;
      while (!rx_ready) @(negedge clk);
      @(negedge clk);
      rx_valid = 1'b0;
    end
  end

  // ---- consumer ----
  initial begin
    exp_t e; ivec_t hr, hi;
    automatic int got = 0;
    while (got < NVEC) begin
      @(negedge clk);
      if (!rx_out_valid) continue;
      e = expq.pop_front();
      for (int j = 0; j < M; j++) begin hr[j] = int'(rx_u_re[j]); hi[j] = int'(rx_u_im[j]); end
      check(found_im, $sformatf("vector %0d: quadrature not found", got));
      check(hi == e.mi || metric(e.h, e.ypi, hi) <= e.di + 0.02,
            $sformatf("vector %0d: quadrature %p ml %p", got, hi, e.mi));
      if (e.tight) begin
        check(!found_re, $sformatf("vector %0d: found with radius below ML", got));
        n_nofound++;
      end else begin
        check(found_re, $sformatf("vector %0d: in-phase not found", got));
        check(hr == e.mr || metric(e.h, e.ypr, hr) <= e.dr + 0.02,
              $sformatf("vector %0d: in-phase %p ml %p", got, hr, e.mr));
      end
      for (int j = 0; j < M; j++) begin
        check(rx_bits[j] == {gray(hr[j]), gray(hi[j])},
              $sformatf("vector %0d: bits[%0d] %b", got, j, rx_bits[j]));
        if (e.lownoise && !e.tight)
          check(rx_bits[j] == {gray(e.ur[j]), gray(e.ui[j])},
                $sformatf("vector %0d: bits[%0d] %b differ from sent", got, j, rx_bits[j]));
      end
      got++;
    end
    check(n_a > 0, "state A never visited");
    check(n_b > 0, "state B never visited");
    check(n_c > 0, "state C never visited");
    check(n_d > 0, "state D never visited");
    check(n_accept > 0, "radius never shrank");
    check(n_multi > 0, "no search with two radius shrinks");
    check(n_empty > 0, "no empty interval");
    check(n_fold > 0, "no folded index upgrade");
    check(n_nofound > 0, "no search without a point");
    check(n_offer_busy > 0, "no problem offered while busy");
    check(n_join_wait > 0, "cores never finished apart");
    check(n_wide > 0, "no interval wider than the word range");
    $display("A %0d B %0d C %0d D %0d shrink %0d multi %0d empty %0d fold %0d nofound %0d busy-offer %0d join-wait %0d wide %0d",
             n_a, n_b, n_c, n_d, n_accept, n_multi, n_empty, n_fold, n_nofound,
             n_offer_busy, n_join_wait, n_wide);
    $display("cycles per received vector: %0d", $time / 64'(10 * NVEC));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
