// tb_vb_core: checks one VB search engine against exhaustive ML search.
//
// Each trial draws a random well-conditioned real 4x4 channel, random
// indices and Gaussian noise, runs the preprocessing model of vb_tb_pkg,
// and starts the core. Checked: the decided indices equal the ML indices
// (or, at a fixed-point near-tie, have the same distance within 0.02),
// d_best matches the real distance of the decision, and found is set.
// One trial in four uses a large radius (several radius shrinks) and one
// in eight a radius below the ML distance, where found must stay 0.
// Inputs are changed right after start to check that the core works from
// its captured copy. Cycle counts are reported.
module tb_vb_core;
  import vb_tb_pkg::*;
  import vb_pkg::*;

  localparam int M = 4, W = vb_pkg::DEF_W, F = vb_pkg::DEF_F, UW = 4;
  localparam int NTRIAL = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, ready, done, found;
  logic signed [W-1:0]  q [M][M], qd [M], iq [M], rho [M], radius, d_best;
  logic signed [UW-1:0] u_best [M];
  vb_state_e            state;

  vb_core dut (.clk, .rst_n, .start, .ready, .q, .qd, .iq, .rho, .radius,
               .done, .found, .u_best, .d_best, .state);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint total_cycles = 0;
  int accepts = 0, max_accepts = 0;

  always @(posedge clk) if (dut.b_accept) accepts++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rmat_t h; rvec_t y, yp; ivec_t utx, uml, uhw;
    vbprob_t p; real dml, dhw, sigma;
    bit tight;
    int cyc;
    q = '{default: '0}; qd = '{default: '0}; iq = '{default: '0};
    rho = '{default: '0}; radius = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTRIAL; t++) begin
      h = rand_channel();
      for (int j = 0; j < M; j++) utx[j] = $urandom_range(0, 3);
      sigma = 0.1 + 0.15 * real'(t % 5);
      y  = channel(h, utx, sigma);
      yp = shift_obs(h, y);
      uml = ml_search(h, yp, dml);
      p = preprocess(h, yp, (t % 4 == 1) ? 6.0 : 1.01);
      tight = (t % 8 == 3) && (dml > 0.4);
      if (tight) p.radius = dml * 0.5;
      @(negedge clk);
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++) q[i][j] = fx(p.q[i][j]);
        qd[i] = fx(p.qd[i]); iq[i] = fx(p.iq[i]); rho[i] = fx(p.rho[i]);
      end
      radius = fx(p.radius);
      check(ready, "core ready before start");
      start = 1'b1;
      accepts = 0;
      @(negedge clk);
      start = 1'b0;
      // scramble the inputs: the core must use its captured copy
      rho = '{default: W'(32'sh7fff)}; radius = '0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      total_cycles += longint'(cyc);
      if (accepts > max_accepts) max_accepts = accepts;
      for (int j = 0; j < M; j++) uhw[j] = int'(u_best[j]);
      if (tight) begin
        check(!found, $sformatf("trial %0d: found set with radius below ML distance", t));
      end else begin
        dhw = metric(h, yp, uhw);
        check(found, $sformatf("trial %0d: no point found", t));
        check(uhw == uml || dhw <= dml + 0.02,
              $sformatf("trial %0d: hw %p (%f) ml %p (%f)", t, uhw, dhw, uml, dml));
        check((unfx(d_best) - dhw < 0.05 + 0.01 * dhw) &&
              (dhw - unfx(d_best) < 0.05 + 0.01 * dhw),
              $sformatf("trial %0d: d_best %f real %f", t, unfx(d_best), dhw));
      end
    end
    check(max_accepts >= 2, "radius never shrank twice in one search");
    $display("average cycles per search: %0d, most radius updates: %0d",
             total_cycles / longint'(NTRIAL), max_accepts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
