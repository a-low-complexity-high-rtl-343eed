// tb_qam16_demod: checks the minimum-distance 16-QAM decision.
//
// Random received points in [-5, 5]^2 (fixed point, F fraction bits) and
// every exact constellation point are decided by the demodulator. The
// reference finds the nearest PAM level per axis in real arithmetic,
// Gray-codes its index (g = i ^ (i >> 1)) and compares. Points within
// 1e-3 of a decision boundary are skipped.
module tb_qam16_demod;
  localparam int W = vb_pkg::DEF_W, F = vb_pkg::DEF_F;
  localparam real SCALE = 2.0 ** F;
  logic signed [W-1:0] rx_i, rx_q;
  logic [3:0]          bits;
  int checks = 0, failures = 0;

  qam16_demod dut (.rx_i, .rx_q, .bits);

  function automatic int nearest(real x, output bit near_edge);
    int best = 0;
    real bd = 1.0e9;
    for (int i = 0; i < 4; i++) begin
      real d = (x - real'(2 * i - 3)) * (x - real'(2 * i - 3));
      if (d < bd) begin bd = d; best = i; end
    end
    near_edge = 0;
    for (int b = -2; b <= 2; b += 2) begin
      real e = x - real'(b);
      if (e < 1.0e-3 && e > -1.0e-3) near_edge = 1;
    end
    return best;
  endfunction

  task automatic try(real xi, real xq);
    bit ei, eq;
    int ii, iq;
    logic [3:0] exp_bits;
    rx_i = W'($rtoi(xi * SCALE));
    rx_q = W'($rtoi(xq * SCALE));
    #1;
    ii = nearest(real'(rx_i) / SCALE, ei);
    iq = nearest(real'(rx_q) / SCALE, eq);
    if (ei || eq) return;
    exp_bits = {2'(ii ^ (ii >> 1)), 2'(iq ^ (iq >> 1))};
    checks++;
    if (bits !== exp_bits) begin
      failures++;
      $display("FAIL: (%f,%f) -> %b expected %b", xi, xq, bits, exp_bits);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) try(real'(2 * a - 3), real'(2 * b - 3));
    for (int n = 0; n < 2000; n++)
      try(10.0 * (real'($urandom) / 4294967296.0) - 5.0,
          10.0 * (real'($urandom) / 4294967296.0) - 5.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
