// tb_vb_state_b: checks the point distance and comparison of state B.
//
// Random radius C, T_0, S_0, q_00, u_0 and best distance; the reference
// computes d_new = C - T_0 + q_00 (S_0 - u_0)^2 in real arithmetic and
// better = d_new < d_best (cases closer than 0.005 to a tie are not judged
// on better). Every tenth case sets d_best right at d_new +/- 0.1.
module tb_vb_state_b;
  import vb_tb_pkg::*;
  localparam int W = vb_pkg::DEF_W, UW = 4;
  logic signed [W-1:0]  radius, t0, s0, q00, d_best, d_new;
  logic signed [UW-1:0] u0;
  logic                 better;
  int checks = 0, failures = 0;

  vb_state_b dut (.radius, .t0, .s0, .q00, .u0, .d_best, .d_new, .better);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ed, e;
    automatic int nb = 0;
    for (int n = 0; n < 3000; n++) begin
      radius = fx(50.0 * urand());
      t0     = fx(50.0 * urand());
      s0     = fx(6.0 * urand() - 1.5);
      q00    = fx(0.5 + 8.0 * urand());
      u0     = UW'($urandom_range(0, 3));
      e  = unfx(s0) - real'(u0);
      ed = unfx(radius) - unfx(t0) + unfx(q00) * e * e;
      d_best = (n % 10 == 0) ? fx(ed + ((n % 20 == 0) ? 0.1 : -0.1))
                             : fx(80.0 * urand() - 10.0);
      #1;
      checks++;
      if (unfx(d_new) - ed > 0.005 || ed - unfx(d_new) > 0.005) begin
        failures++;
        $display("FAIL: d_new %f expected %f", unfx(d_new), ed);
      end
      if (unfx(d_best) - ed > 0.005 || ed - unfx(d_best) > 0.005) begin
        checks++;
        if (better != (ed < unfx(d_best))) begin
          failures++;
          $display("FAIL: better %0b for d_new %f d_best %f", better, ed, unfx(d_best));
        end
        if (better) nb++;
      end
    end
    checks++;
    if (nb == 0) begin failures++; $display("FAIL: better never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
