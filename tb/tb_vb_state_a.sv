// tb_vb_state_a: checks the layer expansion of state A.
//
// Random layer k in 1..3, coefficients, zero-forcing values, indices, S_k
// and T_k are applied in fixed point; the reference evaluates
//   S_{k-1} = rho_{k-1} + sum_{j>=k} q_{k-1,j} (rho_j - u_j)
//   T_{k-1} = T_k - q_kk (S_k - u_k)^2
// in real arithmetic from the same quantised inputs. Results must agree
// within the truncation error of the fixed-point products (0.005).
module tb_vb_state_a;
  import vb_tb_pkg::*;
  localparam int M = 4, W = vb_pkg::DEF_W, UW = 4;
  logic [1:0]           k;
  logic signed [W-1:0]  rho [M], q [M][M], qd [M], s_k, t_k, s_next, t_next;
  logic signed [UW-1:0] u [M];
  int checks = 0, failures = 0;

  vb_state_a dut (.k, .rho, .q, .qd, .u, .s_k, .t_k, .s_next, .t_next);

  function automatic real rr(real lo, real hi);
    return lo + (hi - lo) * urand();
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real es, et, e;
    for (int n = 0; n < 3000; n++) begin
      k = 2'($urandom_range(1, 3));
      for (int i = 0; i < M; i++) begin
        rho[i] = fx(rr(-2.0, 5.0));
        qd[i]  = fx(rr(0.5, 8.0));
        u[i]   = UW'($urandom_range(0, 3));
        for (int j = 0; j < M; j++) q[i][j] = fx(rr(-1.5, 1.5));
      end
      s_k = fx(rr(-1.0, 4.0));
      t_k = fx(rr(0.0, 40.0));
      #1;
      es = unfx(rho[k-1]);
      for (int j = int'(k); j < M; j++) es += unfx(q[k-1][j]) * (unfx(rho[j]) - real'(u[j]));
      e  = unfx(s_k) - real'(u[k]);
      et = unfx(t_k) - unfx(qd[k]) * e * e;
      checks += 2;
      if (unfx(s_next) - es > 0.005 || es - unfx(s_next) > 0.005) begin
        failures++;
        $display("FAIL: k=%0d S %f expected %f", k, unfx(s_next), es);
      end
      if (unfx(t_next) - et > 0.005 || et - unfx(t_next) > 0.005) begin
        failures++;
        $display("FAIL: k=%0d T %f expected %f", k, unfx(t_next), et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
