// tb_vb_state_d: checks the bound computation of state D.
//
// Random S, T (some negative) and 1/q are applied with a start pulse. The
// reference forms r = sqrt(max(T,0) / q), lo = ceil(S - r) and
// hi = floor(S + r) in real arithmetic, clipped to 0..4 and -1..3, and
// empty = lo > hi. Cases whose interval ends lie within 0.002 of an
// integer are skipped (fixed-point rounding may go either way). The
// result must arrive (W+F)/2/RB cycles after the edge taking start. One
// case in eleven has a huge 1/q (nearly singular channel), so T/q exceeds
// the word range and the whole constellation must be returned.
module tb_vb_state_d;
  import vb_tb_pkg::*;
  localparam int W = vb_pkg::DEF_W, UW = 4, LAT = (vb_pkg::DEF_W + vb_pkg::DEF_F + 1) / 2 / vb_pkg::DEF_RB;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done, empty;
  logic signed [W-1:0]  s_in, t_in, invq;
  logic signed [UW-1:0] lo, hi;
  int checks = 0, failures = 0;

  vb_state_d dut (.clk, .rst_n, .start, .s_in, .t_in, .invq, .done, .lo, .hi, .empty);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near_int(real v);
    real f = v - $floor(v);
    return f < 0.002 || f > 0.998;
  endfunction

  initial begin
    real r, sv, tv, iv;
    int elo, ehi, cyc;
    automatic int nempty = 0, nfull = 0, nwide = 0;
    s_in = '0; t_in = '0; invq = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      s_in = fx(8.0 * urand() - 2.5);
      t_in = fx((n % 7 == 0) ? -urand() : 30.0 * urand() * urand());
      invq = fx((n % 11 == 5) ? 1.5e5 + 0.5e5 * urand() : 0.05 + 2.0 * urand());
      if (n % 11 == 5) begin
        // |S| beyond the largest root the word can hold, inside the true one
        s_in = fx((urand() < 0.5 ? -1.0 : 1.0) * (750.0 + 450.0 * urand()));
        t_in = fx(20.0 + 10.0 * urand());
        nwide++;
      end
      sv = unfx(s_in); tv = unfx(t_in); iv = unfx(invq);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      s_in = '0; t_in = '0;   // inputs are captured at start
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != LAT) begin failures++; $display("FAIL: latency %0d", cyc); end
      r = (tv > 0.0) ? $sqrt(tv * iv) : 0.0;
      if (near_int(sv - r) || near_int(sv + r)) continue;
      elo = int'($ceil(sv - r));
      ehi = int'($floor(sv + r));
      if (elo < 0) elo = 0;
      if (elo > 4) elo = 4;
      if (ehi < -1) ehi = -1;
      if (ehi > 3) ehi = 3;
      if (elo > ehi) nempty++; else nfull++;
      checks += 3;
      if (int'(lo) != elo || int'(hi) != ehi || empty != (elo > ehi)) begin
        failures++;
        $display("FAIL: S=%f T=%f 1/q=%f -> lo %0d hi %0d empty %0b, expected %0d %0d",
                 sv, tv, iv, lo, hi, empty, elo, ehi);
      end
    end
    checks++;
    if (nempty == 0 || nfull == 0 || nwide == 0) begin
      failures++;
      $display("FAIL: empty %0d, non-empty %0d intervals", nempty, nfull);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
