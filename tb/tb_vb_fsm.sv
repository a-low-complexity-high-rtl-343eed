// tb_vb_fsm: checks the VB search controller against a transition table.
//
// The status inputs (d_done, d_empty, better, over_u0, over_up) and start
// are driven at random every cycle. A reference written as a table of the
// VB steps predicts the next state and layer and which register strobe
// must be active; every cycle the controller's state, layer, strobes,
// ready/done and the d_start pulse (first cycle of each D visit only) are
// compared. Every state must be visited and every strobe seen.
module tb_vb_fsm;
  import vb_pkg::*;
  localparam int M = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, d_done, d_empty, better, over_u0, over_up;
  vb_state_e state;
  logic [1:0] k;
  logic init, d_start, ld_d, a_go, b_accept, b_inc, c_up, ready, done;
  int checks = 0, failures = 0;

  vb_fsm dut (.clk, .rst_n, .start, .d_done, .d_empty, .better, .over_u0,
              .over_up, .state, .k, .init, .d_start, .ld_d, .a_go, .b_accept,
              .b_inc, .c_up, .ready, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vb_state_e es, prev;
  int ek;
  int visits [6];
  int strobes [7];

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %t: %s = %0d, expected %0d (state %s)", $time, what, got, exp, es.name());
    end
  endtask

  initial begin
    logic [6:0] exp_strobe;
    es = S_IDLE; prev = S_IDLE; ek = 0;
    {start, d_done, d_empty, better, over_u0, over_up} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      // drive random status, then compare at this cycle
      start   = ($urandom_range(0, 3) == 0);
      d_done  = ($urandom_range(0, 2) == 0);
      d_empty = ($urandom_range(0, 4) == 0);
      better  = ($urandom_range(0, 5) == 0);
      over_u0 = ($urandom_range(0, 2) == 0);
      over_up = ($urandom_range(0, 1) == 0);
      #1;
      expect_eq(int'(state), int'(es), "state");
      expect_eq(int'(k), ek, "k");
      expect_eq(int'(d_start), int'(es == S_D && prev != S_D), "d_start");
      expect_eq(int'(ready), int'(es == S_IDLE), "ready");
      expect_eq(int'(done), int'(es == S_DONE), "done");
      visits[int'(es)]++;
      // reference table: {init, ld_d, a_go, b_accept, b_inc, c_up}
      exp_strobe = '0;
      prev = es;
      case (es)
        S_IDLE: if (start) begin exp_strobe[0] = 1; ek = M - 1; es = S_D; end
        S_D:    if (d_done) begin
                  exp_strobe[1] = 1;
                  es = d_empty ? S_C : (ek > 0 ? S_A : S_B);
                end
        S_A:    begin exp_strobe[2] = 1; ek--; es = S_D; end
        S_B:    if (better) begin exp_strobe[3] = 1; ek = M - 1; es = S_D; end
                else begin exp_strobe[4] = 1; es = over_u0 ? S_C : S_B; end
        S_C:    if (ek == M - 1) es = S_DONE;
                else begin exp_strobe[5] = 1; ek++; es = over_up ? S_C : S_A; end
        default: es = S_IDLE;
      endcase
      expect_eq(int'({c_up, b_inc, b_accept, a_go, ld_d, init}), int'(exp_strobe), "strobes");
      for (int s = 0; s < 6; s++) if (exp_strobe[s]) strobes[s]++;
      @(negedge clk);
    end
    for (int s = 0; s < 6; s++) begin
      checks += 2;
      if (visits[s] == 0)  begin failures++; $display("FAIL: state %0d never visited", s); end
      if (strobes[s] == 0) begin failures++; $display("FAIL: strobe %0d never seen", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
