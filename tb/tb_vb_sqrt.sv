// tb_vb_sqrt: checks the sequential integer square root.
//
// Radicands: 0, 1, all-ones, perfect squares and their neighbours, and
// random XW-bit values. Checked: root^2 <= x < (root+1)^2, the result
// arrives exactly XW/2/RB cycles after the clock edge that takes start,
// and busy is high meanwhile. A second instance deciding one root bit per
// cycle must give the same root in XW/2 cycles.
module tb_vb_sqrt;
  localparam int XW = vb_pkg::DEF_W + vb_pkg::DEF_F, N = XW / 2;
  localparam int NC = N / vb_pkg::DEF_RB;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [XW-1:0]   x;
  logic [XW/2-1:0] root;
  int checks = 0, failures = 0;

  logic            busy2, done2;
  logic [XW/2-1:0] root2;
  vb_sqrt dut (.clk, .rst_n, .start, .x, .busy, .done, .root);
  vb_sqrt #(.XW(XW), .RB(1)) dut2 (.clk, .rst_n, .start, .x, .busy(busy2),
                                   .done(done2), .root(root2));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [XW-1:0] v);
    int cyc = 0, cyc2;
    longint unsigned r, lo, hi;
    @(negedge clk);
    x = v; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;  // cycles after the edge that captured start
    while (!done) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL: busy low while working"); end
      @(negedge clk);
      cyc++;
    end
    cyc2 = cyc;
    while (!done2) begin @(negedge clk); cyc2++; end
    checks++;
    if (root2 != root) begin failures++; $display("FAIL: RB=1 root %0d vs %0d", root2, root); end
    checks++;
    if (cyc2 != N) begin failures++; $display("FAIL: RB=1 latency %0d", cyc2); end
    r  = longint'(root);
    lo = r * r;
    hi = (r + 1) * (r + 1);
    checks += 2;
    if (!(lo <= longint'(v) && longint'(v) < hi)) begin
      failures++;
      $display("FAIL: sqrt(%0d) gave %0d", v, r);
    end
    if (cyc != NC) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", cyc, NC);
    end
  endtask

  initial begin
    x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run('0); run(1); run('1); run(2); run(3); run(4);
    for (int i = 0; i < 100; i++) begin
      automatic longint unsigned s = {$urandom, $urandom} & ((64'd1 << (XW / 2)) - 1);
      run(XW'(s * s)); run(XW'(s * s - 1)); run(XW'(s * s + 1));
    end
    for (int i = 0; i < 300; i++) run(XW'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
