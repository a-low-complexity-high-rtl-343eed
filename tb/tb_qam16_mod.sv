// tb_qam16_mod: exhaustive check of the 16-QAM mapper.
//
// For all 16 inputs, each 2-bit half is Gray decoded independently
// (index = {b1, b1 ^ b0}, level = 2 index - 3) and compared with the
// mapper's in-phase and quadrature levels. Also checks that neighbouring
// levels on each axis differ in exactly one bit.
module tb_qam16_mod;
  logic [3:0]        bits;
  logic signed [2:0] sym_i, sym_q;
  int checks = 0, failures = 0;

  qam16_mod dut (.bits, .sym_i, .sym_q);

  function automatic int ref_level(logic [1:0] b);
    int idx = int'({b[1], b[1] ^ b[0]});
    return 2 * idx - 3;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] code_at [int];
    for (int v = 0; v < 16; v++) begin
      bits = 4'(v);
      #1;
      checks++;
      if (int'(sym_i) != ref_level(bits[3:2]) || int'(sym_q) != ref_level(bits[1:0])) begin
        failures++;
        $display("FAIL: bits %b -> (%0d,%0d)", bits, sym_i, sym_q);
      end
      code_at[int'(sym_q)] = bits[1:0];
    end
    for (int l = -3; l < 3; l += 2) begin
      checks++;
      if ($countones(code_at[l] ^ code_at[l + 2]) != 1) begin
        failures++;
        $display("FAIL: levels %0d and %0d not Gray neighbours", l, l + 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
