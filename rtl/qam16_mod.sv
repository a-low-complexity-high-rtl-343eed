// qam16_mod: 16-QAM symbol mapper, 4 bits in, one complex symbol out.
//
// bits[3:2] select the in-phase level and bits[1:0] the quadrature level,
// each Gray coded onto the 4-PAM levels {-3,-1,+1,+3}:
//   00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3
// so that neighbouring levels differ in one bit. The 4-bit input and the
// I/Q output follow the source design; the bit order and the Gray map are
// this design's choice. Purely combinational: the symbol follows the bits
// in the same cycle. Levels are small signed integers (3 bits).
module qam16_mod (
  input  logic [3:0]        bits,
  output logic signed [2:0] sym_i,
  output logic signed [2:0] sym_q
);
  function automatic logic signed [2:0] gray_level(input logic [1:0] b);
    unique case (b)
      2'b00:   return -3'sd3;
      2'b01:   return -3'sd1;
      2'b11:   return  3'sd1;
      default: return  3'sd3;  // 2'b10
    endcase
  endfunction

  always_comb begin
    sym_i = gray_level(bits[3:2]);
    sym_q = gray_level(bits[1:0]);
  end
endmodule
