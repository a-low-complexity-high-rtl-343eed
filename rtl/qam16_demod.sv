// qam16_demod: 16-QAM hard demodulator by minimum Euclidean distance.
//
// The received symbol (rx_i, rx_q) is a signed fixed-point pair with F
// fraction bits. For each axis the squared distance to every one of the
// four PAM levels {-3,-1,+1,+3} is computed and the closest level wins
// (ties go to the lower level); since the axes are independent this equals
// the nearest of the 16 constellation points. The winning levels are turned
// back into bits with the Gray map of qam16_mod (bits[3:2] in-phase,
// bits[1:0] quadrature). The minimum-distance decision follows the source
// design; the Gray map and the number format are this design's choices.
// Combinational.
module qam16_demod #(
  parameter int unsigned W = vb_pkg::DEF_W,
  parameter int unsigned F = vb_pkg::DEF_F
) (
  input  logic signed [W-1:0] rx_i,
  input  logic signed [W-1:0] rx_q,
  output logic [3:0]          bits
);
  // Gray code of level index 0..3 (levels -3,-1,+1,+3)
  localparam logic [1:0] GRAY [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  function automatic logic [1:0] decide(input logic signed [W-1:0] x);
    logic signed [W+1:0]   diff;
    logic        [2*W+3:0] dsq, best;
    logic        [1:0]     idx;
    best = '1;
    idx  = 2'd0;
    for (int l = 0; l < 4; l++) begin
      diff = (W+2)'(x) - ((W+2)'(2*l - 3) <<< F);
      dsq = (2*W+4)'(diff * diff);
      if (dsq < best) begin
        best = dsq;
        idx  = 2'(l);
      end
    end
    return GRAY[idx];
  endfunction

  always_comb begin
    bits[3:2] = decide(rx_i);
    bits[1:0] = decide(rx_q);
  end
endmodule
