// vb_pkg: constants and types shared by the Viterbo-Boutros (VB) MIMO decoder.
//
// The default sizes describe the main configuration: a 4x4 MIMO link with
// 16-QAM, decoded as two real-valued 4-dimensional lattice searches (one for
// the in-phase parts, one for the quadrature parts). Each real dimension
// carries a 4-level PAM symbol, searched as an integer index u in 0..3
// (symbol level 2u-3). Numbers are two's complement fixed point with
// DEF_F fraction bits in DEF_W-bit words. 40/20 bits keep the search equal
// to exact maximum-likelihood detection even on nearly singular channels,
// where the zero-forcing estimate reaches thousands; 32/12 bits were seen
// to lose about one vector in a thousand at 15 dB. The word format and the
// square-root speed are choices of this design; the antenna count and the
// modulation follow the source design.
package vb_pkg;
  localparam int unsigned DEF_M    = 4;   // antennas = real lattice dimension
  localparam int unsigned DEF_W    = 40;  // fixed-point word width
  localparam int unsigned DEF_F    = 20;  // fraction bits
  localparam int unsigned DEF_UMAX = 3;   // largest PAM index per dimension
  localparam int unsigned DEF_UW   = 4;   // signed width of an index/bound
  localparam int unsigned DEF_RB   = 2;   // square-root bits per cycle

  // States of the search controller. S_A..S_D are the four states of the
  // VB search; step 2 (the index upgrade) is folded into the other states.
  typedef enum logic [2:0] {
    S_IDLE = 3'd0,
    S_D    = 3'd1,  // compute bounds of the current layer (square root)
    S_A    = 3'd2,  // expand to the next lower layer
    S_B    = 3'd3,  // full point reached: distance and compare
    S_C    = 3'd4,  // bound exceeded: step one layer up or stop
    S_DONE = 3'd5
  } vb_state_e;
endpackage
