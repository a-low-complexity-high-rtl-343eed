// vb_fsm: controller of the VB closest-point search.
//
// Holds the search state and the current layer k (0-based: layer M-1 is
// searched first, layer 0 last) and issues one strobe per register update
// to the datapath in vb_core. Transitions, following the VB steps:
//   IDLE --start--> D          (k = M-1, T = C: initial bounds)
//   D  --d_done--> C if the interval is empty, else A if k > 0, else B
//   A  ------> D                (k = k-1, new S and T)
//   B  better point: record it, shrink the radius, k = M-1 -> D
//      otherwise u_0 = u_0 + 1 -> C if u_0 passes L_0, else B again
//   C  k = M-1: -> DONE; else k = k+1, u_k = u_k + 1 -> C if u_k passes
//      L_k, else A
//   DONE -> IDLE (done is high for this one cycle)
// Step 2 of VB (upgrade u_i and test it against L_i) costs no cycle of its
// own: it is carried out together with the state that precedes it (D hands
// over its lower bound as the first candidate, B and C increment and test
// in the same cycle). This overlap of steps is the state-level parallelism
// of the source design; exactly how the steps overlap is this design's
// choice. d_start is a one-cycle pulse in the first cycle of every visit to
// D. The strobes are combinational outputs of the current state and inputs.
module vb_fsm
  import vb_pkg::*;
#(
  parameter int unsigned M = vb_pkg::DEF_M
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  d_done,   // state D unit finished
  input  logic                  d_empty,  // its interval is empty
  input  logic                  better,   // state B: d_new < d_best
  input  logic                  over_u0,  // u_0 + 1 > L_0
  input  logic                  over_up,  // u_{k+1} + 1 > L_{k+1}
  output vb_state_e             state,
  output logic [$clog2(M)-1:0]  k,
  output logic                  init,     // latch inputs, k = M-1, T = C
  output logic                  d_start,
  output logic                  ld_d,     // u_k = lo, L_k = hi
  output logic                  a_go,     // S,T of layer k-1; k = k-1
  output logic                  b_accept, // record point, shrink radius
  output logic                  b_inc,    // u_0 = u_0 + 1
  output logic                  c_up,     // k = k+1, u_k = u_k + 1
  output logic                  ready,
  output logic                  done
);
  localparam logic [$clog2(M)-1:0] KTOP = $clog2(M)'(M - 1);

  vb_state_e            nxt;
  logic [$clog2(M)-1:0] k_nxt;

  always_comb begin
    nxt      = state;
    k_nxt    = k;
    init     = 1'b0;
    ld_d     = 1'b0;
    a_go     = 1'b0;
    b_accept = 1'b0;
    b_inc    = 1'b0;
    c_up     = 1'b0;
    unique case (state)
      S_IDLE: if (start) begin
        init  = 1'b1;
        k_nxt = KTOP;
        nxt   = S_D;
      end
      S_D: if (d_done) begin
        ld_d = 1'b1;
        if (d_empty)     nxt = S_C;
        else if (k != 0) nxt = S_A;
        else             nxt = S_B;
      end
      S_A: begin
        a_go  = 1'b1;
        k_nxt = k - 1'b1;
        nxt   = S_D;
      end
      S_B: if (better) begin
        b_accept = 1'b1;
        k_nxt    = KTOP;
        nxt      = S_D;
      end else begin
        b_inc = 1'b1;
        nxt   = over_u0 ? S_C : S_B;
      end
      S_C: if (k == KTOP) begin
        nxt = S_DONE;
      end else begin
        c_up  = 1'b1;
        k_nxt = k + 1'b1;
        nxt   = over_up ? S_C : S_A;
      end
      S_DONE:  nxt = S_IDLE;
      default: nxt = S_IDLE;
    endcase
  end

  always_comb begin
    ready = (state == S_IDLE);
    done  = (state == S_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      k       <= '0;
      d_start <= 1'b0;
    end else begin
      state   <= nxt;
      k       <= k_nxt;
      d_start <= (nxt == S_D) && (state != S_D);
    end
  end

  // state B is only ever entered on the last layer, state A never on it
  a_b_layer0: assert property (@(posedge clk) disable iff (!rst_n)
                               (state == S_B) |-> (k == 0));
  a_a_layer:  assert property (@(posedge clk) disable iff (!rst_n)
                               (state == S_A) |-> (k != 0));
endmodule
