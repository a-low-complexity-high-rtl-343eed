// vb_sqrt: sequential integer square root, root = floor(sqrt(x)).
//
// Digit-by-digit (restoring) method: each step brings down the next two
// bits of the radicand into the partial remainder and decides one bit of
// the root. RB steps are chained in one clock cycle, so a result takes
// XW/2/RB cycles (RB must divide XW/2); RB = 1 gives the shortest path.
// This is the square root that the bound computation (state D) of the VB
// search needs; the source design names the need for it but not its
// structure, so the algorithm and RB are this design's choices.
// Interface: pulse start for one cycle with x valid (x is captured then).
// busy is high while working; done pulses for one cycle XW/2/RB cycles
// after the edge that takes start, and root holds its value until the
// next start. A start while busy is ignored.
module vb_sqrt #(
  parameter int unsigned XW = vb_pkg::DEF_W + vb_pkg::DEF_F,  // radicand width, even
  parameter int unsigned RB = vb_pkg::DEF_RB                  // root bits per cycle
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [XW-1:0]     x,
  output logic              busy,
  output logic              done,
  output logic [XW/2-1:0]   root
);
  localparam int unsigned N  = XW / 2;
  localparam int unsigned NC = N / RB;           // cycles per result
  localparam int unsigned CW = $clog2(NC + 1);

  logic [XW-1:0]  rad;     // radicand bits not yet brought down
  logic [N-1:0]   rem;     // partial remainder (the final one is not kept)
  logic [CW-1:0]  cnt;

  // RB chained digit steps
  logic [XW-1:0] rad_n;
  logic [N-1:0]  rem_n, root_n;
  always_comb begin
    logic [N+1:0] rem_sh, trial;
    rad_n  = rad;
    rem_n  = rem;
    root_n = root;
    for (int s = 0; s < int'(RB); s++) begin
      rem_sh = {rem_n, rad_n[XW-1 -: 2]};
      trial  = {root_n, 2'b01};
      rad_n  = rad_n << 2;
      if (rem_sh >= trial) begin
        rem_n  = N'(rem_sh - trial);
        root_n = {root_n[N-2:0], 1'b1};
      end else begin
        rem_n  = N'(rem_sh);
        root_n = {root_n[N-2:0], 1'b0};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad  <= '0;
      rem  <= '0;
      root <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rad  <= x;
        rem  <= '0;
        root <= '0;
        cnt  <= CW'(NC);
        busy <= 1'b1;
      end else if (busy) begin
        rad  <= rad_n;
        rem  <= rem_n;
        root <= root_n;
        cnt  <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  if (N % RB != 0) begin : g_bad_rb
    $error("vb_sqrt: RB must divide XW/2");
  end
endmodule
