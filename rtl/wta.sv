// wta: winner-takes-all over the disparity sweep of one segment.
//
// Keeps, for each of SEG pixels, the smallest aggregated cost seen so far
// and the disparity that produced it.  'clear' starts a new sweep; each
// 'valid' cycle offers the cost of pixel 'idx' at disparity 'disp', which
// replaces the stored minimum only when strictly smaller (ties keep the
// lower disparity, which is offered first).  The depth output is the
// disparity shifted left by DSHIFT so that 0..63 spans the 8-bit luminance
// range.  Result registers update one clock after 'valid'.
//
// Origin: strict-minimum replacement and depth scaled to the pixel range
// follow the original; the shift by 2 (64 levels to 0..252) is this design's
// choice.
module wta
  import mcadsw_pkg::*;
#(
  parameter int unsigned SEG    = 18,
  parameter int unsigned DISP   = 64,
  parameter int unsigned DSHIFT = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        valid,
  input  logic [$clog2(SEG)-1:0]      idx,
  input  logic [$clog2(DISP)-1:0]     disp,
  input  logic [HCOST_W-1:0]          cost,
  output logic [$clog2(DISP)-1:0]     best_disp [SEG],
  output logic [PIX_W-1:0]            depth     [SEG]
);
  logic [HCOST_W-1:0] best_cost [SEG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < SEG; k++) begin
        best_cost[k] <= '1;
        best_disp[k] <= '0;
      end
    end else if (clear) begin
      for (int k = 0; k < SEG; k++) begin
        best_cost[k] <= '1;
        best_disp[k] <= '0;
      end
    end else if (valid && (cost < best_cost[idx])) begin
      best_cost[idx] <= cost;
      best_disp[idx] <= disp;
    end
  end

  always_comb
    for (int k = 0; k < SEG; k++)
      depth[k] = PIX_W'(best_disp[k]) << DSHIFT;
endmodule
