// pingpong_buf: two banks of ENTRIES vertical aggregated costs.
//
// The vertical pass writes the costs of one disparity into one bank, one
// entry per clock, while the horizontal pass reads the bank filled during
// the previous disparity; the banks swap every disparity.  The read side
// sees the whole selected bank at once, so the horizontal PE can take any 31
// consecutive entries in one clock.  48 entries per bank as in the original design
// (18 output pixels plus 30 window columns).
//
// Origin: two 48-entry banks between the passes follow the original; swapping
// banks once per disparity slot is this design's simplification.
module pingpong_buf
  import mcadsw_pkg::*;
#(
  parameter int unsigned ENTRIES = 48
) (
  input  logic                       clk,
  input  logic                       wr,
  input  logic                       wr_bank,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic [VCOST_W-1:0]         wr_data,
  input  logic                       rd_bank,
  output logic [VCOST_W-1:0]         rd_entries [ENTRIES]
);
  logic [VCOST_W-1:0] bank0 [ENTRIES];
  logic [VCOST_W-1:0] bank1 [ENTRIES];

  always_ff @(posedge clk)
    if (wr) begin
      if (wr_bank) bank1[wr_idx] <= wr_data;
      else         bank0[wr_idx] <= wr_data;
    end

  always_comb
    for (int k = 0; k < ENTRIES; k++)
      rd_entries[k] = rd_bank ? bank1[k] : bank0[k];
endmodule
