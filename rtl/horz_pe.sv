// horz_pe: second-pass (horizontal) aggregation of one pixel at one disparity.
//
// Adds the 31 vertical aggregated costs of columns x-15..x+15, each shifted
// left by the horizontal weight code of that column relative to pixel x; the
// centre column carries weight 64.  wcode uses the same centre-skipping order
// as vert_pe.  Purely combinational.
//
// Origin: the weighted horizontal sum over the vertical costs follows the
// original two-pass aggregation; one result per clock is this design's choice.
module horz_pe
  import mcadsw_pkg::*;
(
  input  logic [VCOST_W-1:0] vcost [WIN],
  input  logic [2:0]         wcode [WIN-1],
  output logic [HCOST_W-1:0] hcost
);
  always_comb begin
    hcost = wshift_big(vcost[HALF], 3'd6);
    for (int i = 0; i < WIN; i++) begin
      if (i < HALF)      hcost = hcost + wshift_big(vcost[i], wcode[i]);
      else if (i > HALF) hcost = hcost + wshift_big(vcost[i], wcode[i-1]);
    end
  end
endmodule
