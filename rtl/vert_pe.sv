// vert_pe: first-pass (vertical) aggregation of one column at one disparity.
//
// For the 31 rows of a column it forms the census cost (Hamming distance of
// the left and right 6-bit codes, 0..6), shifts each cost left by the weight
// code of that row and adds the 31 terms.  The centre row always carries
// weight 64 (shift 6).  wcode[k] holds the code of row offset k-15 for k<15
// and k-14 for k>=15 (the centre is skipped), 90 bits in all.
// Purely combinational: one column per clock in the kernel.
//
// Origin: the weighted vertical sum without normalisation follows the
// original two-pass aggregation; the single combinational adder tree is this
// design's choice.
module vert_pe
  import mcadsw_pkg::*;
(
  input  logic [CEN_BITS-1:0] cen_l [WIN],
  input  logic [CEN_BITS-1:0] cen_r [WIN],
  input  logic [2:0]          wcode [WIN-1],
  output logic [VCOST_W-1:0]  vcost
);
  logic [2:0] ham [WIN];
  always_comb begin
    for (int j = 0; j < WIN; j++) begin
      ham[j] = '0;
      for (int b = 0; b < CEN_BITS; b++)
        ham[j] = ham[j] + 3'(cen_l[j][b] ^ cen_r[j][b]);
    end
    vcost = wshift_small(ham[HALF], 3'd6);
    for (int j = 0; j < WIN; j++) begin
      if (j < HALF)      vcost = vcost + wshift_small(ham[j], wcode[j]);
      else if (j > HALF) vcost = vcost + wshift_small(ham[j], wcode[j-1]);
    end
  end
endmodule
