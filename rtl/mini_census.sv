// mini_census: the mini-census transform of one pixel.
//
// Six sample pixels of the 5x5 window are compared with the centre pixel;
// bit k is 0 when sample k is brighter than the centre and 1 otherwise, as in
// the classic census labelling.  Sample order (row offset, column offset):
// k0 (-2,-2), k1 (-2,+2), k2 (0,-2), k3 (0,+2), k4 (+2,-2), k5 (+2,+2).
// The caller gathers the samples; which six positions are used is this
// design's choice.  Purely combinational.
//
// Origin: the 6-bit transform of 7 pixels in a 5x5 window and the labelling
// (brighter than the centre -> 0) follow the original method; the exact sample
// positions are this design's choice.
module mini_census
  import mcadsw_pkg::*;
(
  input  logic [PIX_W-1:0]    center,
  input  logic [PIX_W-1:0]    sample [CEN_BITS],
  output logic [CEN_BITS-1:0] code
);
  always_comb begin
    for (int k = 0; k < CEN_BITS; k++)
      code[k] = (sample[k] > center) ? 1'b0 : 1'b1;
  end
endmodule
