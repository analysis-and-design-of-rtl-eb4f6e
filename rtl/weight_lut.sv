// weight_lut: adaptive support weight of one neighbour.
//
// Computes the Manhattan colour distance |dY|+|dU|+|dV| between a window
// centre and a neighbour and maps it through the quantised exponential table
// (scaling factor 64, one preserved MSB) to a 3-bit shift code: 6..0 mean
// weights 64..1, 7 means weight 0 for distances of 30 and more.  The table
// rows follow the original design; the zero weight beyond the table is this design's
// choice.  Purely combinational.
//
// Origin: Manhattan YUV distance and the quantised weight table follow the
// original method; weight 0 from distance 30 on is this design's choice.
module weight_lut
  import mcadsw_pkg::*;
(
  input  logic [PIX_W-1:0] c_y, c_u, c_v,   // centre pixel
  input  logic [PIX_W-1:0] n_y, n_u, n_v,   // neighbour pixel
  output logic [9:0]       cdist,
  output logic [2:0]       code
);
  always_comb begin
    cdist = abs_diff(c_y, n_y) + abs_diff(c_u, n_u) + abs_diff(c_v, n_v);
    code = weight_code(cdist);
  end
endmodule
