// mcadsw_pkg: constants and small functions shared by the mini-census
// adaptive-support-weight (MCADSW) stereo engine.
//
// Frame geometry, window sizes and the quantised weight law
// live here so every block and testbench uses one definition.
//  * Image 352x288 (CIF), 64 disparities, 31-tap vertical and horizontal
//    aggregation windows, 6-bit mini-census codes, 32-bit bus.
//  * A weight is coded as a 3-bit shift amount: 64,32,16,8,4,2,1 are codes
//    6..0.  Code 7 stands for weight 0 (colour distance of 30 and above),
//    which is this design's reading of the quantised exponential below 1.
//  * The mini-census compares six pixels of a 5x5 window with its centre.
//    The six positions (corners and left/right middles) are this design's
//    choice; the label is 0 when a pixel is brighter than the centre, else 1.
//
// Origin: the sizes (31-pixel window, 6-bit mini-census, 32-bit bus) and the
// weight table (distances 0,1-4,5-9,...,25-29 -> 64,32,...,1) are those of the
// original architecture; distance 30 and beyond giving weight 0, the shift
// encoding values and the command structs are this design's choices.
package mcadsw_pkg;

  localparam int unsigned BUS_W    = 32;   // bus data width
  localparam int unsigned ADDR_W   = 24;   // bus word-address width
  localparam int unsigned PIX_W    = 8;    // bits per colour component
  localparam int unsigned CEN_BITS = 6;    // mini-census code width
  localparam int unsigned WIN      = 31;   // aggregation window taps
  localparam int unsigned HALF     = 15;   // (WIN-1)/2
  localparam int unsigned CEN_R    = 2;    // census window radius (5x5)
  localparam int unsigned WCODE_W  = 3;    // weight code width
  localparam int unsigned WROW_W   = (WIN - 1) * WCODE_W;   // 90 bits
  localparam int unsigned VCOST_W  = 14;   // vertical aggregated cost width
  localparam int unsigned HCOST_W  = 25;   // horizontal aggregated cost width
  localparam logic [2:0]  WCODE_ZERO = 3'd7;

  // Requesters of the shared bus, highest fixed priority first.
  typedef enum logic [2:0] {
    RQ_DEPTH  = 3'd0,   // depth FIFO (writes)
    RQ_CEN_LY = 3'd1,   // census L, left Y
    RQ_CEN_RY = 3'd2,   // census R, right Y
    RQ_WGT_LY = 3'd3,   // weight generation, left Y
    RQ_WGT_LU = 3'd4,   // weight generation, left U
    RQ_WGT_LV = 3'd5    // weight generation, left V
  } req_id_e;
  localparam int unsigned N_REQ = 6;
  localparam int unsigned CNT_W = 7;    // words per read burst

  // A read burst: 'count' words at base, base+stride, ...
  typedef struct packed {
    logic [ADDR_W-1:0] base;
    logic [ADDR_W-1:0] stride;
    logic [CNT_W-1:0]  count;
  } rd_cmd_t;

  // One write word with byte enables.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [3:0]        be;
    logic [BUS_W-1:0]  data;
  } wr_cmd_t;

  // Quantised weight exp(-D/gamma)*64 (one preserved MSB, scaling factor 64) as shift codes.
  function automatic logic [2:0] weight_code(input logic [9:0] cdist);
    if (cdist == 10'd0)       return 3'd6;   // 64
    else if (cdist <= 10'd4)  return 3'd5;   // 32
    else if (cdist <= 10'd9)  return 3'd4;   // 16
    else if (cdist <= 10'd14) return 3'd3;   // 8
    else if (cdist <= 10'd19) return 3'd2;   // 4
    else if (cdist <= 10'd24) return 3'd1;   // 2
    else if (cdist <= 10'd29) return 3'd0;   // 1
    else                     return WCODE_ZERO;
  endfunction

  // Cost shifted by a weight code (code 7 gives zero).
  function automatic logic [VCOST_W-1:0] wshift_small(input logic [2:0] cost,
                                                      input logic [2:0] code);
    if (code == WCODE_ZERO) return '0;
    return VCOST_W'(cost) << code;
  endfunction

  function automatic logic [HCOST_W-1:0] wshift_big(input logic [VCOST_W-1:0] cost,
                                                    input logic [2:0] code);
    if (code == WCODE_ZERO) return '0;
    return HCOST_W'(cost) << code;
  endfunction

  function automatic logic [9:0] abs_diff(input logic [7:0] a, input logic [7:0] b);
    return (a > b) ? 10'(a - b) : 10'(b - a);
  endfunction

endpackage
