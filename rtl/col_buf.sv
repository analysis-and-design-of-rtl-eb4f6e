// col_buf: column-based cyclic buffer (CENLBUF, CENRBUF, VWBUF, HWBUF).
//
// DEPTH slots of WIDTH bits, one slot per image column, managed by a
// col_update_ctrl update table.  The producer writes columns strictly in
// order with 'wr' while 'can_wr' is high; 'avail' is the number of columns
// written since 'start' (columns below it, and not yet released, are
// readable).  The consumer reads any live column combinationally through
// rd_col (slot = column mod DEPTH) and frees old columns by raising
// release_col.  For the census buffers a slot holds the 31 six-bit codes of
// a column (186 bits); for the weight buffers it holds 30 three-bit weight
// codes (90 bits).
//
// Origin: column-based cyclic buffers guarded by an update table follow the
// original, with its depths (64, 128, 96 columns); one whole column per slot
// and a combinational read are this design's choices.
module col_buf #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 186,
  parameter int unsigned COL_W = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  wr,
  input  logic [WIDTH-1:0]      wr_data,
  output logic                  can_wr,
  output logic [COL_W-1:0]      avail,
  input  logic signed [COL_W:0] release_col,
  input  logic [COL_W-1:0]      rd_col,
  output logic [WIDTH-1:0]      rd_data
);
  localparam int unsigned SW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [SW-1:0]    set_slot;
  logic [COL_W-1:0] clr_col;

  col_update_ctrl #(.DEPTH(DEPTH), .COL_W(COL_W)) u_ctrl (
    .clk, .rst_n, .start, .set(wr), .release_col,
    .can_set(can_wr), .set_col(avail), .set_slot, .clr_col
  );

  always_ff @(posedge clk)
    if (wr && can_wr && !start) mem[set_slot] <= wr_data;

  assign rd_data = mem[SW'(rd_col % COL_W'(DEPTH))];
endmodule
