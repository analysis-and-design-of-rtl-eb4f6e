// col_update_ctrl: update table of a column-based cyclic buffer.
//
// A buffer of DEPTH column slots is filled in column order by a producer
// and read by a consumer that slides rightwards.  The table keeps one
// active bit per slot.  The set pointer names the next column to be
// written: its slot may be written only while inactive ('can_set'), and
// 'set' marks it active and advances.  The clear pointer names the oldest
// live column: while it lies below the consumer's 'release_col' (and below
// the set pointer) its slot is cleared, one per clock, and it advances.
// 'start' empties the table and restarts both pointers at column 0.
// Columns are counted absolutely (0, 1, 2, ...); slot = column mod DEPTH.
//
// Origin: the active-bit update table with set and clear pointers follows
// the original; clearing one column per clock is this design's choice.
module col_update_ctrl #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned COL_W = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    set,
  input  logic signed [COL_W:0]   release_col,   // columns below may go
  output logic                    can_set,
  output logic [COL_W-1:0]        set_col,       // next column to write
  output logic [$clog2(DEPTH)-1:0] set_slot,
  output logic [COL_W-1:0]        clr_col        // oldest live column
);
  localparam int unsigned SW = $clog2(DEPTH);
  logic [DEPTH-1:0] active;
  logic [SW-1:0]    clr_slot;
  logic             do_clr;

  assign can_set = !active[set_slot];
  assign do_clr  = (signed'({1'b0, clr_col}) < release_col) && (clr_col < set_col);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0; set_col <= '0; clr_col <= '0; set_slot <= '0; clr_slot <= '0;
    end else if (start) begin
      active <= '0; set_col <= '0; clr_col <= '0; set_slot <= '0; clr_slot <= '0;
    end else begin
      if (set && can_set) begin
        active[set_slot] <= 1'b1;
        set_col  <= set_col + 1'b1;
        set_slot <= (set_slot == SW'(DEPTH - 1)) ? '0 : set_slot + 1'b1;
      end
      if (do_clr) begin
        active[clr_slot] <= 1'b0;
        clr_col  <= clr_col + 1'b1;
        clr_slot <= (clr_slot == SW'(DEPTH - 1)) ? '0 : clr_slot + 1'b1;
      end
    end
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(set && !can_set && !start));
endmodule
