// depth_fifo: output FIFO between the winner-takes-all stage and the bus.
//
// Holds DEPTH entries, each an 8-bit depth value together with the byte
// address it goes to in external memory.  The kernel pushes with 'push'
// (ignored when full, so the kernel must check 'full' and stall); the bus
// side follows request-grant: 'req' is high while the FIFO holds data and
// each one-clock 'gnt' pops one entry, which the memory controller writes
// with the matching byte enable.  Depth 18 follows the original design's 1x18
// depth buffer.
//
// Origin: an 18-entry output FIFO with request-grant towards the bus follows
// the original; per-entry byte addresses and byte enables are this design's
// choice.
module depth_fifo
  import mcadsw_pkg::*;
#(
  parameter int unsigned DEPTH = 18
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [ADDR_W+1:0]      push_baddr,   // byte address
  input  logic [PIX_W-1:0]       push_depth,
  output logic                   full,
  output logic                   req,
  input  logic                   gnt,
  output wr_cmd_t                wr_cmd,       // word to write on gnt
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned PW = $clog2(DEPTH);
  logic [ADDR_W+1:0] mem_a [DEPTH];
  logic [PIX_W-1:0]  mem_d [DEPTH];
  logic [PW-1:0]     wp, rp;

  assign full = (level == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign req  = (level != 0);

  always_comb begin
    logic [1:0] lane;
    lane        = mem_a[rp][1:0];
    wr_cmd.addr = mem_a[rp][ADDR_W+1:2];
    wr_cmd.be   = 4'b0001 << lane;
    wr_cmd.data = BUS_W'(mem_d[rp]) << (8 * lane);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0;
    end else begin
      logic do_push, do_pop;
      do_push = push && !full;
      do_pop  = gnt && req;
      if (do_push) begin
        mem_a[wp] <= push_baddr;
        mem_d[wp] <= push_depth;
        wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (do_pop)
        rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + (do_push ? 1'b1 : 1'b0) - (do_pop ? 1'b1 : 1'b0);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(push && full));
endmodule
