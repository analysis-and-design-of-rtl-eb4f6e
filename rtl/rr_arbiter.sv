// rr_arbiter: hybrid fixed-priority / round-robin bus arbiter.
//
// Requester 0 (the depth FIFO) always wins: a full depth FIFO would stall
// the aggregation kernel.  Requesters 1..N-1 (the five image-buffer input
// controls) share the bus round-robin: the one granted becomes the lowest
// priority for the next decision and the requester after it becomes the
// highest.  A depth-FIFO grant leaves the rotation untouched, and a grant to
// the current lowest-priority requester leaves it as it was, as the original design
// describes.  A grant is issued, as a one-clock pulse, only while 'enable'
// (the memory controller is idle) is high; the rotation pointer updates on
// the same edge.
//
// Origin: fixed top priority for the depth FIFO and round robin with the
// granted requester becoming lowest follow the original, as does the initial
// order; not rotating on a depth-FIFO grant is this design's reading.
module rr_arbiter
  import mcadsw_pkg::*;
#(
  parameter int unsigned N = N_REQ
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  output logic         gnt_valid,
  output logic [$clog2(N)-1:0] gnt_id
);
  localparam int unsigned NR = N - 1;      // round-robin requesters
  logic [$clog2(N)-1:0] top_q;             // highest round-robin priority (1..N-1)

  always_comb begin
    int unsigned idx;
    idx       = 0;
    gnt       = '0;
    gnt_valid = 1'b0;
    gnt_id    = '0;
    if (enable) begin
      if (req[0]) begin
        gnt[0]    = 1'b1;
        gnt_valid = 1'b1;
      end else begin
        for (int k = 0; k < NR; k++) begin
          idx = 1 + ((int'(top_q) - 1 + k) % NR);
          if (!gnt_valid && req[idx]) begin
            gnt[idx]  = 1'b1;
            gnt_valid = 1'b1;
            gnt_id    = idx[$clog2(N)-1:0];
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      top_q <= 1;
    else if (gnt_valid && gnt_id != 0)
      top_q <= (gnt_id == NR[$clog2(N)-1:0]) ? 1 : gnt_id + 1'b1;
  end

  // Exactly one requester is granted at a time.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                             $onehot0(gnt));
endmodule
