// tb_mcadsw_latency: bus access latency sweep of the stereo engine.  The
// same 52x8 frame (three segments per row, 16 disparities) is run eight
// times with the external memory answering after 1, 2, ... 8 clocks; every
// run's depth map is checked byte by byte against the reference model, and
// the cycle count of each run must grow with the latency.  The cycle counts
// printed per latency give the engine's execution-time curve.  The memory
// also refuses access for 1500 of every 2003 clocks, which makes the depth
// FIFO fill at least once.
//
// The rules checked are those of the original architecture; the sizes,
// the latency range, stimuli and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_mcadsw_latency;
  import mcadsw_pkg::*;
  localparam int W = 52, H = 8, DISP = 16;
  logic clk, rst_n, start, busy, done, bus_req, bus_we, bus_ack, stall_wait, stall_fifo;
  logic [ADDR_W-1:0] base_ly, base_ry, base_lu, base_lv, base_depth, bus_addr;
  logic [3:0] bus_be;
  logic [BUS_W-1:0] bus_wdata, bus_rdata;
  logic [N_REQ-1:0] grant;

  mcadsw_top #(.W(W), .H(H), .DISP(DISP)) dut (.*);
  mcadsw_tb_env #(.W(W), .H(H), .DISP(DISP), .LAT(1), .LAT_STEPS(8), .LAT_INC(1),
                  .PAUSE_EVERY(2003), .PAUSE_LEN(1500), .MAX_CYCLES(6_000_000)) env (.*, .req_probe(dut.req));

  // outer watchdog, behind the environment's own
  initial begin
    repeat (7_000_000) @(posedge clk);
    $display("ERROR: outer watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
