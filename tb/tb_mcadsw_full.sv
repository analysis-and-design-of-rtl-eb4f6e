// tb_mcadsw_full: one complete CIF frame (352x288, 64 disparities) through
// the stereo engine at its default parameters, every depth byte checked
// against the reference model.  Bus latency 2 clocks.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_mcadsw_full;
  import mcadsw_pkg::*;
  logic clk, rst_n, start, busy, done, bus_req, bus_we, bus_ack, stall_wait, stall_fifo;
  logic [ADDR_W-1:0] base_ly, base_ry, base_lu, base_lv, base_depth, bus_addr;
  logic [3:0] bus_be;
  logic [BUS_W-1:0] bus_wdata, bus_rdata;
  logic [N_REQ-1:0] grant;

  mcadsw_top dut (.*);
  mcadsw_tb_env #(.W(352), .H(288), .DISP(64), .LAT(2), .MAX_CYCLES(40_000_000),
                  .PAUSE_EVERY(9973), .PAUSE_LEN(3500))
    env (.*, .req_probe(dut.req));
endmodule
