// tb_mcadsw_top: end-to-end test of the stereo engine on a small frame
// (36x8 pixels, two segments per row, 8 disparities, bus latency 3), with
// every depth byte checked against the reference model.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_mcadsw_top;
  import mcadsw_pkg::*;
  localparam int W = 36, H = 8, DISP = 8;
  logic clk, rst_n, start, busy, done, bus_req, bus_we, bus_ack, stall_wait, stall_fifo;
  logic [ADDR_W-1:0] base_ly, base_ry, base_lu, base_lv, base_depth, bus_addr;
  logic [3:0] bus_be;
  logic [BUS_W-1:0] bus_wdata, bus_rdata;
  logic [N_REQ-1:0] grant;

  mcadsw_top #(.W(W), .H(H), .DISP(DISP)) dut (.*);
  mcadsw_tb_env #(.W(W), .H(H), .DISP(DISP), .LAT(3), .MAX_CYCLES(400_000)) env (.*, .req_probe(dut.req));
endmodule
