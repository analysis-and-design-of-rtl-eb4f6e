// tb_wta: random disparity sweeps for 18 pixels (including repeated
// minima, so ties must keep the first disparity), checking the winning
// disparity and the depth = 4 * disparity, then a 'clear' restart.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_wta;
  import mcadsw_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [4:0] idx;
  logic [5:0] disp;
  logic [24:0] cost;
  logic [5:0] best_disp [18];
  logic [7:0] depth [18];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  wta dut (.*);

  task automatic sweep(input int seed_mode);
    int bc [18], bd [18];
    for (int k = 0; k < 18; k++) begin bc[k] = 32'h7fffffff; bd[k] = 0; end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int d = 0; d < 64; d++)
      for (int k = 0; k < 18; k++) begin
        int c;
        c = (seed_mode == 0) ? $urandom_range(0, 1000) : $urandom_range(0, 5);
        valid = 1; idx = 5'(k); disp = 6'(d); cost = 25'(c);
        if (c < bc[k]) begin bc[k] = c; bd[k] = d; end
        @(negedge clk);
      end
    valid = 0;
    @(negedge clk);
    for (int k = 0; k < 18; k++) begin
      checks++;
      if (best_disp[k] != 6'(bd[k]) || depth[k] != 8'(bd[k] * 4)) begin
        failures++;
        $display("ERROR pixel %0d: disparity %0d depth %0d, expected %0d", k, best_disp[k], depth[k], bd[k]);
      end
    end
  endtask

  initial begin
    valid = 0; idx = 0; disp = 0; cost = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    sweep(0); sweep(1); sweep(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
