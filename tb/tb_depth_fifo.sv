// tb_depth_fifo: pushes depth bytes with byte addresses while grants pop at
// random, checking order, word address, byte enable and byte lane of every
// popped word, that 'full' rises at 18 entries and that a push while full
// is not taken by the kernel (the testbench obeys 'full').
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_depth_fifo;
  import mcadsw_pkg::*;
  logic clk = 0, rst_n = 0, push = 0, full, req, gnt = 0;
  logic [25:0] push_baddr = 0;
  logic [7:0]  push_depth = 0;
  wr_cmd_t     wr_cmd;
  logic [4:0]  level;
  int checks = 0, failures = 0, n_full = 0;
  logic [25:0] qa [$];
  logic [7:0]  qd [$];
  always #5 clk = ~clk;
  depth_fifo dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (gnt && req) begin
      logic [25:0] a; logic [7:0] d;
      a = qa.pop_front(); d = qd.pop_front();
      checks++;
      if (wr_cmd.addr != a[25:2] || wr_cmd.be != (4'b1 << a[1:0]) ||
          wr_cmd.data[8*a[1:0] +: 8] != d) begin
        failures++;
        $display("ERROR pop: addr %0h be %b data %h, expected byte %0h = %h", wr_cmd.addr, wr_cmd.be, wr_cmd.data, a, d);
      end
    end
    if (push && !full) begin qa.push_back(push_baddr); qd.push_back(push_depth); end
    if (full) n_full++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      push = (t < 300 || t > 600) ? ($urandom_range(0, 3) != 0) && !full : 1'b0;
      push_baddr = 26'($urandom);
      push_depth = 8'($urandom);
      gnt = (t > 100) && req && ($urandom_range(0, 3) == 0);
    end
    push = 0;
    while (req) begin @(negedge clk); gnt = 1; end
    gnt = 0;
    @(negedge clk);
    checks++;
    if (n_full == 0) begin failures++; $display("ERROR: FIFO never became full"); end
    checks++;
    if (qa.size() != 0 || level != 0) begin failures++; $display("ERROR: %0d entries left", qa.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
