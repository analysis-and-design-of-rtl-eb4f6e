// tb_pingpong_buf: fills both banks with different data, then checks that
// each bank reads back its own data and that writing one bank leaves the
// other, being read, untouched.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_pingpong_buf;
  import mcadsw_pkg::*;
  logic clk = 0, wr = 0, wr_bank = 0, rd_bank = 0;
  logic [5:0] wr_idx = 0;
  logic [13:0] wr_data = 0;
  logic [13:0] rd_entries [48];
  logic [13:0] ref0 [48], ref1 [48];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pingpong_buf dut (.*);

  task automatic fill(input logic b, input int rounds);
    for (int k = 0; k < 48; k++) begin
      @(negedge clk);
      wr = 1; wr_bank = b; wr_idx = 6'(k); wr_data = 14'($urandom);
      if (b) ref1[k] = wr_data; else ref0[k] = wr_data;
    end
    @(negedge clk) wr = 0;
  endtask

  task automatic compare(input logic b);
    rd_bank = b;
    #1;
    for (int k = 0; k < 48; k++) begin
      checks++;
      if (rd_entries[k] != (b ? ref1[k] : ref0[k])) begin
        failures++;
        $display("ERROR bank %0d entry %0d: %0d", b, k, rd_entries[k]);
      end
    end
  endtask

  initial begin
    fill(0, 1); fill(1, 1);
    compare(0); compare(1);
    rd_bank = 1;
    fill(0, 2);           // write bank 0 while bank 1 is read
    compare(1); compare(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
