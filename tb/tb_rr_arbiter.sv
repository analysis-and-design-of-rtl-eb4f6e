// tb_rr_arbiter: first replays the grant sequence of a worked
// priority-rotation example (IMGLY, then WEIGHT IMGLU, then CENSUS IMGLY,
// then the depth FIFO), checking the order after each grant; then random
// request patterns against a list-based model: depth FIFO first, otherwise
// the first requester in the rotating order, which then moves to the end.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_rr_arbiter;
  import mcadsw_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [5:0] req = 0, gnt;
  logic gnt_valid;
  logic [2:0] gnt_id;
  int order [5] = '{1, 2, 3, 4, 5};
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rr_arbiter dut (.*);

  task automatic step(input logic [5:0] r, input logic en);
    int exp_id;
    @(negedge clk);
    req = r; enable = en;
    #1;
    exp_id = -1;
    if (en) begin
      if (r[0]) exp_id = 0;
      else for (int k = 0; k < 5; k++) if (exp_id < 0 && r[order[k]]) exp_id = order[k];
    end
    checks++;
    if ((exp_id < 0 && gnt != 0) || (exp_id >= 0 && (gnt != (6'b1 << exp_id) || !gnt_valid))) begin
      failures++;
      $display("ERROR req %b: gnt %b expected id %0d", r, gnt, exp_id);
    end
    if (exp_id > 0) begin      // granted one goes to the end of the order
      int pos, tmp [5], n;
      n = 0;
      for (int k = 0; k < 5; k++) if (order[k] == exp_id) pos = k;
      for (int k = pos + 1; k < 5; k++) tmp[n++] = order[k];
      for (int k = 0; k <= pos; k++) tmp[n++] = order[k];
      order = tmp;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the original design's example: grants CENSUS IMGLY, WEIGHT IMGLU, CENSUS IMGLY, DEPTH
    step(6'b000010, 1);
    checks++; if (order != '{2, 3, 4, 5, 1}) begin failures++; $display("ERROR order after IMGLY"); end
    step(6'b010000, 1);
    checks++; if (order != '{5, 1, 2, 3, 4}) begin failures++; $display("ERROR order after WEIGHT IMGLU"); end
    step(6'b000010, 1);
    checks++; if (order != '{2, 3, 4, 5, 1}) begin failures++; $display("ERROR order after CENSUS IMGLY"); end
    step(6'b111111, 1);
    checks++; if (order != '{2, 3, 4, 5, 1}) begin failures++; $display("ERROR order after DEPTH"); end
    for (int t = 0; t < 2000; t++)
      step(6'($urandom) & (($urandom_range(0, 2) == 0) ? 6'b111111 : 6'b111110), $urandom_range(0, 4) != 0);
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
