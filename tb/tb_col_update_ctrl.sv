// tb_col_update_ctrl: a producer writing columns whenever allowed and a
// consumer releasing a sliding window, against a model of the update table:
// a slot may be written only after the column DEPTH places earlier has been
// cleared, and clearing never passes the release column or the set pointer.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_col_update_ctrl;
  logic clk = 0, rst_n = 0, start = 0, set, want = 0, can_set;
  assign set = want && can_set;   // producers obey the table
  logic signed [10:0] release_col = 0;
  logic [9:0] set_col, clr_col;
  logic [2:0] set_slot;
  int checks = 0, failures = 0, n_blocked = 0;
  always #5 clk = ~clk;
  col_update_ctrl #(.DEPTH(8)) dut (.*);

  int m_set = 0, m_clr = 0;
  always @(posedge clk) if (rst_n && !start) begin
    logic exp_can;
    exp_can = (m_set - m_clr) < 8;
    checks++;
    if (can_set != exp_can || set_col != 10'(m_set) || clr_col != 10'(m_clr) || set_slot != 3'(m_set % 8)) begin
      failures++;
      $display("ERROR: can_set %0d set %0d clr %0d, expected %0d %0d %0d", can_set, set_col, clr_col, exp_can, m_set, m_clr);
    end
    if (want && !exp_can) n_blocked++;
    if (set && exp_can) m_set++;
    if (m_clr < int'(release_col) && m_clr < m_set) m_clr++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      want = $urandom_range(0, 2) != 0;
      if ($urandom_range(0, 5) == 0) release_col = release_col + 11'($urandom_range(0, 3));
      if (t == 300) begin start = 1; end
      if (t == 301) begin start = 0; release_col = -5; m_set = 0; m_clr = 0; end
    end
    checks++;
    if (n_blocked == 0) begin failures++; $display("ERROR: producer never blocked"); end
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
