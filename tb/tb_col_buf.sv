// tb_col_buf: columns written in order with random data while a consumer
// reads back random live columns and releases old ones; every read is
// compared with the data written for that column, and the producer must be
// held off when all 16 slots are live.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_col_buf;
  logic clk = 0, rst_n = 0, start = 0, wr, want = 0, can_wr;
  assign wr = want && can_wr;     // producers obey the table
  logic [39:0] wr_data = 0, rd_data;
  logic [9:0] avail, rd_col = 0;
  logic signed [10:0] release_col = 0;
  logic [39:0] ref_mem [1024];
  int checks = 0, failures = 0, n_held = 0;
  always #5 clk = ~clk;
  col_buf #(.DEPTH(16), .WIDTH(40)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (wr && can_wr) ref_mem[avail] = wr_data;
    if (want && !can_wr) n_held++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      want = $urandom_range(0, 1);
      wr_data = {8'($urandom), 32'($urandom)};
      if (avail > 0 && $signed({1'b0, avail}) > release_col) begin
        int lo;
        lo = (release_col < 0) ? 0 : int'(release_col);
        rd_col = 10'($urandom_range(lo, int'(avail) - 1));
        #1;
        checks++;
        if (rd_data != ref_mem[rd_col]) begin
          failures++;
          $display("ERROR column %0d: %h expected %h", rd_col, rd_data, ref_mem[rd_col]);
        end
      end
      if ($urandom_range(0, 2) == 0 && release_col < $signed({1'b0, avail}) - 3)
        release_col = release_col + 1;
    end
    checks++;
    if (n_held == 0) begin failures++; $display("ERROR: producer never held off"); end
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
