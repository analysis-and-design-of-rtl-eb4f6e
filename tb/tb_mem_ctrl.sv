// tb_mem_ctrl: random read bursts (base, stride, count) from the five image
// requesters and single-byte writes from the depth FIFO port, executed on a
// memory model with random latency.  Each returned word must carry the
// requester's valid bit and the memory content at base + k*stride; each
// write must land in the enabled byte only.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_mem_ctrl;
  import mcadsw_pkg::*;
  logic clk = 0, rst_n = 0, idle, gnt_valid = 0;
  logic [2:0] gnt_id = 0;
  rd_cmd_t rd_cmd [N_REQ];
  wr_cmd_t wr_cmd;
  logic [N_REQ-1:0] rd_valid;
  logic [31:0] rd_data;
  logic bus_req, bus_we, bus_ack = 0;
  logic [23:0] bus_addr;
  logic [3:0] bus_be;
  logic [31:0] bus_wdata, bus_rdata = 0;
  logic [31:0] mem [4096];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mem_ctrl dut (.*);

  // memory model with random latency 1..4
  int lat = 0; logic mbusy = 0;
  always @(posedge clk) begin
    if (bus_ack) bus_ack <= 0;
    else if (!mbusy && bus_req) begin mbusy <= 1; lat <= $urandom_range(0, 3); end
    else if (mbusy) begin
      if (lat == 0) begin
        mbusy <= 0; bus_ack <= 1;
        if (bus_we) begin
          for (int b = 0; b < 4; b++) if (bus_be[b]) mem[bus_addr[11:0]][8*b +: 8] <= bus_wdata[8*b +: 8];
        end else bus_rdata <= mem[bus_addr[11:0]];
      end else lat <= lat - 1;
    end
  end

  initial begin
    for (int a = 0; a < 4096; a++) mem[a] = $urandom;
    for (int k = 0; k < N_REQ; k++) rd_cmd[k] = '0;
    wr_cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int id;
      id = $urandom_range(0, 5);
      while (!idle) @(negedge clk);
      if (id == 0) begin
        logic [31:0] prev_word;
        wr_cmd.addr = 24'($urandom_range(0, 4095));
        wr_cmd.be   = 4'b1 << $urandom_range(0, 3);
        wr_cmd.data = $urandom;
        prev_word = mem[wr_cmd.addr[11:0]];
        gnt_valid = 1; gnt_id = 0;
        @(negedge clk) gnt_valid = 0;
        while (!idle) @(negedge clk);
        checks++;
        for (int b = 0; b < 4; b++)
          if (mem[wr_cmd.addr[11:0]][8*b +: 8] != (wr_cmd.be[b] ? wr_cmd.data[8*b +: 8] : prev_word[8*b +: 8])) begin
            failures++;
            $display("ERROR write %0h byte %0d", wr_cmd.addr, b);
          end
      end else begin
        int n, got;
        rd_cmd[id].base   = 24'($urandom_range(0, 1000));
        rd_cmd[id].stride = 24'($urandom_range(1, 88));
        rd_cmd[id].count  = 7'($urandom_range(1, 35));
        n = rd_cmd[id].count;
        gnt_valid = 1; gnt_id = 3'(id);
        @(negedge clk) gnt_valid = 0;
        got = 0;
        while (got < n) begin
          @(posedge clk); #1;
          if (rd_valid != 0) begin
            checks++;
            if (rd_valid != (6'b1 << id) ||
                rd_data != mem[12'(rd_cmd[id].base + 24'(got) * rd_cmd[id].stride)]) begin
              failures++;
              $display("ERROR requester %0d word %0d: valid %b data %h", id, got, rd_valid, rd_data);
            end
            got++;
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
