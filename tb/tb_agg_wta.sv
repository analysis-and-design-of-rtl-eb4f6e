// tb_agg_wta: the aggregation / winner-takes-all kernel on a 40-pixel row
// (three segments) with 8 disparities.  The testbench holds random census
// columns and weight words, makes them available a few columns at a time
// (so the kernel must wait), answers reads of columns that are not yet
// available or already released with random junk (so reading too early or
// too late shows up as a wrong depth), and raises 'full' on the depth FIFO
// at random.  Every pushed depth and its byte address is compared with a
// reference two-pass weighted aggregation and WTA.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_agg_wta;
  import mcadsw_pkg::*;
  localparam int W = 40, DISP = 8, SEG = 18, NSEG = 3, DW = 54;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [9:0] row = 10'd5;
  logic [23:0] base_depth = 24'd64;
  logic [9:0] cl_avail = 0, cr_avail = 0, vw_avail = 0, hw_avail = 0;
  logic [9:0] cl_rd_col, cr_rd_col, vw_rd_col, hw_rd_col;
  logic [185:0] cl_rd_data, cr_rd_data;
  logic [89:0] vw_rd_data, hw_rd_data;
  logic signed [10:0] cl_release, cr_release, vw_release, hw_release;
  logic dpush, dfull = 0, stall_wait, stall_fifo;
  logic [25:0] dbaddr;
  logic [7:0] ddepth;
  logic [185:0] CL [W], CR [W];
  logic [89:0] VW [W], HW [W];
  int checks = 0, failures = 0, npush = 0, n_wait = 0, n_full = 0;
  int dref [DW];
  always #5 clk = ~clk;
  agg_wta #(.W(W), .DISP(DISP)) dut (.*);

  function automatic logic live(input int c, input logic [9:0] av, input logic signed [10:0] rel);
    return c >= 0 && c < int'(av) && c >= int'(rel);
  endfunction
  always_comb begin
    cl_rd_data = live(int'(cl_rd_col), cl_avail, cl_release) ? CL[cl_rd_col] : {6{$urandom}};
    cr_rd_data = live(int'(cr_rd_col), cr_avail, cr_release) ? CR[cr_rd_col] : {6{$urandom}};
    vw_rd_data = live(int'(vw_rd_col), vw_avail, vw_release) ? VW[vw_rd_col] : {3{$urandom}};
    hw_rd_data = live(int'(hw_rd_col), hw_avail, hw_release) ? HW[hw_rd_col] : {3{$urandom}};
  end

  function automatic longint wv(input logic [2:0] c);
    return (c == 7) ? 0 : (longint'(1) << c);
  endfunction

  task automatic reference();
    longint v [W], best [DW];
    for (int x = 0; x < DW; x++) begin best[x] = -1; dref[x] = 0; end
    for (int d = 0; d < DISP; d++) begin
      for (int x = 0; x < W; x++) begin
        v[x] = 0;
        for (int j = 0; j < 31; j++) begin
          logic [5:0] a, b;
          a = CL[x][6*j +: 6];
          b = (x - d >= 0) ? CR[x-d][6*j +: 6] : 6'd0;
          v[x] += longint'($countones(a ^ b)) * ((j == 15) ? 64 : wv(VW[x][3*(j < 15 ? j : j - 1) +: 3]));
        end
      end
      for (int x = 0; x < DW; x++) begin
        longint s;
        s = 0;
        if (x < W)
          for (int i = 0; i < 31; i++) begin
            int xx;
            xx = x + i - 15;
            if (xx >= 0 && xx < W)
              s += v[xx] * ((i == 15) ? 64 : wv(HW[x][3*(i < 15 ? i : i - 1) +: 3]));
          end
        if (best[x] < 0 || s < best[x]) begin best[x] = s; dref[x] = d; end
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (stall_wait) n_wait++;
    if (stall_fifo) n_full++;
    if (dpush) begin
      int x;
      x = int'(dbaddr) - 4 * 64 - 5 * DW;
      checks++;
      if (x != npush || ddepth != 8'(dref[x < 0 ? 0 : x % DW] * 4)) begin
        failures++;
        $display("ERROR push %0d: address offset %0d depth %0d expected %0d", npush, x, ddepth, dref[npush % DW] * 4);
      end
      npush++;
    end
  end

  initial begin
    for (int x = 0; x < W; x++) begin
      for (int j = 0; j < 31; j++) CL[x][6*j +: 6] = 6'($urandom);
      for (int j = 0; j < 31; j++) CR[x][6*j +: 6] = 6'($urandom);
      for (int k = 0; k < 30; k++) VW[x][3*k +: 3] = 3'($urandom);
      for (int k = 0; k < 30; k++) HW[x][3*k +: 3] = 3'($urandom);
    end
    // make the right view a shifted left view in part of the row
    for (int x = 3; x < W; x++) if (x % 3 != 0) CR[x-3] = CL[x];
    reference();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (busy) begin
      @(negedge clk);
      dfull = $urandom_range(0, 2) == 0;
      if ($urandom_range(0, 60) == 0) begin
        if (cl_avail < W) cl_avail++;
        if (cr_avail < W) cr_avail++;
        if (vw_avail < W) vw_avail++;
        if (hw_avail < W) hw_avail++;
      end
    end
    checks++;
    if (npush != DW) begin failures++; $display("ERROR: %0d depths pushed, expected %0d", npush, DW); end
    checks++;
    if (n_wait == 0 || n_full == 0) begin failures++; $display("ERROR: stalls wait %0d full %0d", n_wait, n_full); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
