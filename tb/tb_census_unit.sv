// tb_census_unit: one census unit on a 24x20 image, run for several output
// rows (top edge, middle, bottom edge).  The testbench plays the memory
// controller (grant, then the burst's words with random gaps) and a census
// buffer that refuses writes at random; every written column is compared
// code by code with a reference mini-census of the zero-padded image.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_census_unit;
  import mcadsw_pkg::*;
  localparam int W = 24, H = 20, WPR = W / 4;
  logic clk = 0, rst_n = 0, start = 0, busy, req, gnt = 0, rd_valid = 0, col_wr, col_can_wr = 0;
  logic [9:0] row = 0;
  logic [23:0] base = 24'd100;
  rd_cmd_t cmd;
  logic [31:0] rd_data = 0;
  logic [185:0] col_data;
  byte unsigned img [H][W];
  int checks = 0, failures = 0, ncol = 0;
  always #5 clk = ~clk;
  census_unit #(.W(W), .H(H)) dut (.*);

  function automatic int pix(int x, int y);
    return (x < 0 || x >= W || y < 0 || y >= H) ? 0 : img[y][x];
  endfunction
  function automatic int census(int x, int y);
    int dx [6] = '{-2, 2, -2, 2, -2, 2};
    int dy [6] = '{-2, -2, 0, 0, 2, 2};
    int r = 0;
    for (int k = 0; k < 6; k++) if (pix(x + dx[k], y + dy[k]) <= pix(x, y)) r |= 1 << k;
    return r;
  endfunction

  // memory-controller stand-in
  initial forever begin
    @(negedge clk);
    col_can_wr = $urandom_range(0, 3) != 0;
    if (req && !gnt) begin
      rd_cmd_t c;
      c = cmd;
      gnt = 1;
      @(negedge clk) gnt = 0;
      for (int k = 0; k < c.count; k++) begin
        int a, y, w;
        repeat ($urandom_range(1, 3)) @(negedge clk);
        a = int'(c.base) + k * int'(c.stride) - 100;
        y = a / WPR; w = a % WPR;
        rd_data = {8'(img[y][4*w+3]), 8'(img[y][4*w+2]), 8'(img[y][4*w+1]), 8'(img[y][4*w])};
        rd_valid = 1;
        @(negedge clk) rd_valid = 0;
      end
    end
  end

  always @(posedge clk) if (col_wr) begin
    for (int j = 0; j < 31; j++) begin
      checks++;
      if (int'(col_data[6*j +: 6]) != census(ncol, int'(row) - 15 + j)) begin
        failures++;
        if (failures < 10) $display("ERROR row %0d col %0d code %0d: %0d expected %0d", row, ncol, j, col_data[6*j +: 6], census(ncol, int'(row) - 15 + j));
      end
    end
    ncol++;
  end

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (rows_to_run[i]) begin
      row = 10'(rows_to_run[i]); ncol = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (busy) @(negedge clk);
      checks++;
      if (ncol != W) begin failures++; $display("ERROR row %0d: %0d columns", row, ncol); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int rows_to_run [4] = '{0, 9, 16, 19};
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
