// tb_weight_gen: the weight generator on a 28x22 YUV image for several
// output rows.  The testbench serves the three component requesters like
// the memory controller and accepts weight words at random; every vertical
// weight word (per column) and horizontal weight word (per pixel) is
// compared with reference codes from the Manhattan distance and the
// quantised weight table, weight 0 outside the image.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_weight_gen;
  import mcadsw_pkg::*;
  localparam int W = 28, H = 22, WPR = W / 4;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [9:0] row = 0;
  logic [23:0] base [3] = '{24'd0, 24'd1000, 24'd2000};
  logic [2:0] req, gnt = 0, rd_valid = 0;
  rd_cmd_t cmd [3];
  logic [31:0] rd_data = 0;
  logic vw_wr, hw_wr, vw_can_wr = 0, hw_can_wr = 0;
  logic [89:0] vw_data, hw_data;
  byte unsigned img [3][H][W];
  int checks = 0, failures = 0, nv = 0, nh = 0;
  int rows_to_run [4] = '{0, 7, 15, 21};
  always #5 clk = ~clk;
  weight_gen #(.W(W), .H(H)) dut (.*);

  function automatic int wref(int x1, int y1, int x2, int y2);
    int d = 0;
    int tw [30] = '{6, 5, 5, 5, 5, 4, 4, 4, 4, 4, 3, 3, 3, 3, 3,
                    2, 2, 2, 2, 2, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0};
    if (x2 < 0 || x2 >= W || y2 < 0 || y2 >= H) return 7;
    for (int c = 0; c < 3; c++)
      d += (img[c][y1][x1] > img[c][y2][x2]) ? img[c][y1][x1] - img[c][y2][x2] : img[c][y2][x2] - img[c][y1][x1];
    return (d < 30) ? tw[d] : 7;
  endfunction

  initial forever begin
    @(negedge clk);
    vw_can_wr = $urandom_range(0, 3) != 0;
    hw_can_wr = $urandom_range(0, 3) != 0;
    if (req != 0) begin
      int id;
      rd_cmd_t c;
      id = req[0] ? 0 : req[1] ? 1 : 2;
      c = cmd[id];
      gnt[id] = 1;
      @(negedge clk) gnt = 0;
      for (int k = 0; k < c.count; k++) begin
        int a, y, w;
        repeat ($urandom_range(1, 2)) @(negedge clk);
        a = int'(c.base) + k * int'(c.stride) - 1000 * id;
        y = a / WPR; w = a % WPR;
        rd_data = {8'(img[id][y][4*w+3]), 8'(img[id][y][4*w+2]), 8'(img[id][y][4*w+1]), 8'(img[id][y][4*w])};
        rd_valid[id] = 1;
        @(negedge clk) rd_valid = 0;
      end
    end
  end

  always @(posedge clk) begin
    if (vw_wr) begin
      for (int j = -15; j <= 15; j++) if (j != 0) begin
        int k, e;
        k = (j < 0) ? j + 15 : j + 14;
        e = wref(nv, int'(row), nv, int'(row) + j);
        checks++;
        if (int'(vw_data[3*k +: 3]) != e) begin
          failures++;
          if (failures < 10) $display("ERROR VW row %0d col %0d j %0d: %0d expected %0d", row, nv, j, vw_data[3*k +: 3], e);
        end
      end
      nv++;
    end
    if (hw_wr) begin
      for (int i = -15; i <= 15; i++) if (i != 0) begin
        int k, e;
        k = (i < 0) ? i + 15 : i + 14;
        e = wref(nh, int'(row), nh + i, int'(row));
        checks++;
        if (int'(hw_data[3*k +: 3]) != e) begin
          failures++;
          if (failures < 10) $display("ERROR HW row %0d x %0d i %0d: %0d expected %0d", row, nh, i, hw_data[3*k +: 3], e);
        end
      end
      nh++;
    end
  end

  initial begin
    // smooth image so that many distances fall inside the table
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      img[0][y][x] = 8'(100 + x + 2 * y + $urandom_range(0, 3));
      img[1][y][x] = 8'(120 + (x % 5) + $urandom_range(0, 2));
      img[2][y][x] = 8'(90 + (y % 7) * 2);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (rows_to_run[r]) begin
      row = 10'(rows_to_run[r]); nv = 0; nh = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      while (busy) @(negedge clk);
      checks++;
      if (nv != W || nh != W) begin failures++; $display("ERROR row %0d: %0d / %0d words", row, nv, nh); end
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
