// tb_weight_lut: every colour distance 0..60 (split over Y, U and V in
// random ways) and random pixel pairs, against the weight table with one
// preserved MSB (64, 32 x4, 16 x5, 8 x5, 4 x5, 2 x5, 1 x5, then 0).
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_weight_lut;
  import mcadsw_pkg::*;
  logic [7:0] c_y, c_u, c_v, n_y, n_u, n_v;
  logic [9:0] cdist;
  logic [2:0] code;
  int checks = 0, failures = 0;
  int table_w [30] = '{64, 32, 32, 32, 32, 16, 16, 16, 16, 16, 8, 8, 8, 8, 8,
                       4, 4, 4, 4, 4, 2, 2, 2, 2, 2, 1, 1, 1, 1, 1};
  weight_lut dut (.*);

  task automatic check(input int d);
    int w, got_w;
    w = (d < 30) ? table_w[d] : 0;
    got_w = (code == 3'd7) ? 0 : (1 << code);
    checks++;
    if (cdist != 10'(d) || got_w != w) begin
      failures++;
      $display("ERROR distance %0d: got distance %0d weight %0d, expected weight %0d", d, cdist, got_w, w);
    end
  endtask

  initial begin
    for (int d = 0; d <= 60; d++) begin
      int a, b, c;
      a = $urandom_range(0, d); b = $urandom_range(0, d - a); c = d - a - b;
      c_y = 8'($urandom_range(60, 190)); c_u = 8'($urandom_range(60, 190)); c_v = 8'($urandom_range(60, 190));
      n_y = ($urandom_range(0,1) != 0) ? c_y + 8'(a) : c_y - 8'(a);
      n_u = ($urandom_range(0,1) != 0) ? c_u + 8'(b) : c_u - 8'(b);
      n_v = ($urandom_range(0,1) != 0) ? c_v + 8'(c) : c_v - 8'(c);
      #1 check(d);
    end
    for (int t = 0; t < 300; t++) begin
      int d;
      {c_y, c_u, c_v, n_y, n_u, n_v} = {16'($urandom), 16'($urandom), 16'($urandom)};
      d = (c_y > n_y ? c_y - n_y : n_y - c_y) + (c_u > n_u ? c_u - n_u : n_u - c_u)
        + (c_v > n_v ? c_v - n_v : n_v - c_v);
      #1 check(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
