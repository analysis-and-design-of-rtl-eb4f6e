// tb_vert_pe: random census columns and weight codes against a
// multiply-based model of the weighted Hamming sum (centre weight 64).
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_vert_pe;
  import mcadsw_pkg::*;
  logic [5:0]  cen_l [31], cen_r [31];
  logic [2:0]  wcode [30];
  logic [13:0] vcost;
  int checks = 0, failures = 0;
  vert_pe dut (.*);
  initial begin
    for (int t = 0; t < 400; t++) begin
      int e;
      for (int j = 0; j < 31; j++) begin
        cen_l[j] = 6'($urandom);
        cen_r[j] = (t % 4 == 0) ? 6'($urandom) : cen_l[j] ^ 6'(1 << $urandom_range(0, 5));
      end
      for (int j = 0; j < 30; j++) wcode[j] = (t == 1) ? 3'd6 : 3'($urandom);
      if (t == 0) for (int j = 0; j < 31; j++) cen_r[j] = ~cen_l[j];   // maximum costs
      #1;
      e = 0;
      for (int j = 0; j < 31; j++) begin
        int h, w;
        h = $countones(cen_l[j] ^ cen_r[j]);
        if (j == 15) w = 64;
        else begin
          int c;
          c = wcode[j < 15 ? j : j - 1];
          w = (c == 7) ? 0 : 2 ** c;
        end
        e += h * w;
      end
      checks++;
      if (int'(vcost) != e) begin
        failures++;
        $display("ERROR test %0d: vcost %0d expected %0d", t, vcost, e);
      end
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
