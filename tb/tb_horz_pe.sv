// tb_horz_pe: random vertical costs (up to the largest possible value) and
// weight codes against a multiply-based model of the horizontal sum.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_horz_pe;
  import mcadsw_pkg::*;
  logic [13:0] vcost [31];
  logic [2:0]  wcode [30];
  logic [24:0] hcost;
  int checks = 0, failures = 0;
  horz_pe dut (.*);
  initial begin
    for (int t = 0; t < 400; t++) begin
      longint e;
      for (int i = 0; i < 31; i++) vcost[i] = (t == 0) ? 14'(11904) : 14'($urandom_range(0, 11904));
      for (int i = 0; i < 30; i++) wcode[i] = (t == 0) ? 3'd6 : 3'($urandom);
      #1;
      e = 0;
      for (int i = 0; i < 31; i++) begin
        longint w;
        if (i == 15) w = 64;
        else begin
          int c;
          c = wcode[i < 15 ? i : i - 1];
          w = (c == 7) ? 0 : 2 ** c;
        end
        e += longint'(vcost[i]) * w;
      end
      checks++;
      if (longint'(hcost) != e) begin
        failures++;
        $display("ERROR test %0d: hcost %0d expected %0d", t, hcost, e);
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
