// tb_mini_census: random centre and sample pixels, including equal values,
// against the labelling rule (0 when the sample is brighter than the centre).
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// cycle watchdog ends a run that hangs with a failure.
module tb_mini_census;
  import mcadsw_pkg::*;
  logic [7:0] center, sample [6];
  logic [5:0] code;
  int checks = 0, failures = 0;
  mini_census dut (.*);
  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [5:0] exp_code;
      center = 8'($urandom);
      for (int k = 0; k < 6; k++)
        sample[k] = ($urandom_range(0, 3) == 0) ? center : 8'($urandom);
      #1;
      for (int k = 0; k < 6; k++) exp_code[k] = (sample[k] <= center);
      checks++;
      if (code !== exp_code) begin
        failures++;
        $display("ERROR centre %0d: code %b expected %b", center, code, exp_code);
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
