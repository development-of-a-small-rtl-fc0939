// tb_threshold_dac: self-checking testbench for the trim DAC model. Every
// code at several range settings is compared with code * range / 15, and the
// end points are checked: code 15 gives the full range (130 mV nominal),
// code 0 gives nothing.
module tb_threshold_dac;
  timeunit 1ns;
  timeprecision 1ps;

  logic [3:0] code;
  logic [7:0] range_mv, trim_mv;
  int         checks = 0, failures = 0;

  threshold_dac dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (trim=%0d)", what, trim_mv); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ranges [5] = '{130, 0, 15, 200, 255};
    foreach (ranges[r]) begin
      for (int c = 0; c < 16; c++) begin
        code = 4'(c); range_mv = 8'(ranges[r]);
        #1 check(int'(trim_mv) == (c * ranges[r]) / 15,
                 $sformatf("code %0d range %0d", c, ranges[r]));
      end
    end
    code = 15; range_mv = 130;
    #1 check(trim_mv == 130, "full scale 130 mV");
    code = 1;
    #1 check(trim_mv == 8, "one step of 130 mV / 15");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
