// tb_pixel_config: self-checking testbench for the 6-bit pixel configuration
// register. Shifts words in, checks the decoded fields (first bit shifted in
// is enable_test, then mask, then dac MSB first), the six-clock delay to
// cfg_out, and the clear on reset.
module tb_pixel_config;
  import gossipo_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic       cfg_clk = 0, reset = 0, cfg_in = 0, cfg_out;
  pixel_cfg_t cfg;
  int         checks = 0, failures = 0;

  initial #0.5 reset = 1;   // an edge, so the asynchronous reset acts

  pixel_config dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cfg=%b)", what, cfg); end
  endtask

  task automatic clock_bit(input logic b);
    cfg_in = b; #5 cfg_clk = 1; #5 cfg_clk = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] word, prev;
    #10 check(cfg == '0, "cleared by reset");
    reset = 0;
    prev = '0;
    for (int n = 0; n < 40; n++) begin
      word = 6'($urandom);
      for (int i = 5; i >= 0; i--) begin
        // cfg_out shows the previous word, first bit first.
        check(cfg_out == prev[i], $sformatf("cfg_out bit %0d of previous word", i));
        clock_bit(word[i]);
      end
      check(cfg.enable_test == word[5], "enable_test is the first bit");
      check(cfg.mask == word[4], "mask is the second bit");
      check(cfg.dac == word[3:0], "dac bits follow, MSB first");
      prev = word;
    end
    reset = 1;
    #1 check(cfg == '0 && cfg_out == 0, "asynchronous clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
