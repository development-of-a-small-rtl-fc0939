// tb_frontend: self-checking testbench for the front-end model.
//
// With a 100 mV threshold and 60 mV per 1000 electrons: 5000 e (300 mV) fires
// after 8 ns, 1800 e (108 mV) after 30 ns, 1600 e (96 mV) not at all unless
// the trim DAC lowers the threshold by 8 mV; a +10 mV threshold offset
// stops 1800 e and a -10 mV offset lets 1600 e through; a masked pixel never fires; the
// test line fires only with enable_test set, injecting 13.5 fF x step; the
// output lasts 40 ns and overlapping pulses merge. With 75 e r.m.s. noise a
// charge right at the threshold fires about half of the time, and one 5
// sigma below it almost never.
module tb_frontend;
  timeunit 1ns;
  timeprecision 1ps;

  logic        pad_strike = 0, test_pulse = 0, enable_test = 0, mask = 0;
  logic [15:0] pad_charge_e = 0;
  logic signed [7:0] offset_mv = 0;
  logic [7:0]  noise_e = 0;
  logic [11:0] test_step_mv = 0, threshold_mv = 100;
  logic [7:0]  trim_mv = 0;
  logic        disc;
  int          checks = 0, failures = 0;
  realtime     t_rise, t_fall;
  int          n_rise = 0;

  frontend dut (.*);

  always @(posedge disc) begin t_rise = $realtime; n_rise++; end
  always @(negedge disc) t_fall = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Strike the pad with q electrons, wait 100 ns, report when disc rose.
  task automatic strike(input int q, output bit fired, output realtime delay);
    realtime t0;
    int      n0;
    n0 = n_rise;
    pad_charge_e = 16'(q);
    t0 = $realtime;
    pad_strike = 1; #1 pad_strike = 0;
    #99;
    fired = (n_rise != n0);
    delay = t_rise - t0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit      fired;
    realtime d;
    #10;
    check(disc == 0, "idle low");
    strike(5000, fired, d);
    check(fired && d == 8.0, "large pulse fires after 8 ns");
    check(t_fall - t_rise == 40.0, "output width 40 ns");
    strike(1800, fired, d);
    check(fired && d == 30.0, "pulse just above threshold fires after 30 ns");
    strike(1600, fired, d);
    check(!fired, "pulse below threshold does not fire");
    trim_mv = 8;
    strike(1600, fired, d);
    check(fired && d == 30.0, "trim DAC lowers the threshold");
    trim_mv = 0;
    offset_mv = 10;
    strike(1800, fired, d);
    check(!fired, "positive threshold offset raises the threshold");
    offset_mv = -10;
    strike(1600, fired, d);
    check(fired && d == 30.0, "negative threshold offset lowers the threshold");
    offset_mv = 0;
    mask = 1;
    strike(20000, fired, d);
    check(!fired, "masked pixel does not fire");
    mask = 0;
    // Test line: 60 mV step x 13.5 fF = 5056 e = 303 mV.
    test_step_mv = 60;
    begin
      int n0;
      n0 = n_rise;
      test_pulse = 1; #50 test_pulse = 0; #50;
      check(n_rise == n0, "test pulse ignored with the test switch open");
      enable_test = 1;
      test_pulse = 1; #50 test_pulse = 0; #50;
      check(n_rise == n0 + 1 && t_rise == $realtime - 92.0,
            "test pulse fires through the test switch after 8 ns");
      // 1 mV step = 84 e = 5 mV: below threshold.
      test_step_mv = 1;
      test_pulse = 1; #50 test_pulse = 0; #50;
      check(n_rise == n0 + 1, "small test step does not fire");
      enable_test = 0;
    end
    // Two hits 20 ns apart: one merged pulse from 8 ns to 20 + 8 + 40 ns.
    begin
      realtime t0;
      int n0;
      n0 = n_rise;
      pad_charge_e = 5000;
      t0 = $realtime;
      pad_strike = 1; #1 pad_strike = 0; #19;
      pad_strike = 1; #1 pad_strike = 0; #99;
      check(n_rise == n0 + 1 && t_fall - t0 == 68.0, "overlapping pulses merge");
    end
    // Noise: 1667 e is 100.0 mV, right at the 100 mV threshold.
    noise_e = 75;
    begin
      int n_fired;
      n_fired = 0;
      repeat (200) begin
        strike(1667, fired, d);
        if (fired) n_fired++;
      end
      check(n_fired > 60 && n_fired < 140,
            $sformatf("charge at threshold with noise fired %0d of 200 times", n_fired));
      n_fired = 0;
      repeat (200) begin
        strike(1667 - 5 * 75, fired, d);
        if (fired) n_fired++;
      end
      check(n_fired < 3, $sformatf("charge 5 sigma below fired %0d of 200 times", n_fired));
    end
    noise_e = 0;
    // Threshold at 0 with no charge: nothing fires.
    threshold_mv = 0;
    strike(0, fired, d);
    check(!fired, "zero charge never fires");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
