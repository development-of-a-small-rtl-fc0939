// tb_local_osc: self-checking testbench for the local oscillator model.
//
// Checks: output low while idle; first rising edge half a period after start;
// period 1786 ps (560 MHz); the number of rising edges in a window; a stop in
// the high phase completes that phase at full length (no short pulse) and no
// edge follows; a stop in the low phase produces no further edge. Then the
// supply and temperature dependence: 14 edges fit in a 25 ns window at the
// reference point, 15 at +60 mV of supply (period 1.685 ns) and 13 at +30 C
// (period 1.900 ns), so each of these shifts moves a count by one step.
// A second instance is set to the slower measured speed (530 MHz at 1.2 V);
// raising its supply by 57 mV brings it back to 560 MHz.
module tb_local_osc;
  timeunit 1ns;
  timeprecision 1ps;

  logic    osc_go = 0;
  logic [11:0]       vdd_mv = 1200;
  logic signed [7:0] temp_c = 27;
  logic    osc_out;
  int      checks = 0, failures = 0;
  int      rises = 0;
  realtime t_rise [$];
  realtime t_fall [$];

  local_osc dut (.*);

  logic    slow_go = 0, slow_out;
  int      slow_rises = 0;
  realtime t_slow [$];
  local_osc #(.HALF_PERIOD_PS(943)) slow (.osc_go(slow_go), .vdd_mv, .temp_c,
                                          .osc_out(slow_out));
  always @(posedge slow_out) begin slow_rises++; t_slow.push_back($realtime); end

  always @(posedge osc_out) begin rises++; t_rise.push_back($realtime); end
  always @(negedge osc_out) t_fall.push_back($realtime);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.002) && (b - a < 0.002);
  endfunction

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20;
    check(osc_out == 0 && rises == 0, "idle oscillator is low and silent");
    // Run for 20.0 ns: edges at 0.893 + k * 1.786 ns below 20 ns -> 11 edges.
    osc_go = 1;
    #20.0;
    osc_go = 0;
    #10;
    check(rises == 11, $sformatf("11 rising edges in 20 ns, got %0d", rises));
    check(near(t_rise[0] - 20.0, 0.893), "first edge half a period after start");
    check(near(t_rise[1] - t_rise[0], 1.786), "period 1.786 ns");
    check(near(t_rise[10] - t_rise[0], 17.86), "ten periods 17.86 ns");
    check(near(t_fall[$] - t_rise[$], 0.893), "last high phase full length");
    check(osc_out == 0, "low after stop");
    // Stop in the high phase: started at 50 ns, edge at 50.893, stop at 51.2.
    rises = 0; t_rise.delete(); t_fall.delete();
    osc_go = 1;
    #1.2 osc_go = 0;
    #10;
    check(rises == 1, "one edge before a stop in the high phase");
    check(t_fall.size() == 1 && near(t_fall[0] - t_rise[0], 0.893),
          "high phase completed at full length");
    // Stop in the low phase before the first edge: no edge at all.
    rises = 0;
    osc_go = 1;
    #0.5 osc_go = 0;
    #10;
    check(rises == 0, "no edge after a stop in the low phase");
    // Supply and temperature dependence, 25 ns windows.
    rises = 0;
    osc_go = 1; #25.0 osc_go = 0; #10;
    check(rises == 14, $sformatf("14 edges in 25 ns at 1200 mV, 27 C, got %0d", rises));
    vdd_mv = 1260;
    rises = 0; t_rise.delete();
    osc_go = 1; #25.0 osc_go = 0; #10;
    check(rises == 15, $sformatf("15 edges in 25 ns at 1260 mV, got %0d", rises));
    check(near(t_rise[1] - t_rise[0], 1.684), "period 1.684 ns at 1260 mV");
    vdd_mv = 1200;
    temp_c = 57;
    rises = 0; t_rise.delete();
    osc_go = 1; #25.0 osc_go = 0; #10;
    check(rises == 13, $sformatf("13 edges in 25 ns at 57 C, got %0d", rises));
    check(near(t_rise[1] - t_rise[0], 1.900), "period 1.900 ns at 57 C");
    temp_c = 27;
    // 530 MHz part: period 1.886 ns at 1200 mV, 13 edges in 25 ns (one short).
    slow_go = 1; #25.0 slow_go = 0; #10;
    check(slow_rises == 13, $sformatf("13 edges in 25 ns at 530 MHz, got %0d", slow_rises));
    check(near(t_slow[1] - t_slow[0], 1.886), "period 1.886 ns at 530 MHz");
    // Supply tuned to 1257 mV: 943 ps / 1.057 = 892 ps half period, 560 MHz.
    vdd_mv = 1257;
    slow_rises = 0; t_slow.delete();
    slow_go = 1; #25.0 slow_go = 0; #10;
    check(slow_rises == 14, $sformatf("14 edges in 25 ns after tuning, got %0d", slow_rises));
    check(near(t_slow[1] - t_slow[0], 1.784), "period 1.784 ns after tuning");
    vdd_mv = 1200;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
