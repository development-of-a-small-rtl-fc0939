// tb_scurve: threshold scan with noise, recovering the noise from the width
// of each pixel's S-curve.
//
// A 2 x 2 chip with the test switch on in every pixel and 75 electrons
// r.m.s. of front-end noise gets 100 test pulses of 2528 electrons (a 30 mV
// step on 13.5 fF, 151.7 mV at the preamp) at each global threshold from 136
// to 168 mV in 1 mV steps, reading the chain after each pulse. The fraction
// of pulses that fire falls from 1 to 0 around the pulse height. From the
// drop between neighbouring points the testbench works out the mean and the
// r.m.s. width of each curve: the mean must be the pulse height within
// 1.5 mV and the width, divided by the 60 mV per 1000 electrons gain, must
// give the noise within 55 to 95 electrons. Every point must lie between 0
// and 1 and the curve must start near 1 and end near 0.
module tb_scurve;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NR = 2, NC = 2, NP = NR * NC;
  localparam int THR_LO = 136, THR_HI = 168, PULSES = 100;

  logic          reset_in = 0, event_clk = 0, read = 0, en_clear = 1, test = 0;
  logic [11:0]   test_step_mv = 30, threshold_mv = 0;
  logic [7:0]    dac_range_mv = 130;
  logic [11:0]   vdd_mv = 1200;
  logic signed [7:0] temp_c = 27;
  logic signed [7:0] offset_mv [NP] = '{default: '0};
  logic [7:0]    noise_e = 75;
  logic          contr_clk = 0, contr_in = 0, contr_out, previous = 0, next;
  logic [NP-1:0] pad_strike = '0, hit, clear_hit;
  logic [15:0]   pad_charge_e [NP] = '{default: '0};
  logic          osc_test_go = 0, osc_test_out;
  int            checks = 0, failures = 0;

  gossipo2 #(.NROWS(NR), .NCOLS(NC)) dut (.*);

  always #12.5 event_clk = ~event_clk;
  initial begin #0.5 reset_in = 1; #0.5 reset_in = 0; #0.5 reset_in = 1; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic to_low(); @(negedge event_clk); #2; endtask

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  fired [NP][THR_HI - THR_LO + 1];
    real peak_mv;
    peak_mv = real'(30 * 13500 * 10 / 1602) * 0.060;
    foreach (fired[p, t]) fired[p][t] = 0;
    repeat (2) @(posedge event_clk);
    to_low();
    reset_in = 0;
    // Configuration: enable_test = 1, mask = 0, dac = 0 in every pixel.
    repeat (NP) begin
      logic [5:0] w;
      w = 6'b10_0000;
      for (int b = 5; b >= 0; b--) begin
        contr_in = w[b]; #5 contr_clk = 1; #5 contr_clk = 0;
      end
    end
    for (int thr = THR_LO; thr <= THR_HI; thr++) begin
      threshold_mv = 12'(thr);
      repeat (PULSES) begin
        @(posedge event_clk);
        #3 test = 1;
        repeat (3) @(posedge event_clk);
        for (int p = 0; p < NP; p++) if (hit[p]) fired[p][thr - THR_LO]++;
        test = 0;
        to_low(); read = 1;
        repeat (8 * NP) @(posedge event_clk);
        to_low(); read = 0;
      end
    end
    for (int p = 0; p < NP; p++) begin
      real mean, var_mv, noise;
      mean = 0.0;
      var_mv = 0.0;
      check(fired[p][0] >= PULSES - 2, $sformatf("pixel %0d fires at %0d mV", p, THR_LO));
      check(fired[p][THR_HI - THR_LO] <= 2, $sformatf("pixel %0d silent at %0d mV", p, THR_HI));
      // Drop between thr - 1 and thr belongs to the middle, thr - 0.5 mV.
      for (int t = 1; t <= THR_HI - THR_LO; t++)
        mean += real'(fired[p][t - 1] - fired[p][t]) / PULSES * (THR_LO + t - 0.5);
      for (int t = 1; t <= THR_HI - THR_LO; t++)
        var_mv += real'(fired[p][t - 1] - fired[p][t]) / PULSES
                  * (THR_LO + t - 0.5 - mean) * (THR_LO + t - 0.5 - mean);
      noise = $sqrt(var_mv) / 0.060;
      $display("pixel %0d: S-curve mean %.1f mV, width %.2f mV = %.0f e rms",
               p, mean, $sqrt(var_mv), noise);
      check(mean > peak_mv - 1.5 && mean < peak_mv + 1.5,
            $sformatf("pixel %0d: S-curve mean %.1f mV, pulse %.1f mV", p, mean, peak_mv));
      check(noise > 55.0 && noise < 95.0,
            $sformatf("pixel %0d: noise %.0f e from the S-curve width", p, noise));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
