// tb_threshold_scan: threshold scans with two test-pulse amplitudes and with
// every trim DAC value, the front-end characterisation of the chip.
//
// A 4 x 4 chip is configured with the test switch on in every pixel and
// pixel i (row * 4 + col) trimmed with DAC code i, so one scan covers all
// 16 DAC values. For test steps of 20 mV (1685 electrons) and 30 mV
// (2528 electrons) the global threshold is scanned from 0 to 300 mV; at each
// point one test pulse is injected and the chain is read. A pixel must hold
// a hit exactly when the pulse (60 mV per 1000 electrons) exceeds its local
// threshold (global threshold minus code * 130 mV / 15). From the highest
// threshold that still fires, the testbench then recovers the gain (the
// shift of that edge between the two amplitudes) and the DAC step.
module tb_threshold_scan;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NR = 4, NC = 4, NP = NR * NC;
  localparam int THR_STEP = 2;

  logic          reset_in = 0, event_clk = 0, read = 0, en_clear = 1, test = 0;
  logic [11:0]   test_step_mv = 0, threshold_mv = 0;
  logic [7:0]    dac_range_mv = 130;
  logic [11:0]   vdd_mv = 1200;   // reference supply, 560 MHz oscillators
  logic signed [7:0] offset_mv [NP] = '{default: '0};  // no threshold spread
  logic [7:0]    noise_e = 0;
  logic signed [7:0] temp_c = 27;
  logic          contr_clk = 0, contr_in = 0, contr_out, previous = 0, next;
  logic [NP-1:0] pad_strike = '0, hit, clear_hit;
  logic [15:0]   pad_charge_e [NP];
  logic          osc_test_go = 0, osc_test_out;
  int            checks = 0, failures = 0;

  gossipo2 #(.NROWS(NR), .NCOLS(NC)) dut (.*);

  always #12.5 event_clk = ~event_clk;
  initial begin #0.5 reset_in = 1; #0.5 reset_in = 0; #0.5 reset_in = 1; end

  function automatic int pixel_at(input int k);
    int c, r;
    c = k / NR;
    r = (c % 2 == 0) ? k % NR : NR - 1 - k % NR;
    return r * NC + c;
  endfunction

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
    int steps [2] = '{20, 30};
    int edge_mv [2][NP];
    foreach (pad_charge_e[i]) pad_charge_e[i] = '0;
    repeat (2) @(posedge event_clk);
    to_low();
    reset_in = 0;
    // Configuration: enable_test = 1, mask = 0, dac = pixel index.
    for (int k = NP - 1; k >= 0; k--) begin
      logic [5:0] w;
      w = {1'b1, 1'b0, 4'(pixel_at(k))};
      for (int b = 5; b >= 0; b--) begin
        contr_in = w[b]; #5 contr_clk = 1; #5 contr_clk = 0;
      end
    end
    foreach (steps[a]) begin
      int charge_e;
      charge_e = steps[a] * 13500 * 10 / 1602;
      test_step_mv = 12'(steps[a]);
      foreach (edge_mv[a][p]) edge_mv[a][p] = -1;
      for (int thr = 0; thr <= 300; thr += THR_STEP) begin
        logic [NP-1:0] seen;
        threshold_mv = 12'(thr);
        @(posedge event_clk);
        #3 test = 1;
        repeat (3) @(posedge event_clk);
        seen = hit;
        test = 0;
        // Read out, which also clears the pixels.
        to_low(); read = 1;
        repeat (8 * NP) @(posedge event_clk);
        to_low(); read = 0;
        for (int p = 0; p < NP; p++) begin
          int local_thr;
          bit fires;
          local_thr = thr - p * 130 / 15;
          if (local_thr < 0) local_thr = 0;
          fires = charge_e * 60 > local_thr * 1000;
          check(seen[p] == fires,
                $sformatf("step %0d mV thr %0d mV pixel %0d: hit %0b expected %0b",
                          steps[a], thr, p, seen[p], fires));
          if (seen[p]) edge_mv[a][p] = thr;
        end
      end
    end
    // Gain from the edge shift between the two amplitudes; DAC step from the
    // edge shift between pixels.
    for (int p = 0; p < NP; p++) begin
      real gain, dac_shift;
      gain = (edge_mv[1][p] - edge_mv[0][p]) * 1000.0 / (2528.0 - 1685.0);
      check(gain > 57.0 && gain < 63.0,
            $sformatf("pixel %0d: gain %.1f mV per 1000 e", p, gain));
      dac_shift = edge_mv[0][p] - edge_mv[0][0];
      check(dac_shift > p * 130.0 / 15.0 - 3.0 && dac_shift < p * 130.0 / 15.0 + 3.0,
            $sformatf("pixel %0d: DAC shift %.1f mV", p, dac_shift));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
