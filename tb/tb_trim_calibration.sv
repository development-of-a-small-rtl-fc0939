// tb_trim_calibration: a calibration run of the trim DACs against a spread
// of pixel thresholds.
//
// A 4 x 4 chip gets a fixed pseudo-random threshold offset per pixel, spread
// evenly over -45..+45 mV (about 26 mV r.m.s., the spread of the real chip).
// With every DAC at 0 and a 30 mV test step (2528 electrons, 152 mV at the
// preamp) the global threshold is scanned from 0 to 250 mV; at each point
// one test pulse is injected and the chain read. Each pixel's edge is the
// highest threshold at which it still fires, peak - offset. The testbench
// then gives every pixel the DAC code that moves its edge closest to the
// highest edge, code = round((top edge - edge) * 15 / 130), loads the new
// configuration and scans again. Every scan point is checked against the
// expected hit pattern; after calibration all edges must lie within one DAC
// step plus one scan step of each other, against the 90 mV spread before.
module tb_trim_calibration;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NR = 4, NC = 4, NP = NR * NC;
  localparam int THR_STEP = 2;
  localparam int RANGE_MV = 130;

  logic          reset_in = 0, event_clk = 0, read = 0, en_clear = 1, test = 0;
  logic [11:0]   test_step_mv = 0, threshold_mv = 0;
  logic [7:0]    dac_range_mv = 8'(RANGE_MV);
  logic [11:0]   vdd_mv = 1200;
  logic signed [7:0] temp_c = 27;
  logic signed [7:0] offset_mv [NP] = '{default: '0};
  logic [7:0]    noise_e = 0;
  logic          contr_clk = 0, contr_in = 0, contr_out, previous = 0, next;
  logic [NP-1:0] pad_strike = '0, hit, clear_hit;
  logic [15:0]   pad_charge_e [NP] = '{default: '0};
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

  // Load the configuration chain: test switch on, no mask, given DAC codes.
  task automatic configure(input int code [NP]);
    for (int k = NP - 1; k >= 0; k--) begin
      logic [5:0] w;
      w = {1'b1, 1'b0, 4'(code[pixel_at(k)])};
      for (int b = 5; b >= 0; b--) begin
        contr_in = w[b]; #5 contr_clk = 1; #5 contr_clk = 0;
      end
    end
  endtask

  // Threshold scan with the given codes; returns each pixel's edge.
  task automatic scan(input int code [NP], input string tag, output int edge_mv [NP]);
    int charge_e;
    charge_e = 30 * 13500 * 10 / 1602;
    test_step_mv = 12'd30;
    foreach (edge_mv[p]) edge_mv[p] = -1;
    for (int thr = 0; thr <= 250; thr += THR_STEP) begin
      logic [NP-1:0] seen;
      threshold_mv = 12'(thr);
      @(posedge event_clk);
      #3 test = 1;
      repeat (3) @(posedge event_clk);
      seen = hit;
      test = 0;
      to_low(); read = 1;
      repeat (8 * NP) @(posedge event_clk);
      to_low(); read = 0;
      for (int p = 0; p < NP; p++) begin
        int local_thr;
        bit fires;
        local_thr = thr + int'(offset_mv[p]) - code[p] * RANGE_MV / 15;
        if (local_thr < 0) local_thr = 0;
        fires = charge_e * 60 > local_thr * 1000;
        check(seen[p] == fires, $sformatf("%s thr %0d mV pixel %0d: hit %0b expected %0b",
                                          tag, thr, p, seen[p], fires));
        if (seen[p]) edge_mv[p] = thr;
      end
    end
  endtask

  function automatic int spread(input int v [NP]);
    int lo, hi;
    lo = v[0]; hi = v[0];
    foreach (v[p]) begin
      if (v[p] < lo) lo = v[p];
      if (v[p] > hi) hi = v[p];
    end
    return hi - lo;
  endfunction

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int code [NP];
    int edge_u [NP];
    int edge_c [NP];
    int top, s_before, s_after;
    // Offsets: pixel p takes the p-th of 16 evenly spaced values in
    // -45..+45 mV, in an order scrambled by p * 7 mod 16.
    for (int p = 0; p < NP; p++) offset_mv[p] = 8'(-45 + (p * 7 % NP) * 6);
    foreach (code[p]) code[p] = 0;
    repeat (2) @(posedge event_clk);
    to_low();
    reset_in = 0;
    configure(code);
    scan(code, "uncalibrated", edge_u);
    top = -1;
    foreach (edge_u[p]) begin
      // Edge = peak (151.7 mV) - offset, rounded down to the scan grid.
      check(edge_u[p] >= 150 - int'(offset_mv[p]) - THR_STEP &&
            edge_u[p] <= 152 - int'(offset_mv[p]),
            $sformatf("pixel %0d: uncalibrated edge %0d mV with offset %0d mV",
                      p, edge_u[p], offset_mv[p]));
      if (edge_u[p] > top) top = edge_u[p];
    end
    foreach (code[p]) begin
      code[p] = ((top - edge_u[p]) * 15 + RANGE_MV / 2) / RANGE_MV;
      if (code[p] > 15) code[p] = 15;
    end
    configure(code);
    scan(code, "calibrated", edge_c);
    s_before = spread(edge_u);
    s_after = spread(edge_c);
    $display("edge spread: %0d mV before, %0d mV after calibration", s_before, s_after);
    check(s_before >= 86, $sformatf("spread before calibration %0d mV", s_before));
    check(s_after <= RANGE_MV / 15 + THR_STEP + 1,
          $sformatf("spread after calibration %0d mV", s_after));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
