// tb_delay_scan: test-pulse delay scan, the timing characterisation of the
// chip. A 2 x 2 chip is used (every pixel sees the same test pulse, so the
// array size does not change the result).
//
// For delays from 20.1 ns to 78.1 ns in 0.25 ns steps after a reference rising
// edge of the event clock, a 60 mV test step (about 5000 electrons) is
// injected into all pixels, the chain is read at a fixed time, and each
// pixel's drift count and latency count are compared with the values worked
// out from the timing. The reconstructed hit time,
//   t = (R - latency) * 25 ns - drift * 1.786 ns,
// must rise with the delay (the sum curve of the scan), step by step, and
// stay within half a TDC step of the discriminator firing time.
module tb_delay_scan;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NR = 2, NC = 2, NP = NR * NC;
  localparam int R  = 6;      // readout starts after rising edge P6

  logic          reset_in = 0, event_clk = 0, read = 0, en_clear = 1, test = 0;
  logic [11:0]   test_step_mv = 60, threshold_mv = 200;
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

  localparam logic [3:0] SEQ [15] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011, 4'b0110,
    4'b1100, 4'b1001, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1000
  };

  gossipo2 #(.NROWS(NR), .NCOLS(NC)) dut (.*);

  always #12.5 event_clk = ~event_clk;
  initial begin #0.5 reset_in = 1; #0.5 reset_in = 0; #0.5 reset_in = 1; end

  function automatic int decode(input logic [3:0] s);
    for (int i = 0; i < 15; i++) if (SEQ[i] == s) return i;
    return -1;
  endfunction

  function automatic int expected_fast(input real w);
    return (w > 0.893) ? int'($floor((w - 0.893) / 1.786)) + 1 : 0;
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
    real prev_t;
    int  n_drift_wrap, prev_fast;
    foreach (pad_charge_e[i]) pad_charge_e[i] = '0;
    repeat (2) @(posedge event_clk);
    to_low();
    reset_in = 0;
    // All pixels: test switch on, unmasked, DAC 0.
    for (int i = 0; i < 6 * NP; i++) begin
      contr_in = (i % 6 == 0); #5 contr_clk = 1; #5 contr_clk = 0;
    end
    prev_t = -1.0;
    n_drift_wrap = 0;
    prev_fast = 0;
    for (int step = 0; step <= 232; step++) begin
      real delay, td, t_rec, w;
      int  closing, exp_fast, exp_lat, lat0, fast0, d;
      logic [8*NP-1:0] bits;
      delay = 20.1 + 0.25 * step;   // never exactly on a clock edge
      // 5056 e x 60 uV = 303 mV: above 200 mV but below twice it -> 30 ns.
      d = 30;
      @(posedge event_clk);      // P0
      fork
        #(delay * 1ns) test = 1;
      join_none
      repeat (R) @(posedge event_clk);
      test = 0;
      to_low();
      read = 1;
      for (int n = 0; n < 8 * NP; n++) begin
        #1 bits[n] = next;
        @(posedge event_clk); @(negedge event_clk); #2;
      end
      read = 0;
      td = delay + d;
      closing = int'($floor(td / 25.0)) + 1;
      exp_fast = expected_fast(closing * 25.0 - td);
      exp_lat = R - closing;
      for (int k = 0; k < NP; k++) begin
        int lat, fast;
        lat  = decode({bits[8*k], bits[8*k+1], bits[8*k+2], bits[8*k+3]});
        fast = decode({bits[8*k+4], bits[8*k+5], bits[8*k+6], bits[8*k+7]});
        check(lat == exp_lat && fast == exp_fast,
              $sformatf("delay %.2f ns, chain slot %0d: lat %0d/%0d fast %0d/%0d",
                        delay, k, lat, exp_lat, fast, exp_fast));
        if (k == 0) begin lat0 = lat; fast0 = fast; end
      end
      // Reconstructed firing time relative to P0.
      t_rec = (R - lat0) * 25.0 - fast0 * 1.786;
      w = t_rec - td;
      check(w > -0.9 && w < 0.9,
            $sformatf("delay %.2f: reconstructed %.3f ns vs firing %.3f ns", delay, t_rec, td));
      check(t_rec >= prev_t - 0.01, $sformatf("delay %.2f: sum curve not monotonic", delay));
      if (step > 0 && fast0 > prev_fast + 5) n_drift_wrap++;
      prev_fast = fast0;
      prev_t = t_rec;
    end
    // The firing time (50.1 .. 108.1 ns) crosses the clock edges at 75 and 100 ns.
    check(n_drift_wrap == 2, $sformatf("drift count restarts at 2 clock edges, saw %0d", n_drift_wrap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
