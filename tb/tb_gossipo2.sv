// tb_gossipo2: end-to-end testbench of the full 16 x 16 chip at its default
// size.
//
// The testbench acts as the readout system: it loads the 1536-bit
// configuration chain (and reads a pattern back through it), puts charge on
// chosen pads at chosen times, reads the 2048-bit data chain and compares
// every pixel's decoded drift and latency counts with values it works out
// itself from the timing of the hits:
//   discriminator fires at t + 8 ns (pulse >= 2 x threshold) or t + 30 ns,
//   the window closes at the next rising event clock edge (every 25 ns),
//   fast count = oscillator edges in the window (0.893 ns, then every
//   1.786 ns), latency = rising edges after that up to the readout.
// Phases: self clear of old hits; a batch of hits over 12 cycles read out
// in time, with masked pixels, below-threshold charges, trim-DAC rescued
// charges, hits arriving during readout and data from a previous chip on the
// chain input; hold mode without self clear; test pulse injection; the
// individual test oscillator at two supply voltages. Each mechanism is counted and must occur.
module tb_gossipo2;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NR = 16, NC = 16, NP = NR * NC;
  localparam int THR_MV = 200, RANGE_MV = 130;

  logic          reset_in = 0, event_clk = 0, read = 0, en_clear = 1, test = 0;
  logic [11:0]   test_step_mv = 0, threshold_mv = 12'(THR_MV);
  logic [7:0]    dac_range_mv = 8'(RANGE_MV);
  logic [11:0]   vdd_mv = 1200;   // reference supply, 560 MHz oscillators
  logic signed [7:0] offset_mv [NP] = '{default: '0};  // no threshold spread
  logic [7:0]    noise_e = 0;
  logic signed [7:0] temp_c = 27;
  logic          contr_clk = 0, contr_in = 0, contr_out, previous = 0, next;
  logic [NP-1:0] pad_strike = '0, hit, clear_hit;
  logic [15:0]   pad_charge_e [NP];
  logic          osc_test_go = 0, osc_test_out;
  int            checks = 0, failures = 0;

  // Two reset pulses: the first clears the flip-flops that also drive the
  // counters' clear line, so the second gives that line a clean edge.
  initial begin #0.5 reset_in = 1; #0.5 reset_in = 0; #0.5 reset_in = 1; end

  localparam logic [3:0] SEQ [15] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011, 4'b0110,
    4'b1100, 4'b1001, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1000
  };

  gossipo2 dut (.*);

  always #12.5 event_clk = ~event_clk;

  // ---- mechanism counters
  int n_hits_read, n_latency, n_self_clear, n_hold, n_masked, n_below,
      n_trim, n_test, n_ignored, n_chained, n_cfg_readback, n_osc_edges;

  always @(posedge osc_test_out) n_osc_edges++;
  for (genvar i = 0; i < NP; i++) begin : g_mon
    always @(posedge clear_hit[i]) n_self_clear++;
  end

  // ---- configuration of pixel i (row * NC + col)
  function automatic bit cfg_mask(input int i);   return i % 41 == 7;  endfunction
  function automatic bit cfg_test(input int i);   return i % 5 == 0;   endfunction
  function automatic int cfg_dac(input int i);    return (i % 3 == 1) ? 15 : 0; endfunction

  function automatic int pixel_at(input int k);
    int c, r;
    c = k / NR;
    r = (c % 2 == 0) ? k % NR : NR - 1 - k % NR;
    return r * NC + c;
  endfunction

  function automatic int decode(input logic [3:0] s);
    for (int i = 0; i < 15; i++) if (SEQ[i] == s) return i;
    return -1;
  endfunction

  function automatic int expected_fast(input real w);
    return (w > 0.893) ? int'($floor((w - 0.893) / 1.786)) + 1 : 0;
  endfunction

  // Comparator delay of pixel i for q electrons; -1 if it does not fire.
  function automatic int fe_delay(input int i, input int q);
    int amp_uv, thr_uv;
    amp_uv = q * 60;
    thr_uv = (THR_MV - cfg_dac(i) * RANGE_MV / 15) * 1000;
    if (cfg_mask(i) || amp_uv <= thr_uv) return -1;
    return (amp_uv >= 2 * thr_uv) ? 8 : 30;
  endfunction

  int exp_lat [NP];
  int exp_fast [NP];

  // Expected counts for a charge arriving t ns after rising edge P0 with
  // the readout starting in the low phase after rising edge P(r).
  task automatic expect_hit(input int i, input real t, input int delay, input int r);
    real td;
    int  closing;
    td = t + delay;
    closing = int'($floor(td / 25.0)) + 1;
    exp_fast[i] = expected_fast(closing * 25.0 - td);
    exp_lat[i]  = r - closing;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic to_low(); @(negedge event_clk); #2; endtask

  // Put q electrons on pad i, t ns from now.
  task automatic strike_later(input int i, input real t, input int q);
    fork
      begin
        #(t * 1ns);
        pad_charge_e[i] = 16'(q);
        pad_strike[i] = 1;
        #0.1 pad_strike[i] = 0;
      end
    join_none
  endtask

  // Read the whole chain (plus extra bits) and compare with exp_*.
  // prev_bits are fed into the chain input; they must come out at the end.
  task automatic read_and_compare(input int extra, input logic [31:0] prev_bits,
                                  input int ignore_at, input string tag);
    logic bits [];
    bits = new[8 * NP + extra];
    to_low();
    read = 1;
    for (int n = 0; n < 8 * NP + extra; n++) begin
      previous = (n < 32) ? prev_bits[n] : 1'b0;
      #1 bits[n] = next;
      if (n == ignore_at) begin
        // Hits during readout must not be taken.
        for (int i = 0; i < NP; i++) if (i % 16 == 9) strike_later(i, 0.0, 20000);
        #1;
        for (int i = 0; i < NP; i++)
          if (i % 16 == 9) begin
            check(!hit[i], $sformatf("%s: hit on pixel %0d during readout ignored", tag, i));
            n_ignored++;
          end
      end
      @(posedge event_clk); @(negedge event_clk); #2;
    end
    read = 0;
    previous = 0;
    #1;
    check(hit == '0, {tag, ": all pixels cleared after readout"});
    for (int k = 0; k < NP; k++) begin
      int p, pos, lat, fast;
      p   = pixel_at(k);
      pos = (NP - 1 - k) * 8;
      lat  = decode({bits[pos], bits[pos+1], bits[pos+2], bits[pos+3]});
      fast = decode({bits[pos+4], bits[pos+5], bits[pos+6], bits[pos+7]});
      check(lat == exp_lat[p] && fast == exp_fast[p],
            $sformatf("%s: pixel %0d (row %0d col %0d): lat %0d/%0d fast %0d/%0d", tag,
                      p, p / NC, p % NC, lat, exp_lat[p], fast, exp_fast[p]));
      if (exp_fast[p] != 0 || exp_lat[p] != 0) n_hits_read++;
      if (exp_lat[p] > 0) n_latency++;
    end
    for (int n = 0; n < extra && n < 32; n++) begin
      check(bits[8 * NP + n] == prev_bits[n], $sformatf("%s: chained bit %0d", tag, n));
      n_chained++;
    end
  endtask

  task automatic clear_expect();
    foreach (exp_lat[i]) begin exp_lat[i] = 0; exp_fast[i] = 0; end
  endtask

  initial begin
    #3ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6*NP-1:0] pattern;
    foreach (pad_charge_e[i]) pad_charge_e[i] = '0;
    n_hits_read = 0; n_latency = 0; n_self_clear = 0; n_hold = 0; n_masked = 0;
    n_below = 0; n_trim = 0; n_test = 0; n_ignored = 0; n_chained = 0;
    n_cfg_readback = 0; n_osc_edges = 0;
    repeat (2) @(posedge event_clk);
    to_low();
    reset_in = 0;
    n_self_clear = 0;   // forget edges from the random power-up state

    // ---- Configuration: a random pattern goes round the chain, then the
    // real configuration pushes it out at contr_out.
    for (int i = 0; i < 6 * NP; i++) pattern[i] = 1'($urandom);
    for (int i = 0; i < 6 * NP; i++) begin
      contr_in = pattern[i]; #5 contr_clk = 1; #5 contr_clk = 0;
    end
    begin
      int bad;
      bad = 0;
      for (int k = NP - 1; k >= 0; k--) begin
        logic [5:0] w;
        int p;
        p = pixel_at(k);
        w = {cfg_test(p), cfg_mask(p), 4'(cfg_dac(p))};
        for (int b = 5; b >= 0; b--) begin
          int n;
          n = (NP - 1 - k) * 6 + (5 - b);
          if (contr_out != pattern[n]) bad++;
          contr_in = w[b]; #5 contr_clk = 1; #5 contr_clk = 0;
        end
      end
      check(bad == 0, $sformatf("configuration chain readback, %0d bad bits", bad));
      n_cfg_readback++;
    end

    // ---- Phase 1: old hits are removed by self clear.
    en_clear = 1;
    @(posedge event_clk);
    for (int i = 0; i < NP; i++) if (i % 16 == 3) strike_later(i, 5.0, 10000);
    repeat (20) @(posedge event_clk);
    check(n_self_clear == NP / 16, $sformatf("%0d self clears", n_self_clear));
    for (int i = 0; i < NP; i++) if (i % 16 == 3) check(!hit[i], "old hit cleared");

    // ---- Phase 2: hits over 12 cycles, read out in time.
    clear_expect();
    @(posedge event_clk);     // P0
    for (int i = 0; i < NP; i++) begin
      int  c, q, d;
      real s;
      if (i % 16 <= 2) begin
        c = i % 12;
        s = 0.5 + (i % 17) * 0.97;
        q = (i % 3 == 1) ? 3000 : 10000;
      end else if (i % 16 == 5) begin
        c = 0; s = 2.0; q = 3000;
      end else continue;
      strike_later(i, c * 25.0 + s, q);
      d = fe_delay(i, q);
      if (d >= 0) expect_hit(i, c * 25.0 + s, d, 13);
      if (cfg_mask(i)) n_masked++;
      else if (d < 0) n_below++;
      else if (q == 3000 && THR_MV * 1000 >= q * 60) n_trim++;
    end
    repeat (13) @(posedge event_clk);   // P13
    read_and_compare(32, 32'hC5A3_96F1, 100, "in-time readout");

    // ---- Phase 3: hold mode, no self clear, hits kept for 40 cycles.
    en_clear = 0;
    clear_expect();
    begin
      int sc_before;
      sc_before = n_self_clear;
      @(posedge event_clk);
      for (int i = 0; i < NP; i++)
        if (i % 16 == 12) begin
          strike_later(i, 4.0, 10000);
          if (fe_delay(i, 10000) >= 0) begin
            expect_hit(i, 4.0, fe_delay(i, 10000), 1);
            exp_lat[i] = 0;            // latency counter never starts
            n_hold++;
          end
        end
      repeat (40) @(posedge event_clk);
      check(n_self_clear == sc_before, "no self clear in hold mode");
    end
    read_and_compare(0, '0, -1, "hold mode");

    // ---- Phase 4: test pulse, 60 mV step through 13.5 fF = 5056 e.
    en_clear = 1;
    clear_expect();
    test_step_mv = 60;
    @(posedge event_clk);
    #3 test = 1;
    for (int i = 0; i < NP; i++)
      if (cfg_test(i) && fe_delay(i, 5056) >= 0) begin
        expect_hit(i, 3.0, fe_delay(i, 5056), 4);
        n_test++;
      end
    repeat (4) @(posedge event_clk);
    test = 0;
    read_and_compare(0, '0, -1, "test pulse");

    // ---- Phase 5: the individual test oscillator, 20 ns -> 11 edges.
    osc_test_go = 1; #20 osc_test_go = 0; #10;
    check(n_osc_edges == 11, $sformatf("test oscillator gave %0d edges", n_osc_edges));
    // Raising the supply by 60 mV speeds it up by 6 %: 12 edges in 20 ns.
    vdd_mv = 1260; n_osc_edges = 0;
    osc_test_go = 1; #20 osc_test_go = 0; #10;
    check(n_osc_edges == 12, $sformatf("test oscillator at 1260 mV gave %0d edges", n_osc_edges));
    vdd_mv = 1200;

    // ---- Every mechanism must have occurred.
    check(n_hits_read > 0,    "hits read out");
    check(n_latency > 0,      "latency counted");
    check(n_self_clear > 0,   "self clear");
    check(n_hold > 0,         "hold mode");
    check(n_masked > 0,       "masked pixels");
    check(n_below > 0,        "below-threshold charges");
    check(n_trim > 0,         "trim DAC rescued a small charge");
    check(n_test > 0,         "test pulse injection");
    check(n_ignored > 0,      "hits ignored during readout");
    check(n_chained > 0,      "chip chaining");
    check(n_cfg_readback > 0, "configuration readback");
    $display("mechanisms: hits %0d latency %0d self-clear %0d hold %0d masked %0d below %0d trim %0d test %0d ignored %0d chained %0d cfg %0d osc-edges %0d",
             n_hits_read, n_latency, n_self_clear, n_hold, n_masked, n_below, n_trim,
             n_test, n_ignored, n_chained, n_cfg_readback, n_osc_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
