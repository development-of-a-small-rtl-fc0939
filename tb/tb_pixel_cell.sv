// tb_pixel_cell: self-checking testbench for one complete pixel (front end,
// trim DAC, oscillator and pixel logic).
//
// Threshold 100 mV, 60 mV per 1000 electrons. A 5000-electron hit fires the
// discriminator 8 ns after it arrives, so a hit s ns after a rising event
// clock edge leaves 25 - s - 8 ns for the oscillator; the testbench checks
// the read-out drift count against that, the latency count, that a hit below
// threshold is not recorded until the trim DAC is raised, that the mask
// blocks hits, and that the test pulse reaches the pixel only with
// enable_test set.
module tb_pixel_cell;
  timeunit 1ns;
  timeprecision 1ps;

  logic        reset = 0, event_clk = 0, read = 0, en_clear = 1;
  logic        cfg_clk = 0, cfg_in = 0, cfg_out, data_in = 0, data_out;
  logic        pad_strike = 0, test_pulse = 0, hit, clear_hit;
  logic [15:0] pad_charge_e = 0;
  logic signed [7:0] offset_mv = 0;
  logic [7:0]  noise_e = 0;
  logic [11:0] test_step_mv = 0, threshold_mv = 100;
  logic [7:0]  dac_range_mv = 130;
  logic [11:0]   vdd_mv = 1200;   // reference supply, 560 MHz oscillators
  logic signed [7:0] temp_c = 27;
  int          checks = 0, failures = 0;

  // Two reset pulses: the first clears the flip-flops that also drive the
  // counters' clear line, so the second gives that line a clean edge.
  initial begin #0.5 reset = 1; #0.5 reset = 0; #0.5 reset = 1; end

  localparam logic [3:0] SEQ [15] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011, 4'b0110,
    4'b1100, 4'b1001, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1000
  };

  pixel_cell dut (.*);

  always #12.5 event_clk = ~event_clk;

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

  task automatic configure(input bit en_test, input bit mask, input logic [3:0] dac);
    logic [5:0] w;
    w = {en_test, mask, dac};
    for (int i = 5; i >= 0; i--) begin
      cfg_in = w[i]; #5 cfg_clk = 1; #5 cfg_clk = 0;
    end
  endtask

  task automatic read_pixel(output int lat, output int fast);
    logic [7:0] b;
    to_low();
    read = 1;
    for (int i = 0; i < 8; i++) begin
      #1 b[i] = data_out;
      @(posedge event_clk); @(negedge event_clk); #2;
    end
    read = 0;
    #1;
    lat  = decode({b[0], b[1], b[2], b[3]});
    fast = decode({b[4], b[5], b[6], b[7]});
  endtask

  task automatic strike(input int q);
    pad_charge_e = 16'(q);
    pad_strike = 1; #0.1 pad_strike = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, fast;
    repeat (2) @(posedge event_clk);
    to_low();
    reset = 0;
    configure(0, 0, 0);
    // Drift time through the whole pixel, latency 3.
    for (int k = 0; k < 8; k++) begin
      real s;
      s = 0.5 + 2.0 * k;
      @(posedge event_clk); #(s * 1ns);
      strike(5000);
      @(posedge event_clk);
      repeat (3) @(posedge event_clk);   // three counted edges
      read_pixel(lat, fast);
      check(fast == expected_fast(25.0 - s - 8.0),
            $sformatf("hit at %.1f ns: fast %0d expected %0d", s, fast, expected_fast(17.0 - s)));
      check(lat == 3, $sformatf("latency %0d expected 3", lat));
    end
    // Below threshold: 1600 e = 96 mV < 100 mV.
    to_low(); strike(1600);
    repeat (4) @(posedge event_clk);
    check(!hit, "charge below threshold not recorded");
    // Trim DAC code 1 (130/15 = 8 mV): threshold 92 mV, the same charge fires.
    configure(0, 0, 1);
    to_low(); strike(1600);
    repeat (3) @(posedge event_clk);
    check(hit, "trim DAC lets the small charge through");
    read_pixel(lat, fast);
    // Mask.
    configure(0, 1, 0);
    to_low(); strike(20000);
    repeat (3) @(posedge event_clk);
    check(!hit, "masked pixel ignores a large charge");
    // Test pulse: 60 mV step = 5056 e, only with enable_test.
    test_step_mv = 60;
    configure(0, 0, 0);
    to_low(); test_pulse = 1; #40 test_pulse = 0;
    check(!hit, "test pulse blocked with the test switch open");
    configure(1, 0, 0);
    to_low(); test_pulse = 1; #40 test_pulse = 0;
    check(hit, "test pulse reaches the pixel with enable_test");
    read_pixel(lat, fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
