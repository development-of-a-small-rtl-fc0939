// tb_tdc_control: self-checking testbench for the pixel TDC control.
//
// The testbench plays the discriminator, the event clock (25 ns, rising
// edges at 12.5 + 25k ns), the readout line and the latency counter (a
// model that walks a hand-written table of the LFSR states on every edge of
// count_events). It checks: the oscillator runs from the hit to the next
// rising event clock edge; with self clear the latency counter gets exactly
// 14 edges, then clear_hit pulses for one period half a period later and
// clears the hit; without self clear nothing is counted and the hit is held;
// in readout the gated clock follows the event clock, the counters are in
// shift mode, hits are ignored, and the pixel is cleared when read falls;
// a second hit does not restart the oscillator.
module tb_tdc_control;
  timeunit 1ns;
  timeprecision 1ps;

  logic       reset = 0, event_clk = 0, read = 0, en_clear = 1, disc = 0;
  logic [3:0] lat_q;
  logic       osc_go, fast_sel, shift, count_events, clr, hit, clear_hit;
  int         checks = 0, failures = 0;

  // Two reset pulses: the first clears the flip-flops that also drive the
  // counters' clear line, so the second gives that line a clean edge.
  initial begin #0.5 reset = 1; #0.5 reset = 0; #0.5 reset = 1; end

  localparam logic [3:0] SEQ [15] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011, 4'b0110,
    4'b1100, 4'b1001, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1000
  };

  tdc_control dut (.*);

  always #12.5 event_clk = ~event_clk;

  // Latency counter model.
  int lat_idx;
  int count_edges;     // count_events edges outside readout
  int shift_edges;     // count_events edges during readout
  int clear_pulses;
  realtime t_go_rise, t_go_fall, t_clr_rise, t_clr_fall, t_last_count;
  always @(posedge count_events or posedge clr) begin
    if (clr) lat_idx = 0;
    else if (shift) shift_edges++;
    else begin lat_idx = (lat_idx + 1) % 15; count_edges++; t_last_count = $realtime; end
  end
  assign lat_q = SEQ[lat_idx];
  always @(posedge osc_go) t_go_rise = $realtime;
  always @(negedge osc_go) t_go_fall = $realtime;
  always @(posedge clear_hit) begin t_clr_rise = $realtime; clear_pulses++; end
  always @(negedge clear_hit) t_clr_fall = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic fire(); disc = 1; #10 disc = 0; endtask
  // Move to 2 ns after a falling event clock edge (low phase).
  task automatic to_low(); @(negedge event_clk); #2; endtask
  task automatic cycles(input int n); repeat (n) @(posedge event_clk); endtask

  initial begin
    #50000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lat_idx = 0; count_edges = 0; shift_edges = 0; clear_pulses = 0;
    cycles(3); to_low();
    reset = 0;
    cycles(2);
    check(!hit && !osc_go && !clr && !clear_hit, "idle after reset");
    // --- Hit with self clear: hit 7 ns after a rising edge -> 18 ns window.
    @(posedge event_clk); #7;
    fire();
    check(hit, "hit flag set by the discriminator");
    @(posedge event_clk); #1;
    check(t_go_fall - t_go_rise == 18.0, "oscillator runs until the next event clock edge");
    check(!osc_go && fast_sel && !shift, "oscillator stopped, counters in count mode");
    count_edges = 0;
    fire();     // second hit while busy
    check(!osc_go, "second hit does not restart the oscillator");
    cycles(20);
    check(count_edges == 14, $sformatf("14 latency edges, got %0d", count_edges));
    check(clear_pulses == 1, "one self-clear pulse");
    check(t_clr_rise - t_last_count == 12.5, "clear_hit half a period after the last state");
    check(t_clr_fall - t_clr_rise == 25.0, "clear_hit lasts one event clock period");
    check(!hit && lat_q == 4'b0000, "pixel cleared by self clear");
    // --- Hit, then readout in time (after 5 latency cycles).
    to_low();
    fire();
    count_edges = 0;
    cycles(6); to_low();
    read = 1;
    check(count_edges == 5, $sformatf("5 latency edges before readout, got %0d", count_edges));
    #1 check(shift && !fast_sel, "readout: shift mode, event clock on the fast counter");
    shift_edges = 0;
    to_low(); fire();
    cycles(20); to_low();
    check(shift_edges == 21, $sformatf("gated clock follows event clock in readout, got %0d", shift_edges));
    check(count_edges == 5, "no latency counting during readout");
    check(clear_pulses == 1, "no self clear during readout");
    check(hit, "hit still held during readout");
    read = 0;
    #1 check(clr && !hit, "cleared when read falls");
    @(posedge event_clk); #1;
    check(!clr, "clear ends at the next rising edge");
    // --- Hits during readout are ignored.
    to_low(); read = 1;
    to_low(); fire();
    check(!hit && !osc_go, "hit ignored during readout");
    to_low(); read = 0;
    // --- Self clear disabled: hit held, nothing counted.
    en_clear = 0;
    to_low(); fire();
    count_edges = 0;
    cycles(40);
    check(hit && count_edges == 0 && clear_pulses == 1, "without self clear the hit is held");
    to_low(); read = 1; cycles(3); to_low(); read = 0;
    #1 check(!hit, "held hit cleared after readout");
    // --- Global reset clears a hit.
    to_low(); fire();
    reset = 1; #1;
    check(!hit && clr, "reset clears the hit");
    reset = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
