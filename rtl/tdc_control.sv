// tdc_control: the control logic of one pixel's time-to-digital converter.
//
// A hit (rising edge of the discriminator output disc) sets the hit flag and
// starts the local oscillator (osc_go). The oscillator clocks the fast LFSR
// until the first rising edge of the event clock after the hit, which sets
// meas_done and stops it: the fast count is the time from the hit to the end
// of the 25 ns event cycle (drift time = 25 ns - measured time). From then on
// the latency LFSR counts event clock cycles through the gated clock
// count_events, so the pixel records how long ago the hit happened.
//
// Self clear (en_clear = 1): when the latency counter reaches its last state
// (LFSR_LAST, 14 cycles = 350 ns) clear_hit pulses for one event clock period,
// starting at the next falling edge, and clears the pixel. With en_clear = 0
// the latency counter never starts and the hit is held until it is read.
//
// Readout (read = 1): both LFSRs become shift registers clocked by the event
// clock (shift = 1, fast_sel = 0, count_events follows the event clock) and
// new hits are ignored. When read falls the pixel is cleared (rd_clear, from
// the fall of read to the next rising event clock edge).
//
// Interface rule: read changes only while event_clk is low (checked by an
// assertion); the clock multiplexer of the fast LFSR and the clock gate rely
// on it. clr is the asynchronous clear for both LFSRs.
//
// count_events is made by a latch-based clock gate: the enable is latched
// while event_clk is low, so the gated clock has no short pulses. That latch
// is intended.
//
// From the source design: start on hit, stop at the first event clock edge,
// latency counting, self clear at the counter's last value, hold without
// self clear, no data taking during readout, clear after readout. This
// design's own choices: the clear_hit timing and length, the clear after
// readout ending at the next rising edge, the clock gate.
module tdc_control
  import gossipo_pkg::*;
(
  input  logic              reset,        // global reset, active high
  input  logic              event_clk,    // 40 MHz event clock
  input  logic              read,         // readout mode
  input  logic              en_clear,     // self clear enabled
  input  logic              disc,         // discriminator output
  input  logic [LFSR_W-1:0] lat_q,        // latency LFSR state
  output logic              osc_go,       // run the local oscillator
  output logic              fast_sel,     // fast LFSR clocked by the oscillator
  output logic              shift,        // LFSRs in shift (readout) mode
  output logic              count_events, // gated event clock, latency LFSR
  output logic              clr,          // clear both LFSRs
  output logic              hit,          // pixel holds a hit
  output logic              clear_hit     // self-clear pulse
);
  timeunit 1ns;
  timeprecision 1ps;

  logic meas_done;   // hit window closed by an event clock edge
  logic was_read;    // read seen at the last rising event clock edge
  logic rd_clear;    // clear after readout
  logic gate_en;     // enable of the event clock gate
  logic gate_q;      // latched enable

  assign rd_clear = was_read & ~read;
  assign clr      = reset | clear_hit | rd_clear;

  // Hit flag, clocked by the discriminator. Hits during readout are ignored.
  always_ff @(posedge disc or posedge clr) begin
    if (clr) hit <= 1'b0;
    else     hit <= hit | ~read;
  end

  // The first event clock edge after the hit ends the time measurement.
  always_ff @(posedge event_clk or posedge clr) begin
    if (clr) meas_done <= 1'b0;
    else     meas_done <= meas_done | hit;
  end

  assign osc_go   = hit & ~meas_done;
  assign fast_sel = ~read;
  assign shift    = read;

  // Latency counting runs until the last state; readout shifts on every edge.
  assign gate_en = read | (meas_done & en_clear & (lat_q != LFSR_LAST));

  always_latch begin
    if (!event_clk) gate_q = gate_en;
  end

  assign count_events = event_clk & gate_q;

  // Self clear once the latency counter has reached its last state.
  always_ff @(negedge event_clk or posedge reset) begin
    if (reset) clear_hit <= 1'b0;
    else       clear_hit <= en_clear & ~read & meas_done & (lat_q == LFSR_LAST);
  end

  always_ff @(posedge event_clk or posedge reset) begin
    if (reset) was_read <= 1'b0;
    else       was_read <= read;
  end

  // read may change only while the event clock is low.
  always @(negedge event_clk) begin
    if (!reset)
      assert (read == was_read)
        else $error("tdc_control: read changed while event_clk was high");
  end

endmodule
