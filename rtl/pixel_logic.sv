// pixel_logic: the digital part of one GOSSIPO-2 pixel.
//
// It holds the TDC control, two 4-bit LFSRs and the 6-bit configuration
// register. The fast LFSR counts oscillator periods from the hit to the end of
// the event cycle (drift time); the latency LFSR counts event clock cycles
// since then (trigger latency). The oscillator itself is outside this module:
// osc_go starts it and osc_clk is its output.
//
// Readout chain inside the pixel: data_in -> fast LFSR stage 1..4 -> latency
// LFSR stage 1..4 -> data_out. After a full readout the pixel's 8 bits have
// left in the order lat[3], lat[2], lat[1], lat[0], fast[3], ..., fast[0].
// Configuration chain: cfg_in -> 6-bit register -> cfg_out, clocked by
// cfg_clk. cfg gives the word to the front end and trim DAC of the pixel.
//
// Timing: the counters and the readout shift on rising edges of their clocks;
// see tdc_control for the control sequence and the rule on read.
//
// From the source design: the parts and their roles, readout through the
// counters, data entering at the fast counter (as drawn in the pixel block
// diagram). This design's own choices: the order inside the chain.
module pixel_logic
  import gossipo_pkg::*;
(
  input  logic       reset,      // global reset, active high
  input  logic       event_clk,  // 40 MHz event clock (also readout clock)
  input  logic       read,       // readout mode
  input  logic       en_clear,   // self clear enabled
  input  logic       disc,       // discriminator output
  input  logic       osc_clk,    // local oscillator output
  output logic       osc_go,     // local oscillator run request
  input  logic       data_in,    // readout chain in
  output logic       data_out,   // readout chain out
  input  logic       cfg_clk,    // configuration clock
  input  logic       cfg_in,     // configuration chain in
  output logic       cfg_out,    // configuration chain out
  output pixel_cfg_t cfg,        // configuration word
  output logic       hit,        // pixel holds a hit (observation only)
  output logic       clear_hit,  // self-clear pulse (observation only)
  output logic [LFSR_W-1:0] fast_q,  // drift time counter (observation only)
  output logic [LFSR_W-1:0] lat_q    // latency counter (observation only)
);
  timeunit 1ns;
  timeprecision 1ps;

  logic              fast_sel, shift, count_events, clr;
  logic              fast_dout;

  tdc_control u_ctrl (
    .reset, .event_clk, .read, .en_clear, .disc, .lat_q,
    .osc_go, .fast_sel, .shift, .count_events, .clr, .hit, .clear_hit
  );

  // Drift time counter: oscillator while measuring, event clock in readout.
  lfsr4 u_fast (
    .clk_a(osc_clk), .clk_b(event_clk), .sel_a(fast_sel), .shift,
    .din(data_in), .clr, .q(fast_q), .dout(fast_dout)
  );

  // Latency counter: gated event clock, both while counting and in readout.
  lfsr4 u_lat (
    .clk_a(1'b0), .clk_b(count_events), .sel_a(1'b0), .shift,
    .din(fast_dout), .clr, .q(lat_q), .dout(data_out)
  );

  pixel_config u_cfg (
    .cfg_clk, .reset, .cfg_in, .cfg_out, .cfg
  );

endmodule
