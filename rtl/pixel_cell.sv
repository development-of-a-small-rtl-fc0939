// pixel_cell: one complete GOSSIPO-2 pixel, 55 x 55 um on the chip.
//
// The charge from the input pad (or from the common test line, if this
// pixel's test switch is on) goes to the preamp and discriminator (frontend).
// The discriminator's threshold is the global threshold plus this pixel's
// offset (its share of the threshold spread), lowered by the pixel's 4-bit
// trim DAC; the mask bit disables the pixel. noise_e sets the front-end
// noise, and vdd_mv and temp_c set the oscillator speed. A discriminator
// pulse starts the local ring oscillator and the TDC in pixel_logic, which
// measures the time to the end of the event cycle and then the latency.
// The pixel is a link in two chips-wide chains: readout data (data_in ->
// data_out, 8 bits) and configuration (cfg_in -> cfg_out, 6 bits).
//
// The front end, the trim DAC and the oscillator are behavioural models of
// analog circuits, so this module simulates but is not synthesizable as a
// whole; pixel_logic is its synthesizable part.
module pixel_cell
  import gossipo_pkg::*;
(
  input  logic        reset,         // global reset, active high
  input  logic        event_clk,     // 40 MHz event clock
  input  logic        read,          // readout mode
  input  logic        en_clear,      // self clear enabled
  input  logic        cfg_clk,       // configuration clock
  input  logic        cfg_in,        // configuration chain in
  output logic        cfg_out,       // configuration chain out
  input  logic        data_in,       // readout chain in
  output logic        data_out,      // readout chain out
  input  logic        pad_strike,    // charge arrives at the pad (rising edge)
  input  logic [15:0] pad_charge_e,  // that charge, electrons
  input  logic        test_pulse,    // common test line
  input  logic [11:0] test_step_mv,  // test step amplitude, mV
  input  logic [11:0] threshold_mv,  // global threshold above baseline, mV
  input  logic [7:0]  dac_range_mv,  // trim DAC full scale, mV
  input  logic signed [7:0] offset_mv,  // threshold offset of this pixel, mV
  input  logic [7:0]  noise_e,       // r.m.s. input noise, electrons
  input  logic [11:0] vdd_mv,        // supply voltage, mV (oscillator)
  input  logic signed [7:0] temp_c,  // temperature, degree C (oscillator)
  output logic        hit,           // pixel holds a hit (observation only)
  output logic        clear_hit      // self-clear pulse (observation only)
);
  timeunit 1ns;
  timeprecision 1ps;

  pixel_cfg_t        cfg;
  logic [7:0]        trim_mv;
  logic              disc, osc_go, osc_clk;

  frontend u_fe (
    .pad_strike, .pad_charge_e, .test_pulse, .test_step_mv,
    .enable_test(cfg.enable_test), .mask(cfg.mask),
    .threshold_mv, .offset_mv, .trim_mv, .noise_e, .disc
  );

  threshold_dac u_dac (
    .code(cfg.dac), .range_mv(dac_range_mv), .trim_mv
  );

  local_osc u_osc (
    .osc_go, .vdd_mv, .temp_c, .osc_out(osc_clk)
  );

  pixel_logic u_logic (
    .reset, .event_clk, .read, .en_clear, .disc, .osc_clk, .osc_go,
    .data_in, .data_out, .cfg_clk, .cfg_in, .cfg_out, .cfg,
    .hit, .clear_hit, .fast_q(), .lat_q()
  );

endmodule
