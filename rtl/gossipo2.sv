// gossipo2: top level of the GOSSIPO-2 prototype pixel chip.
//
// A 16 x 16 array of 55 um pixels, each with a preamp, discriminator, 4-bit
// threshold trim, a local 560 MHz oscillator and a 4+4 bit LFSR TDC, for a
// gas pixel detector in which the drift time of each primary electron gives
// the third coordinate of a track. The chip has no readout logic of its own:
// with read high, all pixels shift their 8 bits out through one chain, 2048
// bits at the event clock rate; previous and next let several chips be
// chained. Configuration is a second chain of 1536 bits (contr_in, contr_clk,
// contr_out). Beside the array the chip carries an individual copy of the
// pixel oscillator for characterisation (osc_test_go, osc_test_out).
//
// Analog inputs are given as integers: the global threshold in mV above the
// preamp baseline, the trim DAC range in mV (set by a bias on the chip), the
// test pulse step in mV, the supply voltage and temperature (which set the
// speed of every pixel oscillator; 1200 mV and 27 C give 560 MHz), and the
// charge on each pad in electrons with a strobe marking its arrival, and a
// threshold offset per pixel that stands for the spread between pixels, and
// the r.m.s. front-end noise in electrons (0 for noiseless pulses). Pads
// and offsets are indexed by row * NCOLS + col.
//
// Pin names follow the chip's bond pads where the layout shows them; the
// analog-value ports are this model's own. Bias lines, supplies and the
// bandgap reference are not modelled.
module gossipo2
  import gossipo_pkg::*;
#(
  parameter int unsigned NROWS = 16,
  parameter int unsigned NCOLS = 16
) (
  input  logic        reset_in,      // global reset, active high
  input  logic        event_clk,     // 40 MHz event (bunch crossing) clock
  input  logic        read,          // 1: readout, 0: data taking
  input  logic        en_clear,      // self clear of old hits
  input  logic        test,          // common test pulse line
  input  logic [11:0] test_step_mv,  // test pulse amplitude, mV
  input  logic [11:0] threshold_mv,  // global threshold, mV above baseline
  input  logic [7:0]  dac_range_mv,  // trim DAC full scale, mV
  input  logic signed [7:0] offset_mv [NROWS*NCOLS],  // threshold spread, mV
  input  logic [7:0]  noise_e,       // r.m.s. front-end noise, electrons
  input  logic [11:0] vdd_mv,        // supply voltage, mV (oscillator speed)
  input  logic signed [7:0] temp_c,  // chip temperature, degree C
  input  logic        contr_clk,     // configuration clock
  input  logic        contr_in,      // configuration chain in
  output logic        contr_out,     // configuration chain out
  input  logic        previous,      // readout chain in (from a previous chip)
  output logic        next,          // readout chain out (to the next chip)
  input  logic [NROWS*NCOLS-1:0] pad_strike,        // charge arrives at a pad
  input  logic [15:0] pad_charge_e [NROWS*NCOLS],   // charge per pad, electrons
  output logic [NROWS*NCOLS-1:0] hit,               // hit flags (observation)
  output logic [NROWS*NCOLS-1:0] clear_hit,         // self clears (observation)
  input  logic        osc_test_go,   // individual test oscillator: run
  output logic        osc_test_out   // individual test oscillator: output
);
  timeunit 1ns;
  timeprecision 1ps;

  pixel_array #(.NROWS(NROWS), .NCOLS(NCOLS)) u_array (
    .reset(reset_in), .event_clk, .read, .en_clear,
    .cfg_clk(contr_clk), .cfg_in(contr_in), .cfg_out(contr_out),
    .data_in(previous), .data_out(next),
    .pad_strike, .pad_charge_e, .test_pulse(test), .test_step_mv,
    .threshold_mv, .dac_range_mv, .offset_mv, .noise_e, .vdd_mv, .temp_c, .hit, .clear_hit
  );

  local_osc u_test_osc (
    .osc_go(osc_test_go), .vdd_mv, .temp_c, .osc_out(osc_test_out)
  );

endmodule
