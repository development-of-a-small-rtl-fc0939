// threshold_dac: behavioural model of the 4-bit threshold trim DAC of a pixel.
// This stands for an analog circuit: a current, switched in 15 equal steps,
// through a 400 kOhm resistor lowers the pixel's local threshold voltage.
//
// Function: trim_mv = code * range_mv / 15 (integer millivolts, rounded
// down). range_mv is set on the real chip by an external bias current; the
// design target is 130 mV (five times the 26 mV threshold spread), reached
// with 300 nA of DAC current. The output is combinational.
//
// From the source design: 4 bits, 15 steps, range set by a bias, lowers the
// threshold. This model's own choices: millivolt integer ports, linear steps.
module threshold_dac (
  input  logic [3:0] code,      // DAC setting from the configuration register
  input  logic [7:0] range_mv,  // full-scale threshold decrease (bias setting)
  output logic [7:0] trim_mv    // threshold decrease applied to this pixel
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [11:0] product;

  always_comb begin
    product = 12'(code) * 12'(range_mv);
    trim_mv = 8'(product / 12'd15);
  end

endmodule
