// local_osc: behavioural model of the per-pixel gated ring oscillator.
// This is not synthesizable logic; it stands for an analog ring of one NAND
// gate (the start/stop control) and 12 inverters whose delay sets the period.
//
// Function: while osc_go is high the output toggles. At the reference
// conditions (VDD_REF_MV = 1200 mV, TEMP_REF_C = 27 C) the half period is
// HALF_PERIOD_PS (default 893 ps, i.e. 560 MHz, so one period is one TDC step
// of 25 ns / 14 = 1.78 ns). Away from them the frequency scales by
//   1 + KV_PPM_PER_MV * (vdd_mv - VDD_REF_MV) + KT_PPM_PER_C * (temp_c - TEMP_REF_C)
// (in parts per million): +0.1 % per mV of supply and -0.2 % per degree C.
// So about +-60 mV of supply or +-35 C moves a 25 ns measurement by one step.
// The supply and temperature inputs are read at the start of every half
// period.
//
// osc_out is low when the oscillator is idle. The first rising edge comes half
// a period after osc_go rises. A flip-flop on the control input makes the stop
// glitch free: once osc_go falls no further rising edge is produced, and a
// high phase already started is completed at full length, so the counter
// clocked by osc_out never sees a short pulse.
//
// From the source design: NAND control, 12-inverter delay, 560 MHz nominal,
// glitch-free stop, the size of the supply (0.1 %/mV) and temperature
// (0.2 %/C) coefficients. The source quotes these with signs opposite to its
// own measurement (frequency rising with supply, falling with temperature);
// this model follows the measured signs. This model's own choices: the
// reference temperature, idle level low, first edge after half a period.
// The measured part ran at 530 MHz at 1.2 V; set HALF_PERIOD_PS = 943 to
// model that.
module local_osc #(
  parameter int unsigned HALF_PERIOD_PS = 893,   // half period at reference
  parameter int          VDD_REF_MV     = 1200,  // reference supply
  parameter int          TEMP_REF_C     = 27,    // reference temperature
  parameter int          KV_PPM_PER_MV  = 1000,  // +0.1 % per mV
  parameter int          KT_PPM_PER_C   = -2000  // -0.2 % per degree C
) (
  input  logic              osc_go,   // start (1) / stop (0) request
  input  logic [11:0]       vdd_mv,   // supply voltage, mV
  input  logic signed [7:0] temp_c,   // temperature, degree C
  output logic              osc_out   // oscillator output
);
  timeunit 1ns;
  timeprecision 1ps;

  // Half period in ps at the present supply and temperature.
  function automatic real half_period_ps();
    real scale;
    scale = 1.0 + 1.0e-6 * (real'(KV_PPM_PER_MV) * real'(int'(vdd_mv) - VDD_REF_MV)
                          + real'(KT_PPM_PER_C) * real'(int'(temp_c) - TEMP_REF_C));
    if (scale < 0.1) scale = 0.1;
    return real'(HALF_PERIOD_PS) / scale;
  endfunction

  initial osc_out = 1'b0;

  always begin
    wait (osc_go);
    #(half_period_ps() * 1ps);
    if (osc_go) begin
      osc_out = 1'b1;
      #(half_period_ps() * 1ps);
      osc_out = 1'b0;
    end
  end

endmodule
