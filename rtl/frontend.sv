// frontend: behavioural model of a pixel's analog front end, i.e. the charge
// sensitive preamplifier, the discriminator, the test-injection switch and
// the mask. It is not synthesizable; it gives the pixel logic a realistic
// discriminator output to work on.
//
// Function: a charge arrives either at the input pad (rising edge of
// pad_strike, pad_charge_e electrons) or through the test capacitor (rising
// edge of the common test_pulse line, only when enable_test is set; the
// injected charge is test_step_mv * C_test, 13.5 fF, i.e. about 84 electrons
// per mV). The preamp turns it into a pulse of charge * GAIN_UV_PER_E
// microvolts (60 mV per 1000 electrons). If that pulse exceeds the local
// threshold, threshold_mv (measured from the preamp baseline) shifted by
// this pixel's offset_mv and lowered by the trim DAC's trim_mv, the discriminator output disc goes high after the
// comparator delay for DISC_WIDTH_NS. The delay is 8 ns for a pulse at least
// twice the threshold and 30 ns for a pulse just above it. mask pulls the
// threshold to the supply, so a masked pixel never fires. offset_mv stands
// for the pixel-to-pixel threshold spread (comparator offset, gain and
// baseline variation, about 26 mV r.m.s. on the chip) that the trim DAC is
// there to cancel; it is an input so that a test can set each pixel's value.
// noise_e is the r.m.s. input noise in electrons (about 75 on the chip): a
// Gaussian sample of that width, the sum of twelve uniform numbers, is added
// to every charge before it is compared, so a threshold scan shows S-curves.
//
// From the source design: gain, test capacitance, both comparator delays,
// the mask, the test switch, the size of the threshold spread and of the
// noise. This model's own choices: integer units, the spread as one threshold
// offset per pixel, noise as one sample per pulse, the two-level delay rule,
// the fixed output width, no hysteresis and no gain spread.
module frontend #(
  parameter int unsigned GAIN_UV_PER_E  = 60,     // preamp gain, uV per electron
  parameter int unsigned CTEST_AF       = 13500,  // test capacitance, attofarad
  parameter int unsigned DELAY_FAST_NS  = 8,      // comparator delay, large pulse
  parameter int unsigned DELAY_SLOW_NS  = 30,     // comparator delay, near threshold
  parameter int unsigned DISC_WIDTH_NS  = 40      // discriminator output width
) (
  input  logic        pad_strike,    // rising edge: charge reaches the pad
  input  logic [15:0] pad_charge_e,  // that charge, electrons
  input  logic        test_pulse,    // common test line, rising edge injects
  input  logic [11:0] test_step_mv,  // amplitude of the test voltage step
  input  logic        enable_test,   // test switch of this pixel closed
  input  logic        mask,          // pixel masked
  input  logic [11:0] threshold_mv,  // global threshold above baseline
  input  logic signed [7:0] offset_mv,  // this pixel's threshold offset
  input  logic [7:0]  trim_mv,       // local threshold decrease (trim DAC)
  input  logic [7:0]  noise_e,       // r.m.s. input noise, electrons
  output logic        disc           // discriminator output
);
  timeunit 1ns;
  timeprecision 1ps;

  int unsigned active;

  initial begin
    disc   = 1'b0;
    active = 0;
  end

  function automatic int unsigned local_threshold_mv();
    int thr;
    thr = int'(threshold_mv) + int'(offset_mv) - int'(trim_mv);
    return (thr > 0) ? thr : 0;
  endfunction

  // One sample of a standard Gaussian, approximated by 12 uniform samples.
  function automatic real gauss();
    real sum;
    sum = 0.0;
    repeat (12) sum += real'($urandom % 65536) / 65536.0;
    return sum - 6.0;
  endfunction

  task automatic inject(input int unsigned charge_e);
    int unsigned amp_uv;
    int unsigned thr_uv;
    int unsigned delay_ns;
    int          noisy_e;
    noisy_e = int'(charge_e);
    if (noise_e != 0) noisy_e += int'($rtoi(gauss() * real'(noise_e)));
    if (noisy_e < 0) noisy_e = 0;
    amp_uv = int'(noisy_e) * GAIN_UV_PER_E;
    thr_uv = local_threshold_mv() * 1000;
    if (!mask && amp_uv > thr_uv) begin
      delay_ns = (amp_uv >= 2 * thr_uv) ? DELAY_FAST_NS : DELAY_SLOW_NS;
      fork
        begin
          #(delay_ns * 1ns);
          active++;
          disc = 1'b1;
          #(DISC_WIDTH_NS * 1ns);
          active--;
          if (active == 0) disc = 1'b0;
        end
      join_none
    end
  endtask

  always @(posedge pad_strike) inject(int'(pad_charge_e));

  always @(posedge test_pulse)
    if (enable_test) inject(int'(test_step_mv) * CTEST_AF * 10 / 1602);

endmodule
