// lfsr4: the 4-bit counter / shift register cell used twice in every pixel.
//
// Four D flip-flops in a row. A multiplexer in front of the first stage picks
// either the serial input (shift = 1, readout) or the XNOR feedback of stages
// 3 and 4 (shift = 0, counting), so the same flip-flops serve as counter and
// as readout register and no separate output register is needed. A second
// multiplexer picks the clock: clk_a (the pixel's fast local oscillator) when
// sel_a = 1, otherwise clk_b (the 40 MHz event clock). The serial output is
// the last stage. clr clears all stages asynchronously to 4'b0000.
//
// Timing: every rising edge of the selected clock advances the register by
// one step. The cell has no count enable; the pixel logic starts and stops
// counting by starting and stopping the clock. sel_a may only change while
// both clocks are low, so the clock multiplexer never makes a short pulse.
//
// From the source design: four flip-flops, XNOR feedback, data and clock
// multiplexers, shift reuse for readout. This design's own choices: feedback
// taps (stages 3 and 4), the clear value and the clock-select polarity.
module lfsr4
  import gossipo_pkg::*;
(
  input  logic              clk_a,  // fast clock (local oscillator)
  input  logic              clk_b,  // slow clock (event clock)
  input  logic              sel_a,  // 1: clock from clk_a, 0: from clk_b
  input  logic              shift,  // 1: shift din in, 0: count
  input  logic              din,    // serial input (readout chain)
  input  logic              clr,    // asynchronous clear, active high
  output logic [LFSR_W-1:0] q,      // counter state
  output logic              dout    // serial output (last stage)
);
  timeunit 1ns;
  timeprecision 1ps;

  logic clk;
  logic d0;

  assign clk  = sel_a ? clk_a : clk_b;
  assign d0   = shift ? din : ~(q[LFSR_W-1] ^ q[LFSR_W-2]);
  assign dout = q[LFSR_W-1];

  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= '0;
    else     q <= {q[LFSR_W-2:0], d0};
  end

endmodule
