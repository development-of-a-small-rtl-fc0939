// pixel_config: the 6-bit configuration register of one pixel.
//
// A plain shift register clocked by the configuration clock. Bits enter at
// cfg_in and leave at cfg_out after six clocks, so the registers of all 256
// pixels form one 1536-bit chain. The word holds, in the order it is shifted
// in: enable_test, mask, dac[3], dac[2], dac[1], dac[0]. reset clears it
// asynchronously (all pixels unmasked, test switch open, DAC at zero).
//
// Timing: one bit per rising edge of cfg_clk; cfg_out is the register's last
// stage and changes right after that edge.
//
// From the source design: six bits, their meaning, one long chain. This
// design's own choices: bit order, clear on reset.
module pixel_config
  import gossipo_pkg::*;
(
  input  logic       cfg_clk,  // configuration clock
  input  logic       reset,    // asynchronous clear, active high
  input  logic       cfg_in,   // serial in (from the previous pixel)
  output logic       cfg_out,  // serial out (to the next pixel)
  output pixel_cfg_t cfg       // configuration word
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [CFG_BITS-1:0] sr;

  always_ff @(posedge cfg_clk or posedge reset) begin
    if (reset) sr <= '0;
    else       sr <= {sr[CFG_BITS-2:0], cfg_in};
  end

  assign cfg     = pixel_cfg_t'(sr);
  assign cfg_out = sr[CFG_BITS-1];

endmodule
