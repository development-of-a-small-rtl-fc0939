// gossipo_pkg: types, sizes and LFSR helper functions shared by the
// GOSSIPO-2 pixel chip RTL and its testbenches.
//
// The pixel counters are 4-bit linear feedback shift registers with an XNOR
// of the two last stages as feedback (polynomial x^4 + x^3 + 1, chosen here as
// the maximal-length one). Starting from the cleared state 4'b0000 they walk
// through 15 states; 4'b1111 is the lock-up ("dead") state and never occurs.
// A count n is therefore read back as the state reached after n steps, and
// lfsr_count() turns a state back into n.
package gossipo_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned LFSR_W     = 4;   // bits per counter
  localparam int unsigned LFSR_STEPS = 15;  // states in the cycle (2^4 - 1)
  localparam int unsigned PIX_BITS   = 2 * LFSR_W;  // readout bits per pixel
  localparam int unsigned CFG_BITS   = 6;   // configuration bits per pixel

  // Per-pixel configuration word, in shift order (enable_test goes in first).
  typedef struct packed {
    logic       enable_test;  // close the test-pulse switch of this pixel
    logic       mask;         // pull the threshold to Vdd: pixel never fires
    logic [3:0] dac;          // threshold trim, 0..15 steps
  } pixel_cfg_t;

  // One step of the counter: shift towards the MSB, XNOR feedback into bit 0.
  function automatic logic [LFSR_W-1:0] lfsr_next(input logic [LFSR_W-1:0] q);
    return {q[LFSR_W-2:0], ~(q[LFSR_W-1] ^ q[LFSR_W-2])};
  endfunction

  // State reached after n steps from the cleared state.
  function automatic logic [LFSR_W-1:0] lfsr_state(input int unsigned n);
    logic [LFSR_W-1:0] q;
    q = '0;
    for (int unsigned i = 0; i < n % LFSR_STEPS; i++) q = lfsr_next(q);
    return q;
  endfunction

  // Number of steps from the cleared state to q; 15 flags the dead state.
  function automatic int unsigned lfsr_count(input logic [LFSR_W-1:0] q);
    logic [LFSR_W-1:0] s;
    s = '0;
    for (int unsigned i = 0; i < LFSR_STEPS; i++) begin
      if (s == q) return i;
      s = lfsr_next(s);
    end
    return LFSR_STEPS;
  endfunction

  // Last state of the latency counter: 14 event clock periods after the hit
  // window closed, i.e. 350 ns of trigger latency at 40 MHz.
  localparam logic [LFSR_W-1:0] LFSR_LAST = lfsr_state(LFSR_STEPS - 1);

endpackage
