// pixel_array: the NROWS x NCOLS matrix of pixel cells (16 x 16 on the chip).
//
// There is no readout controller: the pixels themselves form the readout.
// In readout mode all pixels are one long shift register of 8 bits per pixel
// (2048 bits for 16 x 16), clocked by the event clock; the configuration
// registers form a second chain of 6 bits per pixel (1536 bits). Both chains
// run as a meander over the matrix: up column 0 (row 0 to row NROWS-1), down
// column 1, up column 2, and so on. Chain position k of pixel (row, col) is
//   k = col * NROWS + (col even ? row : NROWS - 1 - row),
// and data_in enters position 0 while data_out leaves position NROWS*NCOLS-1.
// The global control lines (reset, event clock, read, enable clear, test,
// configuration clock) are shared by all pixels; on the chip they are
// buffered once per column, which has no logic function and is not modelled.
//
// Pad inputs, threshold offsets and the hit and clear_hit flags are indexed
// by row * NCOLS + col.
//
// From the source design: the matrix size, one series chain for data and
// one for configuration, the meander, per-column buffering. This design's own
// choices: the meander's start corner and direction, and the same path for
// both chains.
module pixel_array
  import gossipo_pkg::*;
#(
  parameter int unsigned NROWS = 16,
  parameter int unsigned NCOLS = 16
) (
  input  logic        reset,
  input  logic        event_clk,
  input  logic        read,
  input  logic        en_clear,
  input  logic        cfg_clk,
  input  logic        cfg_in,
  output logic        cfg_out,
  input  logic        data_in,
  output logic        data_out,
  input  logic [NROWS*NCOLS-1:0] pad_strike,
  input  logic [15:0] pad_charge_e [NROWS*NCOLS],
  input  logic        test_pulse,
  input  logic [11:0] test_step_mv,
  input  logic [11:0] threshold_mv,
  input  logic [7:0]  dac_range_mv,
  input  logic signed [7:0] offset_mv [NROWS*NCOLS],
  input  logic [7:0]  noise_e,
  input  logic [11:0] vdd_mv,
  input  logic signed [7:0] temp_c,
  output logic [NROWS*NCOLS-1:0] hit,
  output logic [NROWS*NCOLS-1:0] clear_hit
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NPIX = NROWS * NCOLS;

  // chain[k] feeds chain position k; chain[NPIX] is the array's output.
  logic [NPIX:0] data_chain;
  logic [NPIX:0] cfg_chain;

  assign data_chain[0] = data_in;
  assign cfg_chain[0]  = cfg_in;
  assign data_out      = data_chain[NPIX];
  assign cfg_out       = cfg_chain[NPIX];

  for (genvar c = 0; c < NCOLS; c++) begin : g_col
    for (genvar r = 0; r < NROWS; r++) begin : g_row
      localparam int unsigned K   = c * NROWS + ((c % 2 == 0) ? r : NROWS - 1 - r);
      localparam int unsigned IDX = r * NCOLS + c;
      pixel_cell u_pix (
        .reset, .event_clk, .read, .en_clear, .cfg_clk,
        .cfg_in(cfg_chain[K]), .cfg_out(cfg_chain[K+1]),
        .data_in(data_chain[K]), .data_out(data_chain[K+1]),
        .pad_strike(pad_strike[IDX]), .pad_charge_e(pad_charge_e[IDX]),
        .test_pulse, .test_step_mv, .threshold_mv, .dac_range_mv,
        .offset_mv(offset_mv[IDX]), .noise_e, .vdd_mv, .temp_c, .hit(hit[IDX]), .clear_hit(clear_hit[IDX])
      );
    end
  end

endmodule
