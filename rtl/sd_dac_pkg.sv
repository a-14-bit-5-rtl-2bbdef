// Shared constants of the sigma-delta D/A converter.
//
// The converter takes 14-bit two's-complement words at the 120-MHz modulator
// clock, shapes them into a 6-bit code with a fourth-order sigma-delta loop and
// drives 63 unit current cells from the thermometer form of that code. A 64th,
// identical cell is kept as a spare so that one cell at a time can be taken out
// and calibrated; the calibration clock is 250 kHz, so every cell is visited
// for 4 us once every 256 us. The numbers below are those of the converter
// described; the divider ratio follows from the two clock frequencies.
package sd_dac_pkg;

  localparam int unsigned IN_W      = 14;   // input word width
  localparam int unsigned CODE_W    = 6;    // modulator output width
  localparam int unsigned N_ACTIVE  = (1 << CODE_W) - 1;  // 63 cells carry the signal
  localparam int unsigned N_CELLS   = N_ACTIVE + 1;       // plus one spare
  localparam int unsigned CELL_IDX_W = $clog2(N_CELLS);

  localparam longint unsigned CLK_HZ = 120_000_000;  // modulator clock
  localparam longint unsigned CAL_HZ = 250_000;      // calibration clock
  localparam int unsigned CAL_DIV    = int'(CLK_HZ / CAL_HZ);  // 480

  // Integrator adders are cut into ripple-carry slices of this width; the
  // top slice of every integrator is wider (see sd_modulator).
  localparam int unsigned SLICE_W = 4;

endpackage
