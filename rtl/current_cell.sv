// Behavioural model (not synthesizable logic) of one self-calibrated unit
// current cell with its differential output switch.
//
// The real cell is analog: a coarse PMOS source sized for 0.97 Iref, a fine
// source whose gate capacitance stores the voltage that makes the cell total
// equal to Iref, the calibration switches around it and a differential pair
// that steers the cell current to one of the two outputs. This model keeps
// that behaviour at the level of currents:
//   * the coarse current is COARSE_RATIO * IREF * (1 + MISMATCH); MISMATCH
//     stands for the random error of that cell's coarse source;
//   * while cal is high the cell is connected to the reference loop and
//     delivers nothing to either output;
//   * when cal falls the fine current is set to iref - coarse (plus
//     CAL_ERR * iref for a residual calibration error) and held, as the
//     charge on the gate capacitance holds it; the cell then delivers
//     coarse + fine;
//   * in normal operation sw = 1 steers the cell current to iout_p, sw = 0 to
//     iout_n.
// Before its first calibration the fine current is FINE_INIT. Leakage of the
// held charge, switching transients and finite output impedance are not
// modelled. Outputs change immediately with the inputs.
module current_cell #(
  parameter real IREF         = 20.0e-3 / 63.0,  // nominal unit current, A
  parameter real COARSE_RATIO = 0.97,
  parameter real MISMATCH     = 0.0,
  parameter real CAL_ERR      = 0.0,
  parameter real FINE_INIT    = 0.0
) (
  input  logic sw,      // switch control from the re-timing flip-flop
  input  logic cal,     // calibration phase of this cell
  input  real  iref,    // reference current during calibration, A
  output real  iout_p,  // current into the positive output, A
  output real  iout_n   // current into the negative output, A
);

  real i_coarse;
  real i_fine;
  real i_cell;

  initial i_fine = FINE_INIT;

  assign i_coarse = COARSE_RATIO * IREF * (1.0 + MISMATCH);

  // The fine source follows the reference during calibration, but no output
  // sees it then, so only its value at the end of the phase matters: it is
  // sampled when cal falls and held until the next calibration.
  always @(negedge cal) i_fine <= iref * (1.0 + CAL_ERR) - i_coarse;

  assign i_cell = i_coarse + i_fine;
  assign iout_p = (!cal && sw)  ? i_cell : 0.0;
  assign iout_n = (!cal && !sw) ? i_cell : 0.0;

endmodule
