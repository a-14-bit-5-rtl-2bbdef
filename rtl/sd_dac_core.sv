// Synthesizable digital core of the sigma-delta D/A converter.
//
// Everything of the converter that is logic: the fourth-order bit-sliced
// modulator, the thermometer encoder, the calibration scheduler and the
// spare-cell routing with its re-timing flip-flop bank. Its outputs are the
// 64 switch controls and 64 calibration controls of the unit current cells,
// which sd_dac_top connects to the (analog, here behavioural) cells.
//
// Timing, on the 120-MHz clock: code is registered and holds the quantizer
// output of loop sample e-2 after clock edge e (see sd_modulator); cell_sw
// and cell_cal are registered one clock after code and cal_idx. One input
// word is accepted every clock. The calibration pointer moves every
// CAL_DIVIDE clocks (4 us at the default) and covers the 64 cells in 256 us.
module sd_dac_core
  import sd_dac_pkg::*;
#(
  parameter int unsigned CAL_DIVIDE = CAL_DIV   // 120 MHz / 250 kHz
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,          // two's complement
  input  logic                    cal_enable,   // run the calibration rotation
  output logic [CODE_W-1:0]       code,         // modulator output, offset binary
  output logic [N_CELLS-1:0]      cell_sw,      // 1: cell current to iout_p
  output logic [N_CELLS-1:0]      cell_cal,     // 1: cell in calibration
  output logic [CELL_IDX_W-1:0]   cal_idx,      // cell now being calibrated
  output logic                    cal_step,     // pointer moves on next clock
  output logic                    round_done,   // last cell of a round done
  output logic                    cal_clk       // 250-kHz calibration clock
);

  logic [N_ACTIVE-1:0] therm;

  sd_modulator #(
    .IN_W   (IN_W),
    .CODE_W (CODE_W),
    .SLICE_W(SLICE_W),
    .N_LO   (2),
    .TOP_W  (11)
  ) u_mod (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (din),
    .code (code)
  );

  thermometer_encoder #(.CODE_W(CODE_W)) u_therm (
    .code (code),
    .therm(therm)
  );

  cal_controller #(.DIV(CAL_DIVIDE), .N_CELLS(N_CELLS)) u_cal (
    .clk       (clk),
    .rst_n     (rst_n),
    .enable    (cal_enable),
    .cal_idx   (cal_idx),
    .cal_step  (cal_step),
    .round_done(round_done),
    .cal_clk   (cal_clk)
  );

  cell_select #(.N_CELLS(N_CELLS)) u_sel (
    .clk     (clk),
    .rst_n   (rst_n),
    .therm   (therm),
    .cal_idx (cal_idx),
    .cell_sw (cell_sw),
    .cell_cal(cell_cal)
  );

endmodule
