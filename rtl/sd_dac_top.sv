// 14-bit sigma-delta D/A converter: digital modulator, thermometer-coded
// unit-cell array with rotating self-calibration, and behavioural cells.
//
// Signal path (all on the 120-MHz modulator clock), the first four stages
// inside the synthesizable core sd_dac_core:
//   din (14-bit, one word per clock)
//     -> sd_modulator        4th-order, 6-bit code, pipelined by bit slices
//     -> thermometer_encoder 63 unit-cell controls
//     -> cell_select         63 bits onto 64 cells, skipping the one being
//                            calibrated; one flip-flop bank re-times all cells
//     -> 64 x current_cell   behavioural unit cells summed into iout_p/iout_n
// cal_controller divides the clock down to the 250-kHz calibration clock and
// moves the calibration pointer to the next cell every 4 us, so each of the
// 64 cells is recalibrated against iref every 256 us while the other 63 carry
// the signal.
//
// Latency: a code leaves sd_modulator as described there; the cell controls
// follow one clock later. The output currents follow the cell controls
// without delay.
//
// The unit cells are analog in the real converter; here they are behavioural
// models with a fixed, deterministic spread of their coarse sources
// (CELL_SPREAD, a fraction of the unit current) so that the effect of
// calibration is visible at the outputs. Everything else is in sd_dac_core,
// which is synthesizable.
module sd_dac_top
  import sd_dac_pkg::*;
#(
  parameter int unsigned CAL_DIVIDE  = CAL_DIV,         // 120 MHz / 250 kHz
  parameter real         IREF        = 20.0e-3 / 63.0,  // unit current, A
  parameter real         CELL_SPREAD = 0.01             // +-1 % coarse mismatch
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  input  logic                    cal_enable,   // run the calibration rotation
  input  real                     iref,         // reference current, A
  output logic [CODE_W-1:0]       code,         // modulator output
  output logic [N_CELLS-1:0]      cell_sw,      // registered cell switch controls
  output logic [N_CELLS-1:0]      cell_cal,     // registered calibration controls
  output logic [CELL_IDX_W-1:0]   cal_idx,      // cell now being calibrated
  output logic                    cal_step,     // pointer moves on next clock
  output logic                    round_done,   // last cell of a round done
  output logic                    cal_clk,      // 250-kHz calibration clock
  output real                     iout_p,       // positive output current, A
  output real                     iout_n        // negative output current, A
);

  sd_dac_core #(.CAL_DIVIDE(CAL_DIVIDE)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .din       (din),
    .cal_enable(cal_enable),
    .code      (code),
    .cell_sw   (cell_sw),
    .cell_cal  (cell_cal),
    .cal_idx   (cal_idx),
    .cal_step  (cal_step),
    .round_done(round_done),
    .cal_clk   (cal_clk)
  );

  // ---------------------------------------------------- behavioural cell array
  real ip [N_CELLS];
  real in [N_CELLS];

  for (genvar p = 0; p < int'(N_CELLS); p++) begin : g_cell
    // deterministic spread in [-CELL_SPREAD, +CELL_SPREAD]
    localparam real MM = CELL_SPREAD * (real'((p * 29 + 7) % 64) - 31.5) / 31.5;
    current_cell #(
      .IREF     (IREF),
      .MISMATCH (MM),
      .FINE_INIT(0.03 * IREF)
    ) u_cell (
      .sw    (cell_sw[p]),
      .cal   (cell_cal[p]),
      .iref  (iref),
      .iout_p(ip[p]),
      .iout_n(in[p])
    );
  end

  always_comb begin
    iout_p = 0.0;
    iout_n = 0.0;
    for (int p = 0; p < int'(N_CELLS); p++) begin
      iout_p += ip[p];
      iout_n += in[p];
    end
  end

endmodule
