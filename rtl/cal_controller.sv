// Calibration scheduler for the current-cell array.
//
// The cells are calibrated one at a time, in turn, at the calibration clock
// rate: every cell spends one calibration-clock period (4 us at 250 kHz) in
// its calibration phase, and with 64 cells each one is recalibrated every
// 256 us. The calibration clock is derived here from the modulator clock by
// dividing by DIV (120 MHz / 250 kHz = 480); the converter described gives the
// two frequencies, the divider is this design's own way of relating them.
//
// Outputs:
//   cal_idx    index of the cell now in its calibration phase; steps by one,
//              wrapping from N_CELLS-1 to 0, on the clock after cal_step
//   cal_step   one-clock pulse on the last modulator clock of each
//              calibration period
//   round_done one-clock pulse together with the cal_step that ends the
//              calibration of the last cell (a full round of all cells)
//   cal_clk    the calibration clock itself, high for the first half of each
//              period (for observation; the logic uses cal_step)
// Reset starts the round at cell 0 with a full period ahead. When enable is
// low the scheduler holds its place and keeps the current cell selected.
module cal_controller #(
  parameter int unsigned DIV     = 480,
  parameter int unsigned N_CELLS = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         enable,
  output logic [$clog2(N_CELLS)-1:0]   cal_idx,
  output logic                         cal_step,
  output logic                         round_done,
  output logic                         cal_clk
);

  localparam int unsigned CNT_W = $clog2(DIV);
  localparam int unsigned IDX_W = $clog2(N_CELLS);

  logic [CNT_W-1:0] cnt;

  always_comb begin
    cal_step   = enable && (cnt == CNT_W'(DIV - 1));
    round_done = cal_step && (cal_idx == IDX_W'(N_CELLS - 1));
    cal_clk    = (cnt < CNT_W'(DIV / 2));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      cal_idx <= '0;
    end else if (enable) begin
      if (cal_step) begin
        cnt     <= '0;
        cal_idx <= (cal_idx == IDX_W'(N_CELLS - 1)) ? '0 : cal_idx + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
