// Spare-cell substitution and switch re-timing for the current-cell array.
//
// Sixty-three thermometer bits drive sixty-four physical cells. The cell
// whose index is cal_idx is in its calibration phase and carries no signal;
// the bits are shifted past it:
//     physical cell p <  cal_idx : thermometer bit p
//     physical cell p == cal_idx : off, calibration control high
//     physical cell p >  cal_idx : thermometer bit p-1
// When the calibration pointer steps from k to k+1, only cell k (returning to
// service, now taking bit k) and cell k+1 (leaving for calibration) change
// role; all others keep their bit. The output always holds exactly as many
// switched-on cells as the code asks for.
//
// All 128 controls leave through one bank of flip-flops on the modulator
// clock, so every cell switches on the same clock edge; that is how the
// converter described keeps the switching instants of the cells aligned.
//
// The spare cell and the flip-flop re-timing follow the converter described;
// the shift-past routing above is this design's own way of using the spare.
//
// Timing: cell_sw and cell_cal are registered, one clock after therm and
// cal_idx. Reset turns every cell off and puts no cell in calibration.
module cell_select #(
  parameter int unsigned N_CELLS = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N_CELLS-2:0]           therm,
  input  logic [$clog2(N_CELLS)-1:0]   cal_idx,
  output logic [N_CELLS-1:0]           cell_sw,   // 1: current to the positive output
  output logic [N_CELLS-1:0]           cell_cal   // 1: cell in its calibration phase
);

  logic [N_CELLS-1:0] sw_d, cal_d;

  always_comb begin
    for (int p = 0; p < int'(N_CELLS); p++) begin
      cal_d[p] = (p == int'(cal_idx));
      if (p < int'(cal_idx))       sw_d[p] = therm[p];
      else if (p == int'(cal_idx)) sw_d[p] = 1'b0;
      else                         sw_d[p] = therm[p-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cell_sw  <= '0;
      cell_cal <= '0;
    end else begin
      cell_sw  <= sw_d;
      cell_cal <= cal_d;
    end
  end

  // at most one cell calibrates, and the calibrating cell is switched off
  a_one_cal: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cell_cal));
  a_cal_off: assert property (@(posedge clk) disable iff (!rst_n) (cell_sw & cell_cal) == '0);

endmodule
