// Binary-to-thermometer encoder for the unit-cell current array.
//
// A CODE_W-bit offset-binary code k turns on the k lowest of the
// 2^CODE_W - 1 thermometer outputs: therm[i] = (code > i). With the 6-bit
// modulator code this gives the 63 unit-cell controls; code 0 turns every
// cell off and code 63 turns all 63 on. The 64th physical cell is the spare
// used for calibration and is handled by cell_select, so it has no bit here.
//
// The 6-bit code and the 63 signal cells are those of the converter
// described; leaving the spare position to cell_select is this design's own.
//
// Purely combinational; the outputs are re-timed by the flip-flop bank in
// cell_select before they reach the cells.
module thermometer_encoder #(
  parameter int unsigned CODE_W = 6
) (
  input  logic [CODE_W-1:0]          code,
  output logic [(1<<CODE_W)-2:0]     therm
);

  always_comb begin
    for (int i = 0; i < (1 << CODE_W) - 1; i++)
      therm[i] = (int'(code) > i);
  end

endmodule
