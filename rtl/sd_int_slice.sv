// One slice of a delaying integrator, the building block of the modulator.
//
// The slice holds W bits of an integrator state. Every clock it adds the
// matching W bits of the integrator input and the carry that the slice below
// produced one clock earlier, subtracts an optional feedback word, and
// registers both the new state bits and its own carry-out. Because the carry is
// registered, the adder inside a slice is only W bits long; the price is that
// a slice works on the sample that the slice below worked on one clock before,
// so the bits of one integrator value appear skewed in time, one clock per
// slice. The state register of the integrator doubles as the pipeline register,
// so slicing costs no extra registers inside the loop.
//
// Lower slices are used with fb = 0 and then carry_out is the true carry into
// the next slice (0 or 1). The top slice subtracts the quantizer feedback and
// its state wraps modulo 2^W, as a two's-complement top word does; its
// carry_out is not used. Reset clears state and carry.
//
// Cutting the wide integrator adders into short ripple-carry slices with
// registered carries follows the converter described; the slice boundaries
// and this exact cell are this design's own.
//
// Timing: state and carry_out are valid one clock after their inputs.
module sd_int_slice #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] add_in,     // slice of the integrator input
  input  logic [W-1:0] fb,         // subtracted word (top slice only)
  input  logic         carry_in,   // registered carry from the slice below
  output logic [W-1:0] state,      // slice of the integrator state
  output logic         carry_out   // registered carry into the slice above
);

  logic [W+1:0] sum;

  always_comb begin
    sum = {2'b00, state} + {2'b00, add_in} + {{(W+1){1'b0}}, carry_in}
          - {2'b00, fb};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      carry_out <= 1'b0;
    end else begin
      state     <= sum[W-1:0];
      carry_out <= sum[W];
    end
  end

endmodule
