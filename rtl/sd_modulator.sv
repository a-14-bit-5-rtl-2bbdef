// Fourth-order, 6-bit digital sigma-delta modulator, pipelined by bit slicing.
//
// Loop: four delaying integrators in cascade with distributed feedback
// (CIFB). With u the input scaled to the quantizer LSB and y the quantizer
// output,
//     s1 <= s1 + u/8 ... written as x*2^-(IN_W-3) ... - y/4
//     s2 <= s2 + s1 - y
//     s3 <= s3 + s2 - 2y
//     s4 <= s4 + s3 - 2y
//     y   = clip(floor(s4), -32, 31),   code = y + 32
// Every coefficient is a power of two, so the loop has shifts and adders but
// no multipliers. The noise transfer function is (1-z^-1)^4 / D(z) with all
// four poles at radius 0.707 and a peak gain of 4; the DC gain from the input
// word to y is 1/2 of the 6-bit range, so a full-scale 14-bit input swings the
// code over 16..48. With this input scale the loop stays bounded for every
// input word, DC or sine, and the quantizer never clips. The coefficient set
// and the input scale are this design's own choice: the structure follows the
// converter described (fourth order, 6 bits, power-of-two coefficients,
// stable over the whole input range) but its coefficient values are not
// given there.
//
// Pipelining: each integrator is cut into N_LO slices of SLICE_W bits for the
// fraction and one TOP_W-bit top slice (sd_int_slice). Carries between slices
// are registered, so slice j of every integrator works on sample n-j while
// slice 0 works on sample n. The feedback only enters the top slice, and the
// quantizer only reads the top slice, so the loop sees exactly one clock per
// integrator, as in the unpipelined loop: the integrator registers serve as
// the pipeline registers. The only extra registers are the input skew
// registers (slice j of the input word is delayed j clocks) and the output
// register.
//
// Word layout (weights in quantizer LSBs): state LSB = 2^-(IN_W-3); the
// N_LO*SLICE_W lowest bits form the lower slices; the top slice holds
// FRAC_TOP = IN_W-3-N_LO*SLICE_W fraction bits and TOP_W-FRAC_TOP integer bits
// (two's complement). FRAC_TOP must be at least 2 so that the y/4 feedback
// stays within the top slice.
//
// Timing: code at clock c is y of the loop sample that slice 0 started at
// clock c-LATENCY, LATENCY = N_LO+1. One new code every clock.
module sd_modulator #(
  parameter int unsigned IN_W    = 14,
  parameter int unsigned CODE_W  = 6,
  parameter int unsigned SLICE_W = 4,
  parameter int unsigned N_LO    = 2,
  parameter int unsigned TOP_W   = 11
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [IN_W-1:0]   din,    // two's complement, one word per clock
  output logic        [CODE_W-1:0] code    // offset binary, 0..2^CODE_W-1
);

  localparam int unsigned LO_W     = N_LO * SLICE_W;
  localparam int          FRAC_TOP = int'(IN_W) - 3 - int'(LO_W);
  localparam int          INT_TOP  = int'(TOP_W) - FRAC_TOP;
  localparam int unsigned X_TOP_W  = IN_W - LO_W;

  // feedback weights 1/4, 1, 2, 2 as left shifts in top-slice LSBs
  localparam int FB_SHIFT [4] = '{FRAC_TOP - 2, FRAC_TOP, FRAC_TOP + 1, FRAC_TOP + 1};

  if (FRAC_TOP < 2) begin : g_chk_frac
    $error("sd_modulator: the top slice needs at least two fraction bits");
  end
  if (INT_TOP < int'(CODE_W) + 2) begin : g_chk_int
    $error("sd_modulator: the top slice needs headroom above the quantizer range");
  end
  if (X_TOP_W > TOP_W) begin : g_chk_x
    $error("sd_modulator: input top part wider than the top slice");
  end

  // ---------------------------------------------------------------- input skew
  logic [IN_W-1:0] x_dly [N_LO+1];
  assign x_dly[0] = din;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 1; j <= int'(N_LO); j++) x_dly[j] <= '0;
    end else begin
      for (int j = 1; j <= int'(N_LO); j++) x_dly[j] <= x_dly[j-1];
    end
  end

  logic [TOP_W-1:0] x_top;
  assign x_top = TOP_W'(signed'(x_dly[N_LO][IN_W-1:LO_W]));

  // ------------------------------------------------------------------ quantizer
  logic [SLICE_W-1:0] lo_state [4][N_LO];
  logic               lo_carry [4][N_LO];
  logic [TOP_W-1:0]   top_state [4];
  logic               top_carry [4];   // not used: the top word wraps
  logic [TOP_W-1:0]   fb_word [4];

  localparam int signed Y_MAX = (1 <<< (CODE_W - 1)) - 1;
  localparam int signed Y_MIN = -(1 <<< (CODE_W - 1));

  logic signed [INT_TOP-1:0] q_int;
  logic signed [CODE_W-1:0]  y;

  always_comb begin
    q_int = INT_TOP'(signed'(top_state[3]) >>> FRAC_TOP);
    if (q_int > INT_TOP'(Y_MAX))      y = CODE_W'(Y_MAX);
    else if (q_int < INT_TOP'(Y_MIN)) y = CODE_W'(Y_MIN);
    else                              y = CODE_W'(q_int);
    for (int k = 0; k < 4; k++)
      fb_word[k] = TOP_W'(signed'(TOP_W'(y)) <<< FB_SHIFT[k]);
  end

  // --------------------------------------------------------------- integrators
  for (genvar k = 0; k < 4; k++) begin : g_int
    for (genvar j = 0; j < int'(N_LO); j++) begin : g_lo
      logic [SLICE_W-1:0] add_in;
      if (k == 0) begin : g_from_x
        assign add_in = x_dly[j][j*SLICE_W +: SLICE_W];
      end else begin : g_from_prev
        assign add_in = lo_state[k-1][j];
      end
      sd_int_slice #(.W(SLICE_W)) u_slice (
        .clk      (clk),
        .rst_n    (rst_n),
        .add_in   (add_in),
        .fb       ('0),
        .carry_in ((j == 0) ? 1'b0 : lo_carry[k][(j == 0) ? 0 : j-1]),
        .state    (lo_state[k][j]),
        .carry_out(lo_carry[k][j])
      );
    end

    logic [TOP_W-1:0] top_in;
    if (k == 0) begin : g_top_from_x
      assign top_in = x_top;
    end else begin : g_top_from_prev
      assign top_in = top_state[k-1];
    end
    sd_int_slice #(.W(TOP_W)) u_top (
      .clk      (clk),
      .rst_n    (rst_n),
      .add_in   (top_in),
      .fb       (fb_word[k]),
      .carry_in (lo_carry[k][N_LO-1]),
      .state    (top_state[k]),
      .carry_out(top_carry[k])
    );
  end

  // ------------------------------------------------------------- output stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code <= CODE_W'(1 << (CODE_W - 1));   // mid-scale = y of 0
    else        code <= {~y[CODE_W-1], y[CODE_W-2:0]};
  end

endmodule
