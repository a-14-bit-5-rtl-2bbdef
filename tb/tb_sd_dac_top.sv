// End-to-end testbench of sd_dac_top at its default parameters.
//
// A full-scale 1.23-MHz sine (period 97.3 clocks) drives the converter for
// 33,000 clocks of 120 MHz, a little more than one complete calibration round
// of all 64 cells (30,720 clocks = 256 us). Checked every clock:
//   * the modulator code against an unsliced reference model of the loop,
//     two clocks after the sample entered slice 0;
//   * the number of switched-on cells against the code of one clock earlier,
//     and the calibration control against the pointer of one clock earlier;
//   * once every cell has been calibrated, iout_p against code x IREF and
//     iout_p + iout_n against 63 x IREF.
// Mechanisms counted, each must occur: pointer steps (64 or more), a complete
// round, clocks in which the spare cell stands in for a calibrating cell that
// lies inside the active range, a visible output error before calibration,
// and codes from both halves of the range.
module tb_sd_dac_top;
  localparam real IREF  = 20.0e-3 / 63.0;
  localparam int  N     = 33000;

  logic clk = 1'b0, rst_n = 1'b0, cal_enable = 1'b0;
  logic signed [13:0] din = '0;
  real  iref = IREF;
  logic [5:0]  code;
  logic [63:0] cell_sw, cell_cal;
  logic [5:0]  cal_idx;
  logic        cal_step, round_done, cal_clk;
  real         iout_p, iout_n;
  int checks = 0, failures = 0;

  sd_dac_top dut (
    .clk(clk), .rst_n(rst_n), .din(din), .cal_enable(cal_enable), .iref(iref),
    .code(code), .cell_sw(cell_sw), .cell_cal(cell_cal), .cal_idx(cal_idx),
    .cal_step(cal_step), .round_done(round_done), .cal_clk(cal_clk),
    .iout_p(iout_p), .iout_n(iout_n));

  always #4.1666 clk = ~clk;   // 120 MHz

  initial begin : watchdog
    repeat (N + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint s [4];
  longint yref [N];

  task automatic fail(string what, int e);
    failures++;
    if (failures < 12) $display("edge %0d: %s", e, what);
  endtask

  initial begin
    longint q, y, x;
    int n_steps, n_rounds, n_subst, n_low, n_high;
    int calibrated_from;
    real pre_err, post_err, err;
    logic [5:0] code_d, idx_d;
    real pi = 3.14159265358979;
    for (int k = 0; k < 4; k++) s[k] = 0;
    n_steps = 0; n_rounds = 0; n_subst = 0; n_low = 0; n_high = 0;
    calibrated_from = -1; pre_err = 0.0; post_err = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1; cal_enable = 1'b1;
    code_d = 6'd32; idx_d = '0;
    for (int e = 0; e < N; e++) begin
      x = longint'($floor(8191.0 * $sin(2.0 * pi * real'(e) / 97.3) + 0.5));
      din = 14'(x);
      q = s[3] >>> 11;
      y = (q > 31) ? 31 : (q < -32) ? -32 : q;
      yref[e] = y;
      s[3] = s[3] + s[2] - y * 4096;
      s[2] = s[2] + s[1] - y * 4096;
      s[1] = s[1] + s[0] - y * 2048;
      s[0] = s[0] + x    - y * 512;
      // values that the cell controls will show after this edge
      code_d = code;
      idx_d  = cal_idx;
      if (cal_step) n_steps++;
      if (round_done) begin
        n_rounds++;
        if (calibrated_from < 0) calibrated_from = e + 3;
      end
      @(posedge clk);
      #1;
      if (e >= 2) begin
        checks++;
        if (int'(code) != int'(yref[e-2]) + 32) fail("code differs from reference", e);
        if (code < 6'd32) n_low++; else n_high++;
      end
      checks += 2;
      if ($countones(cell_sw) != int'(code_d)) fail("switched-on cells differ from code", e);
      if (cell_cal != (64'd1 << idx_d)) fail("calibration control differs from pointer", e);
      if (idx_d < code_d) n_subst++;
      err = iout_p - real'(code_d) * IREF;
      if (err < 0.0) err = -err;
      if (calibrated_from < 0) begin
        if (err > pre_err) pre_err = err;
      end else if (e >= calibrated_from) begin
        checks += 2;
        if (err > 1.0e-9) fail("output current differs from code x IREF", e);
        err = iout_p + iout_n - 63.0 * IREF;
        if (err > 1.0e-9 || err < -1.0e-9) fail("total current differs from 63 x IREF", e);
        if (err < 0.0) err = -err;
        if (err > post_err) post_err = err;
      end
    end
    $display("pointer steps %0d, rounds %0d, spare-cell substitutions %0d clocks",
             n_steps, n_rounds, n_subst);
    $display("largest |iout_p - code*IREF| before calibration %e A, after %e A",
             pre_err, post_err);
    $display("codes below mid-scale %0d, at or above %0d", n_low, n_high);
    checks += 5;
    if (n_steps < 64) fail("fewer than 64 pointer steps", N);
    if (n_rounds < 1) fail("no complete calibration round", N);
    if (n_subst < 1) fail("spare cell never substituted", N);
    if (pre_err < 1.0e-7) fail("no error visible before calibration", N);
    if (n_low < 1 || n_high < 1) fail("code stayed in one half", N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
