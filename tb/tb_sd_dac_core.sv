// Self-checking testbench of sd_dac_core with a short calibration period.
//
// The calibration divider is set to 16 clocks so that the 64-cell rotation
// wraps several times in 5,000 clocks. Random-walk input words drive the
// modulator. Checked every clock, against models in this file:
//   * code against an unsliced reference model of the modulator loop;
//   * the calibration pointer against a clock counter (one step every 16
//     clocks, in order, wrapping from 63 to 0), and cell_cal one-hot at it;
//   * cell_sw against the thermometer code of the previous code with the
//     calibrating cell skipped.
// Rounds completed and clocks with the spare cell standing in are counted
// and must occur.
module tb_sd_dac_core;
  localparam int DIV = 16;
  localparam int N   = 5000;

  logic clk = 1'b0, rst_n = 1'b0, cal_enable = 1'b0;
  logic signed [13:0] din = '0;
  logic [5:0]  code, cal_idx;
  logic [63:0] cell_sw, cell_cal;
  logic        cal_step, round_done, cal_clk;
  int checks = 0, failures = 0;

  sd_dac_core #(.CAL_DIVIDE(DIV)) dut (
    .clk(clk), .rst_n(rst_n), .din(din), .cal_enable(cal_enable), .code(code),
    .cell_sw(cell_sw), .cell_cal(cell_cal), .cal_idx(cal_idx),
    .cal_step(cal_step), .round_done(round_done), .cal_clk(cal_clk));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] expect_sw(int c, int k);
    logic [63:0] r;
    int b = 0;
    for (int p = 0; p < 64; p++) begin
      if (p == k) r[p] = 1'b0;
      else begin r[p] = (b < c); b++; end
    end
    return r;
  endfunction

  task automatic fail(string what, int e);
    failures++;
    if (failures < 12) $display("edge %0d: %s", e, what);
  endtask

  longint s [4];
  longint yref [N];

  initial begin
    longint q, y, x;
    int idx_before, code_before, rounds, subst;
    for (int k = 0; k < 4; k++) s[k] = 0;
    rounds = 0; subst = 0;
    x = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1; cal_enable = 1'b1;
    for (int e = 0; e < N; e++) begin
      x = x + longint'($urandom_range(600)) - 300;
      if (x > 8191) x = 8191;
      if (x < -8192) x = -8192;
      din = 14'(x);
      q = s[3] >>> 11;
      y = (q > 31) ? 31 : (q < -32) ? -32 : q;
      yref[e] = y;
      s[3] = s[3] + s[2] - y * 4096;
      s[2] = s[2] + s[1] - y * 4096;
      s[1] = s[1] + s[0] - y * 2048;
      s[0] = s[0] + x    - y * 512;
      idx_before  = (e / DIV) % 64;        // pointer during this clock
      code_before = int'(code);
      checks++;
      if (int'(cal_idx) != idx_before) fail("pointer differs from clock count", e);
      if (round_done) rounds++;
      if (idx_before < code_before) subst++;
      @(posedge clk);
      #1;
      checks += 3;
      if (e >= 2 && int'(code) != int'(yref[e-2]) + 32) fail("code differs from reference", e);
      if (cell_cal != (64'd1 << idx_before)) fail("calibration control wrong", e);
      if (cell_sw != expect_sw(code_before, idx_before)) fail("switch controls wrong", e);
    end
    $display("rounds %0d, spare-cell clocks %0d", rounds, subst);
    checks += 2;
    if (rounds < 4) fail("fewer than four calibration rounds", N);
    if (subst < 1) fail("spare cell never stood in", N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
