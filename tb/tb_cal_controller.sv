// Self-checking testbench of cal_controller at its default divide ratio.
//
// Over a little more than one full round (64 cells x 480 clocks = 30720
// clocks, i.e. 256 us at 120 MHz) it checks that the pointer steps every 480
// clocks exactly, in order, that it wraps from 63 to 0 with round_done, that
// cal_clk is high for the first 240 clocks of each period, and that a low
// enable freezes the scheduler.
module tb_cal_controller;
  localparam int DIV = 480, NC = 64;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [5:0] cal_idx;
  logic cal_step, round_done, cal_clk;
  int checks = 0, failures = 0;

  cal_controller #(.DIV(DIV), .N_CELLS(NC)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .cal_idx(cal_idx),
    .cal_step(cal_step), .round_done(round_done), .cal_clk(cal_clk));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, rounds, steps;
    int exp_idx;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1; enable = 1'b1;
    exp_idx = 0; rounds = 0; steps = 0;
    // t counts clocks since the current cell entered calibration
    t = 0;
    for (int c = 0; c < NC * DIV + 2 * DIV; c++) begin
      // sample before the edge
      checks += 4;
      if (int'(cal_idx) != exp_idx) failures++;
      if (cal_step != (t == DIV - 1)) failures++;
      if (round_done != (t == DIV - 1 && exp_idx == NC - 1)) failures++;
      if (cal_clk != (t < DIV / 2)) failures++;
      if (round_done) rounds++;
      if (cal_step) steps++;
      @(posedge clk);
      #1;
      if (t == DIV - 1) begin
        t = 0;
        exp_idx = (exp_idx + 1) % NC;
      end else t++;
    end
    checks += 2;
    if (rounds != 1) failures++;
    if (steps != NC + 2) failures++;
    // freeze
    enable = 1'b0;
    begin
      logic [5:0] held;
      held = cal_idx;
      repeat (3 * DIV) begin
        @(posedge clk); #1;
        checks += 2;
        if (cal_idx != held) failures++;
        if (cal_step) failures++;
      end
    end
    $display("steps=%0d rounds=%0d", steps, rounds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
