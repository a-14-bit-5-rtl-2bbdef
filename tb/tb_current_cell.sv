// Self-checking testbench of the current_cell behavioural model.
//
// A cell with a +2 % coarse-source error starts with a nominal fine current
// and is therefore off by the coarse error. It must deliver nothing while
// calibrating, deliver exactly iref after the calibration phase ends, steer
// its current by sw, hold the calibrated value when iref changes outside the
// calibration phase, follow a new iref at its next calibration, and hold
// the reference as it was at the end of the calibration phase.
module tb_current_cell;
  localparam real IREF = 20.0e-3 / 63.0;
  logic sw = 1'b0, cal = 1'b0;
  real  iref = IREF;
  real  ip, in;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  current_cell #(.IREF(IREF), .MISMATCH(0.02), .FINE_INIT(0.03 * IREF)) dut (
    .sw(sw), .cal(cal), .iref(iref), .iout_p(ip), .iout_n(in));

  always #5 clk = ~clk;

  task automatic expect_near(real got, real want, string what);
    checks++;
    if (got - want > 1.0e-12 || want - got > 1.0e-12) begin
      failures++;
      $display("%s: got %e want %e", what, got, want);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    sw = 1'b1; #1;
    expect_near(ip, 0.97 * IREF * 1.02 + 0.03 * IREF, "uncalibrated");
    expect_near(in, 0.0, "uncalibrated, other side");
    cal = 1'b1; #1;
    expect_near(ip, 0.0, "during calibration p");
    expect_near(in, 0.0, "during calibration n");
    @(posedge clk); #1;
    cal = 1'b0; #1;
    expect_near(ip, IREF, "calibrated");
    sw = 1'b0; #1;
    expect_near(in, IREF, "steered to n");
    expect_near(ip, 0.0, "steered away from p");
    iref = 1.1 * IREF; #1;
    expect_near(in, IREF, "held after iref change");
    cal = 1'b1; #1; cal = 1'b0; #1;
    expect_near(in, 1.1 * IREF, "recalibrated");
    // the value at the end of the calibration phase is the one held
    cal = 1'b1; #1; iref = 1.2 * IREF; #1; cal = 1'b0; #1;
    expect_near(in, 1.2 * IREF, "reference changed during calibration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
