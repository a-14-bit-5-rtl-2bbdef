// In-band signal-to-(noise + distortion) ratio of the complete converter,
// measured on the differential output current, without and with the
// background calibration of the current cells.
//
// sd_dac_top runs at its default parameters (120-MHz clock, 64 cells with
// +-1 % coarse spread). A full-scale sine of exactly 67 cycles in 8192
// samples is applied. The differential current iout_p - iout_n, in units of
// IREF, is recorded for 8192 clocks and analysed with a 4-term
// Blackman-Harris window and a direct DFT over the 5-MHz band (oversampling
// ratio 12), after removing the mean: bins within 5 of the tone are signal,
// all other in-band bins from bin 5 up are noise plus distortion.
//   1. Calibration disabled: the cells carry their coarse errors.
//   2. Calibration enabled, measured after one full 256-us round, with the
//      rotation still running during the measurement.
// The calibrated converter must reach the modulator's own noise floor
// (80 dB or more) and calibration must improve the SNDR by at least 6 dB.
module tb_sd_dac_top_sndr;
  localparam real IREF = 20.0e-3 / 63.0;
  localparam int  NS   = 8192;
  localparam int  KSIG = 67;
  localparam int  BAND = NS / 24;
  localparam int  ROUND = 64 * 480;

  logic clk = 1'b0, rst_n = 1'b0, cal_enable = 1'b0;
  logic signed [13:0] din = '0;
  real  iref = IREF;
  logic [5:0]  code, cal_idx;
  logic [63:0] cell_sw, cell_cal;
  logic        cal_step, round_done, cal_clk;
  real         iout_p, iout_n;
  int checks = 0, failures = 0;

  sd_dac_top dut (
    .clk(clk), .rst_n(rst_n), .din(din), .cal_enable(cal_enable), .iref(iref),
    .code(code), .cell_sw(cell_sw), .cell_cal(cell_cal), .cal_idx(cal_idx),
    .cal_step(cal_step), .round_done(round_done), .cal_clk(cal_clk),
    .iout_p(iout_p), .iout_n(iout_n));

  always #4.1666 clk = ~clk;

  initial begin : watchdog
    repeat (2 * NS + ROUND + 4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ctab [NS];
  real stab [NS];
  real yw   [NS];
  int  e = 0;   // sample counter of the input sine

  // apply one input sample and advance one clock
  task automatic step();
    din = 14'(int'($floor(8191.0 * stab[(e * KSIG) % NS] + 0.5)));
    e++;
    @(posedge clk);
    #1;
  endtask

  task automatic measure(output real sndr);
    real w, re, im, p, psig, pn, mean;
    int  m;
    mean = 0.0;
    for (int n = 0; n < NS; n++) begin
      step();
      yw[n] = (iout_p - iout_n) / IREF;
      mean += yw[n] / real'(NS);
    end
    // the differential output has an offset of one unit current (63 cells);
    // remove it so that the window does not spread it into the band
    for (int n = 0; n < NS; n++) begin
      w = 0.35875 - 0.48829 * ctab[n] + 0.14128 * ctab[(2 * n) % NS]
          - 0.01168 * ctab[(3 * n) % NS];
      yw[n] = w * (yw[n] - mean);
    end
    psig = 0.0; pn = 0.0;
    for (int k = 0; k <= BAND; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < NS; n++) begin
        m = (n * k) % NS;
        re += yw[n] * ctab[m];
        im -= yw[n] * stab[m];
      end
      p = re * re + im * im;
      if (k >= KSIG - 5 && k <= KSIG + 5) psig += p;
      else if (k >= 5) pn += p;
    end
    sndr = 10.0 * $log10(psig / pn);
  endtask

  initial begin
    real pi = 3.14159265358979;
    real sndr_uncal, sndr_cal;
    int  rounds = 0;
    for (int n = 0; n < NS; n++) begin
      ctab[n] = $cos(2.0 * pi * real'(n) / real'(NS));
      stab[n] = $sin(2.0 * pi * real'(n) / real'(NS));
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2048) step();
    measure(sndr_uncal);
    $display("calibration off: in-band SNDR %6.2f dB", sndr_uncal);
    cal_enable = 1'b1;
    for (int c = 0; c < ROUND + 16; c++) begin
      if (round_done) rounds++;
      step();
    end
    measure(sndr_cal);
    $display("calibration on:  in-band SNDR %6.2f dB", sndr_cal);
    checks += 3;
    if (rounds != 1) begin failures++; $display("expected one calibration round"); end
    if (sndr_cal < 80.0) begin failures++; $display("calibrated SNDR below 80 dB"); end
    if (sndr_cal - sndr_uncal < 6.0) begin
      failures++; $display("calibration improved SNDR by less than 6 dB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
