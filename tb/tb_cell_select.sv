// Self-checking testbench of cell_select.
//
// Random thermometer codes and every calibration index are applied. One
// clock later the 64 switch controls must hold the thermometer bits with the
// calibrating cell skipped, the calibration controls must be one-hot at that
// cell, and the number of switched-on cells must equal the code. A pointer
// step from k to k+1 with a steady code must change the role of cells k and
// k+1 only.
module tb_cell_select;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [62:0] therm;
  logic [5:0]  cal_idx;
  logic [63:0] cell_sw, cell_cal;
  int checks = 0, failures = 0;

  cell_select #(.N_CELLS(64)) dut (.clk(clk), .rst_n(rst_n), .therm(therm),
    .cal_idx(cal_idx), .cell_sw(cell_sw), .cell_cal(cell_cal));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] model_sw(logic [62:0] th, int k);
    logic [63:0] r;
    int b = 0;
    for (int p = 0; p < 64; p++) begin
      if (p == k) r[p] = 1'b0;
      else begin r[p] = th[b]; b++; end
    end
    return r;
  endfunction

  initial begin
    int code;
    logic [63:0] prev_sw;
    therm = '0; cal_idx = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (cell_sw != 0 || cell_cal != 0) failures++;
    #1 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      code = (i % 7 == 0) ? 63 : (i % 11 == 0) ? 0 : int'($urandom_range(63));
      therm = 63'((64'd1 << code) - 64'd1);
      cal_idx = 6'(i % 64);
      @(posedge clk); #1;
      checks += 3;
      if (cell_sw != model_sw(therm, i % 64)) failures++;
      if (cell_cal != (64'd1 << (i % 64))) failures++;
      if ($countones(cell_sw) != code) failures++;
    end
    // steady code, pointer steps: only cells k and k+1 change role
    therm = 63'((64'd1 << 40) - 64'd1);
    for (int k = 0; k < 63; k++) begin
      cal_idx = 6'(k);
      @(posedge clk); #1;
      prev_sw = cell_sw;
      cal_idx = 6'(k + 1);
      @(posedge clk); #1;
      checks++;
      if (((prev_sw ^ cell_sw) & ~((64'd3) << k)) != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
