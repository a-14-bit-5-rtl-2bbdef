// Self-checking testbench of thermometer_encoder: every 6-bit code is
// applied and the output must hold exactly code ones, all at the bottom.
module tb_thermometer_encoder;
  logic [5:0]  code;
  logic [62:0] therm;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  thermometer_encoder #(.CODE_W(6)) dut (.code(code), .therm(therm));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] want;
    for (int k = 0; k < 64; k++) begin
      code = 6'(k);
      @(posedge clk);
      want = (64'd1 << k) - 64'd1;
      checks += 2;
      if (therm != want[62:0]) begin
        failures++;
        $display("code %0d: therm=%h", k, therm);
      end
      if ($countones(therm) != k) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
