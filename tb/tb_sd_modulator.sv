// Self-checking testbench of sd_modulator.
//
// A reference model of the same loop, written without any slicing on 64-bit
// integers, runs beside the pipelined modulator. After clock edge e the
// modulator's code must equal the reference output of loop sample e-2 plus the
// mid-scale offset: this checks both the arithmetic and the pipeline latency.
// The stimulus covers a full-scale sine, both full-scale DC extremes, random
// words and a small sine. For DC inputs the mean output over 1024 clocks is
// also compared with the nominal gain of the loop (y = x/512), and the
// reference quantizer input must stay within the 6-bit range everywhere,
// which is the stability claim of the coefficient set.
module tb_sd_modulator;
  localparam int IN_W = 14;
  localparam int N    = 12000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [IN_W-1:0] din = '0;
  logic [5:0] code;
  int checks = 0, failures = 0;

  sd_modulator dut (.clk(clk), .rst_n(rst_n), .din(din), .code(code));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference loop, states in units of 2^-11 quantizer LSB
  longint s [4];
  longint yref [N];

  function automatic int stim(int e);
    real pi = 3.14159265358979;
    if (e < 3000)       return int'($floor(8191.0 * $sin(2.0 * pi * real'(e) / 97.3) + 0.5));
    else if (e < 4500)  return 8191;
    else if (e < 6000)  return -8192;
    else if (e < 8000)  return int'($urandom_range(16383)) - 8192;
    else if (e < 10000) return int'($floor(300.0 * $sin(2.0 * pi * real'(e) / 31.7) + 0.5));
    else                return 1234;
  endfunction

  longint dc_sum;
  int     dc_n;

  initial begin
    longint q, y, x;
    int maxq = 0, minq = 0;
    for (int k = 0; k < 4; k++) s[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    dc_sum = 0; dc_n = 0;
    for (int e = 0; e < N; e++) begin
      x = longint'(stim(e));
      din = IN_W'(x);
      // reference: output of sample e, then update with x[e]
      q = s[3] >>> 11;
      if (q > maxq) maxq = int'(q);
      if (q < minq) minq = int'(q);
      y = (q > 31) ? 31 : (q < -32) ? -32 : q;
      yref[e] = y;
      s[3] = s[3] + s[2] - y * 4096;
      s[2] = s[2] + s[1] - y * 4096;
      s[1] = s[1] + s[0] - y * 2048;
      s[0] = s[0] + x    - y * 512;
      @(posedge clk);
      #1;
      if (e >= 2) begin
        checks++;
        if (int'(code) != int'(yref[e-2]) + 32) begin
          failures++;
          if (failures < 10)
            $display("mismatch after edge %0d: code=%0d expected=%0d", e, code, yref[e-2] + 32);
        end
      end
      // DC gain: mean over the last 1024 clocks of each DC segment
      if ((e >= 3476 && e < 4500) || (e >= 4976 && e < 6000) || (e >= 10976 && e < 12000)) begin
        dc_sum += longint'(code) - 32;
        dc_n++;
        if (dc_n == 1024) begin
          real mean = real'(dc_sum) / 1024.0;
          real want = real'(stim(e)) / 512.0;
          checks++;
          if (mean - want > 0.05 || want - mean > 0.05) begin
            failures++;
            $display("DC gain: mean %f expected %f", mean, want);
          end
          dc_sum = 0; dc_n = 0;
        end
      end
    end
    checks++;
    if (maxq > 31 || minq < -32) begin
      failures++;
      $display("quantizer input left the 6-bit range: %0d..%0d", minq, maxq);
    end
    $display("quantizer input range %0d..%0d", minq, maxq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
