// In-band signal-to-noise measurement of sd_modulator versus input level.
//
// For each input amplitude a sine of exactly 67 cycles in 8192 samples
// (0.98 MHz at a 120-MHz clock) is applied; after 2048 clocks of settling,
// 8192 output codes are recorded, windowed with a 4-term Blackman-Harris
// window and transformed by a direct DFT over the 5-MHz band, bins 0 to
// 8192/24 (oversampling ratio 12). Bins within 5 of the tone are signal, the
// remaining in-band bins from bin 3 up are noise. The measured SNR must clear
// a floor at each level, and must fall by about 1 dB per dB of input level,
// which is what a noise floor independent of the signal gives.
module tb_sd_modulator_snr;
  localparam int NS   = 8192;
  localparam int KSIG = 67;
  localparam int BAND = NS / 24;
  localparam int NLEV = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [13:0] din = '0;
  logic [5:0] code;
  int checks = 0, failures = 0;

  sd_modulator dut (.clk(clk), .rst_n(rst_n), .din(din), .code(code));

  always #4.1666 clk = ~clk;

  initial begin : watchdog
    repeat (NLEV * (NS + 2100) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ctab [NS];
  real stab [NS];
  real yw   [NS];
  real snr  [NLEV];
  // input levels in dB below the 14-bit full scale, and the SNR floors
  real lev_db [NLEV] = '{0.0, -6.0, -20.0, -40.0, -60.0};
  real floor_db [NLEV] = '{80.0, 74.0, 60.0, 40.0, 20.0};

  initial begin
    real pi = 3.14159265358979;
    real amp, w, re, im, p, psig, pnoise;
    int  m, n;
    for (int n = 0; n < NS; n++) begin
      ctab[n] = $cos(2.0 * pi * real'(n) / real'(NS));
      stab[n] = $sin(2.0 * pi * real'(n) / real'(NS));
    end
    for (int l = 0; l < NLEV; l++) begin
      amp = 8191.0 * (10.0 ** (lev_db[l] / 20.0));
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      #1 rst_n = 1'b1;
      for (int e = 0; e < NS + 2048; e++) begin
        m = (e * KSIG) % NS;
        din = 14'(int'($floor(amp * stab[m] + 0.5)));
        @(posedge clk);
        #1;
        if (e >= 2048) begin
          n = e - 2048;
          w = 0.35875 - 0.48829 * ctab[n] + 0.14128 * ctab[(2 * n) % NS]
              - 0.01168 * ctab[(3 * n) % NS];
          yw[n] = w * (real'(code) - 32.0);
        end
      end
      psig = 0.0; pnoise = 0.0;
      for (int k = 0; k <= BAND; k++) begin
        re = 0.0; im = 0.0;
        for (n = 0; n < NS; n++) begin
          m = (n * k) % NS;
          re += yw[n] * ctab[m];
          im -= yw[n] * stab[m];
        end
        p = re * re + im * im;
        if (k >= KSIG - 5 && k <= KSIG + 5) psig += p;
        else if (k >= 3) pnoise += p;
      end
      snr[l] = 10.0 * $log10(psig / pnoise);
      $display("input %6.1f dBFS: in-band SNR %6.2f dB", lev_db[l], snr[l]);
      checks++;
      if (snr[l] < floor_db[l]) begin
        failures++;
        $display("  below the %0.1f dB floor", floor_db[l]);
      end
    end
    for (int l = 1; l < NLEV; l++) begin
      real slope = (snr[0] - snr[l]) / (lev_db[0] - lev_db[l]);
      checks++;
      if (slope < 0.85 || slope > 1.15) begin
        failures++;
        $display("SNR slope %f dB/dB between 0 and %0.1f dBFS", slope, lev_db[l]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
