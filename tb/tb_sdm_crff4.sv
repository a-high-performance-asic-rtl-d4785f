// tb_sdm_crff4: the modulator model must (1) keep the thermometer code
// valid and equal to the 3-bit code, (2) track a DC input: the mean DAC
// level equals B1 * u = 1.167 u within 1 % of VREF, (3) reproduce a 10 kHz
// sine at 0.5 VREF with the same gain (correlation within 2 %), and stay
// stable (no run of more than 40 clipped codes).
module tb_sdm_crff4;
  logic clk = 0, rst_n = 0;
  logic signed [31:0] vin_uv = '0;
  logic [6:0] therm;
  logic [2:0] code;
  int checks = 0, failures = 0;

  sdm_crff4 dut (.clk, .rst_n, .vin_uv, .therm, .code);
  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real dcs [5] = '{0.0, 0.2, -0.3, 0.5, -0.55};
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (dcs[j]) begin
      real acc;
      vin_uv = 32'($rtoi(dcs[j] * 1.0e6));
      repeat (2000) @(negedge clk);
      acc = 0.0;
      for (int i = 0; i < 20000; i++) begin
        @(negedge clk);
        acc += real'(2 * int'(code) - 7) / 7.0;
        checks++;
        if (therm != 7'((1 << code) - 1)) begin failures++; $display("FAIL therm %b code %0d", therm, code); end
      end
      acc /= 20000.0;
      checks++;
      if (acc - 1.167 * dcs[j] > 0.01 || 1.167 * dcs[j] - acc > 0.01) begin
        failures++; $display("FAIL DC %f: mean %f", dcs[j], acc);
      end
    end
    begin
      real s, c, run;
      int clip;
      s = 0.0; c = 0.0; clip = 0; run = 0;
      for (int i = 0; i < 40000; i++) begin
        real ph, v;
        ph = 2.0 * 3.14159265358979 * 10.0e3 * real'(i) / 2.0e6;
        vin_uv = 32'($rtoi(0.5e6 * $sin(ph)));
        @(negedge clk);
        v = real'(2 * int'(code) - 7) / 7.0;
        if (i >= 2000) begin s += v * $sin(ph); c += v * $cos(ph); end
        if (code == 0 || code == 7) clip++; else clip = 0;
        if (clip > 40) run = 1;
      end
      s = 2.0 * s / 38000.0;
      $display("sine gain %f", s / 0.5);
      checks += 2;
      if (s / 0.5 < 1.167 * 0.98 || s / 0.5 > 1.167 * 1.02) begin failures++; $display("FAIL sine gain"); end
      if (run != 0) begin failures++; $display("FAIL overload"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
