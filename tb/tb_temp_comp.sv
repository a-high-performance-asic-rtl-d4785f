// tb_temp_comp: random rates, temperatures and coefficient sets; the output
// must equal (rate - ZRO(T)) * SF(T) computed in floating point in the
// testbench (ZRO coefficients << 8, SF coefficients Q2.14, T/2^15), within
// 0.01 % of full scale, 5 cycles after rate_valid.
module tb_temp_comp;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0, rate_valid = 0, out_valid;
  sample_t rate = '0, rate_c;
  logic signed [15:0] temp = '0;
  logic [15:0] zro_c [3], sf_c [3];
  int checks = 0, failures = 0;

  temp_comp dut (.clk, .rst_n, .rate_valid, .rate, .temp, .zro_c, .sf_c, .out_valid, .rate_c);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) begin zro_c[i] = '0; sf_c[i] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      real t, z, s, e;
      int lat;
      temp = 16'($urandom);
      rate = 24'($signed(24'($urandom)) >>> 2);
      for (int i = 0; i < 3; i++) begin
        zro_c[i] = 16'($signed(16'($urandom)) >>> 3);
        sf_c[i]  = (i == 0) ? 16'($urandom_range(8192, 24576)) : 16'($signed(16'($urandom)) >>> 4);
      end
      t = real'(temp) / 32768.0;
      z = (real'($signed(zro_c[0])) + t * (real'($signed(zro_c[1])) + t * real'($signed(zro_c[2])))) * 256.0;
      s = (real'($signed(sf_c[0])) + t * (real'($signed(sf_c[1])) + t * real'($signed(sf_c[2])))) / 16384.0;
      e = (real'(rate) - z) * s;
      if (e > 8388607.0) e = 8388607.0;
      if (e < -8388608.0) e = -8388608.0;
      @(negedge clk); rate_valid = 1;
      @(negedge clk); rate_valid = 0;
      lat = 1;
      while (!out_valid) begin @(negedge clk); lat++; end
      checks += 2;
      if (lat != 5) begin failures++; $display("FAIL latency %0d", lat); end
      if (real'(rate_c) - e > 839.0 || e - real'(rate_c) > 839.0) begin
        failures++; $display("FAIL rate_c %0d expected %f", rate_c, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
