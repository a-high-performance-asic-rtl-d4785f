// tb_iir_stage: runs the band-pass and low-pass coefficient sets of the
// design over random and sinusoidal inputs and compares every output with a
// floating-point transposed-direct-form-II model (tolerance 2 LSB). Checks
// the four-cycle latency and the gain of the band-pass at its centre
// frequency (1.0) and far from it.
module tb_iir_stage;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, busy, out_valid;
  biquad_t coef = BQ_BANDPASS;
  sample_t in_data = '0, out_data;
  int checks = 0, failures = 0;

  iir_stage dut (.clk, .rst_n, .coef, .in_valid, .in_data, .busy, .out_valid, .out_data);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real s1, s2;
  function automatic real step_model(input real x);
    real b0, b1, b2, a1, a2, y;
    b0 = real'(coef.b0) / 4194304.0; b1 = real'(coef.b1) / 4194304.0;
    b2 = real'(coef.b2) / 4194304.0; a1 = real'(coef.a1) / 4194304.0;
    a2 = real'(coef.a2) / 4194304.0;
    y  = b0 * x + s1;
    s1 = b1 * x - a1 * y + s2;
    s2 = b2 * x - a2 * y;
    return y;
  endfunction

  // one sample through the DUT, with latency check; returns the output
  task automatic push(input sample_t x, output sample_t y);
    int lat;
    @(negedge clk); in_data = x; in_valid = 1;
    @(negedge clk); in_valid = 0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    y = out_data;
    checks++;
    if (lat != 4) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  task automatic run(input biquad_t c, input int n, input real freq, input real amp);
    real peak;
    coef = c; s1 = 0.0; s2 = 0.0;
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    peak = 0.0;
    for (int i = 0; i < n; i++) begin
      sample_t x, y;
      real ym;
      if (freq < 0.0) x = sample_t'($signed(24'($urandom)) >>> 3);
      else x = sample_t'($rtoi(amp * $sin(2.0 * 3.14159265358979 * freq * i)));
      push(x, y);
      ym = step_model(real'(x));
      checks++;
      if (real'(y) - ym > 2.0 || ym - real'(y) > 2.0) begin
        failures++;
        $display("FAIL sample %0d y=%0d model=%f", i, y, ym);
      end
      if (i > n / 2 && (real'(y) > peak)) peak = real'(y);
    end
    if (freq > 0.0) $display("f=%f peak=%f", freq, peak);
    if (freq == 0.16) begin
      checks++;
      if (peak < 0.97 * amp || peak > 1.02 * amp) begin failures++; $display("FAIL band-pass centre gain"); end
    end
    if (freq == 0.01) begin
      checks++;
      if (peak > 0.1 * amp) begin failures++; $display("FAIL band-pass stop band"); end
    end
  endtask

  initial begin
    run(BQ_BANDPASS, 400, -1.0, 0.0);
    run(BQ_BANDPASS, 400, 0.16, 1.0e6);     // 10 kHz at 62.5 kHz
    run(BQ_BANDPASS, 1200, 0.01, 1.0e6);
    run(BQ_LOWPASS, 400, -1.0, 0.0);
    run(BQ_BANDSTOP1, 400, -1.0, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
