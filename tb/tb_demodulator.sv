// tb_demodulator: a sense signal A*cos(phi) + B*sin(phi) sampled every 8
// cycles, with the reference cos/sin(phi) supplied as an NCO would, must
// settle to rate = A and quad = B within 1 % of full scale (the mixing loss
// is compensated); several (A, B) pairs including negative ones.
module tb_demodulator;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0, sig_valid = 0, out_valid;
  sample_t sig = '0, rate, quad;
  logic signed [15:0] ref_cos = '0, ref_sin = '0;
  int checks = 0, failures = 0;

  demodulator dut (.clk, .rst_n, .sig_valid, .sig, .ref_cos, .ref_sin, .out_valid, .rate, .quad);
  always #5 clk = ~clk;

  real A = 0.0, B = 0.0, ph = 0.0;
  int cyc = 0, nout = 0;
  always @(posedge clk) if (out_valid && rst_n) nout++;
  always @(negedge clk) begin
    ph += 10000.0 / 2.0e6;
    if (ph >= 1.0) ph -= 1.0;
    cyc++;
    ref_cos = 16'($rtoi(32767.0 * $cos(2.0 * 3.14159265358979 * ph)));
    ref_sin = 16'($rtoi(32767.0 * $sin(2.0 * 3.14159265358979 * ph)));
    sig_valid = (cyc % 8 == 0);
    if (sig_valid)
      sig = 24'($rtoi(A * $cos(2.0 * 3.14159265358979 * ph) + B * $sin(2.0 * 3.14159265358979 * ph)));
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pa [4] = '{3.0e6, -2.0e6, 0.0, 1.0e6};
    real pb [4] = '{0.0, 1.5e6, -4.0e6, 1.0e6};
    repeat (4) @(negedge clk); rst_n = 1;
    foreach (pa[i]) begin
      A = pa[i]; B = pb[i];
      repeat (40000) @(negedge clk);
      $display("A=%f B=%f rate=%0d quad=%0d", A, B, rate, quad);
      checks += 2;
      if (real'(rate) - A > 83886.0 || A - real'(rate) > 83886.0) begin failures++; $display("FAIL rate"); end
      if (real'(quad) - B > 83886.0 || B - real'(quad) > 83886.0) begin failures++; $display("FAIL quad"); end
    end
    checks++;
    if (nout < 4 * 40000 / 8 - 10) begin failures++; $display("FAIL output rate %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
