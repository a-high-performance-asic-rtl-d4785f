// tb_nco: for several frequency words the phase must advance by fword each
// cycle, and sin/cos must match sin/cos of the 10-bit table phase (half-step
// centred) within 2 LSB, and lie within 0.5 % of full scale of the exact
// phase. Also checks that the output frequency (phase wraps) matches
// fword * f_clk / 2^32.
module tb_nco;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] fword = '0, phase;
  logic signed [15:0] sin_out, cos_out;
  int checks = 0, failures = 0;

  nco dut (.clk, .rst_n, .fword, .phase, .sin_out, .cos_out);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] fw [4] = '{32'd21474836, 32'd17179869, 32'd123456789, 32'd1000003};
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (fw[j]) begin
      logic [31:0] prev;
      int wraps;
      fword = fw[j];
      @(negedge clk); @(negedge clk);
      prev = phase; wraps = 0;
      for (int i = 0; i < 20000; i++) begin
        real ph, es, ec, q;
        @(negedge clk);
        checks++;
        if (phase - prev != fword) begin failures++; $display("FAIL phase step"); end
        if (phase < prev) wraps++;
        prev = phase;
        q  = (real'(phase >> 22) + 0.5) / 1024.0 * 2.0 * 3.14159265358979;
        es = 32767.0 * $sin(q);
        ec = 32767.0 * $cos(q);
        checks += 2;
        if (real'(sin_out) - es > 2.0 || es - real'(sin_out) > 2.0) begin
          failures++; $display("FAIL sin %0d vs %f", sin_out, es);
        end
        if (real'(cos_out) - ec > 2.0 || ec - real'(cos_out) > 2.0) begin
          failures++; $display("FAIL cos %0d vs %f", cos_out, ec);
        end
        ph = real'(phase) / 4294967296.0 * 2.0 * 3.14159265358979;
        checks++;
        if (real'(sin_out) - 32767.0 * $sin(ph) > 164.0 || 32767.0 * $sin(ph) - real'(sin_out) > 164.0) begin
          failures++; $display("FAIL sin accuracy");
        end
      end
      checks++;
      begin
        real expw;
        expw = real'(fword) * 20000.0 / 4294967296.0;
        if (real'(wraps) < expw - 1.0 || real'(wraps) > expw + 1.0) begin
          failures++; $display("FAIL frequency: %0d wraps, expected %f", wraps, expw);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
