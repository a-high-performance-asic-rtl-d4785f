// tb_amp_detector: random samples with random gaps between them; every
// window of 64 samples must report the largest magnitude in it, one cycle
// after the 64th sample.
module tb_amp_detector;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0, sig_valid = 0, amp_valid;
  sample_t sig = '0, amp;
  int checks = 0, failures = 0;

  amp_detector dut (.clk, .rst_n, .sig_valid, .sig, .amp_valid, .amp);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      int pk, scale;
      pk = 0;
      scale = 1 << $urandom_range(4, 22);
      for (int i = 0; i < 64; i++) begin
        int v;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        v = $urandom_range(0, 2 * scale) - scale;
        if (w == 7 && i == 10) v = -8388608;
        if ((v < 0 ? -v : v) > pk) pk = (v < 0 ? -v : v);
        sig = 24'(v); sig_valid = 1;
        @(negedge clk); sig_valid = 0;
        checks++;
        if (amp_valid != (i == 63)) begin failures++; $display("FAIL amp_valid timing"); end
      end
      if (pk > 8388607) pk = 8388607;
      checks++;
      if (int'(amp) != pk) begin failures++; $display("FAIL window %0d amp %0d expected %0d", w, amp, pk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
