// tb_pid_ctrl: drives random amplitude measurements with random gains and
// compares the drive amplitude after each with a PID computed in the
// testbench (u = (kp e + acc + kd (e - e_prev)) / 2^16, acc += ki e clamped
// to [0, 32767*2^16], u clamped to [0, 32767]). Also checks that while
// disabled the output is the start-up amplitude and the hand-over is
// bumpless (zero error keeps the start-up value).
module tb_pid_ctrl;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, amp_valid = 0;
  sample_t amp = '0, target = 24'd2097152;
  logic [15:0] kp = 16'd128, ki = 16'd32, kd = 16'd0, startup_amp = 16'd16384, drive_amp;
  int checks = 0, failures = 0;

  pid_ctrl dut (.clk, .rst_n, .enable, .amp_valid, .amp, .target, .kp, .ki, .kd,
                .startup_amp, .drive_amp);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, ep, e, u;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (drive_amp != startup_amp) begin failures++; $display("FAIL start-up amplitude"); end
    // bumpless: first measurement equal to target keeps the start-up value
    enable = 1;
    @(negedge clk); amp = target; amp_valid = 1;
    @(negedge clk); amp_valid = 0;
    checks++;
    if (drive_amp != startup_amp) begin failures++; $display("FAIL bumpless %0d", drive_amp); end
    acc = longint'(startup_amp) <<< 16; ep = 0;
    for (int n = 0; n < 3000; n++) begin
      if (n % 500 == 0) begin
        kp = 16'($urandom_range(0, 4000)); ki = 16'($urandom_range(0, 400));
        kd = 16'($urandom_range(0, 2000));
      end
      amp = 24'($urandom_range(0, 4194304));
      e = longint'(target) - longint'(amp);
      acc = acc + longint'(ki) * e;
      if (acc > (longint'(32767) <<< 16)) acc = longint'(32767) <<< 16;
      if (acc < 0) acc = 0;
      u = (longint'(kp) * e + acc + longint'(kd) * (e - ep)) >>> 16;
      ep = e;
      if (u < 0) u = 0;
      if (u > 32767) u = 32767;
      @(negedge clk); amp_valid = 1;
      @(negedge clk); amp_valid = 0;
      checks++;
      if (longint'(drive_amp) != u) begin failures++; $display("FAIL n=%0d out %0d expected %0d", n, drive_amp, u); end
    end
    enable = 0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (drive_amp != startup_amp) begin failures++; $display("FAIL disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
