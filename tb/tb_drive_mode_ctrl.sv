// tb_drive_mode_ctrl: checks the start-up sweep (one step of fstep per
// amplitude window from fmin, wrap to fmin with a sweep count when fmax
// would be passed), the switch to normal mode on the first amplitude above
// the on-threshold (with a one-cycle to_normal pulse and the sweep frequency
// frozen), the fall-back to start-up after 8 consecutive windows below the
// off-threshold (not after 7), and the restart input.
module tb_drive_mode_ctrl;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0, restart = 0, amp_valid = 0, to_normal;
  sample_t amp = '0, on_th = 24'd1000000, off_th = 24'd200000;
  logic [31:0] fmin = 32'd17000000, fmax = 32'd17100000, fstep = 32'd30000, sweep_fword;
  drive_mode_t mode;
  logic [15:0] sweep_count;
  int checks = 0, failures = 0;

  drive_mode_ctrl dut (.clk, .rst_n, .restart, .amp_valid, .amp, .on_th, .off_th, .fmin, .fmax,
                       .fstep, .mode, .sweep_fword, .to_normal, .sweep_count);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic window(input int a);
    @(negedge clk); amp = 24'(a); amp_valid = 1;
    @(negedge clk); amp_valid = 0;
  endtask

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    longint f;
    int pulses;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    expect_eq(sweep_fword, fmin, "restart loads fmin");
    f = fmin;
    for (int i = 0; i < 20; i++) begin
      window(500000);
      if (f < fmin || f + fstep > fmax) f = fmin; else f = f + fstep;
      expect_eq(sweep_fword, f, "sweep step");
      expect_eq(mode, MODE_STARTUP, "still start-up");
    end
    checks++;
    if (sweep_count == 0) begin failures++; $display("FAIL no wrap counted"); end
    // oscillation detected
    @(negedge clk); amp = 24'd1200000; amp_valid = 1;
    @(negedge clk); amp_valid = 0;
    expect_eq(mode, MODE_NORMAL, "switch to normal");
    expect_eq(to_normal, 1, "to_normal pulse");
    @(negedge clk);
    expect_eq(to_normal, 0, "to_normal one cycle");
    expect_eq(sweep_fword, f, "sweep frozen");
    // 7 low windows: stay
    for (int i = 0; i < 7; i++) window(100000);
    expect_eq(mode, MODE_NORMAL, "stays normal after 7 low windows");
    window(500000);
    for (int i = 0; i < 7; i++) window(100000);
    expect_eq(mode, MODE_NORMAL, "count reset by a good window");
    window(100000);
    expect_eq(mode, MODE_STARTUP, "fall back after 8 low windows");
    expect_eq(sweep_fword, fmin, "sweep restarts at fmin");
    window(2000000);
    expect_eq(mode, MODE_NORMAL, "normal again");
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    expect_eq(mode, MODE_STARTUP, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
