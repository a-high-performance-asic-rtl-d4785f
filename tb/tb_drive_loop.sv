// tb_drive_loop: the drive loop closed around a resonator model (f0 =
// 10 kHz, Q = 20) whose displacement is fed back directly as the drive
// signal every 8 clocks (no filter chain, so the force phase offset is set
// to a quarter turn plus the small sampling delay). From reset the loop must
// sweep, find the oscillation, switch to normal mode, lock the PLL near
// f0, and hold the amplitude at the target within 5 %; the force word must
// have amplitude drive_amp. Mechanisms are counted.
module tb_drive_loop;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0, sig_valid = 0;
  core_cfg_t cfg;
  sample_t sig = '0, amp;
  logic signed [15:0] drive_force, nco_sin, nco_cos, force_wave;
  logic [31:0] nco_phase, fword;
  drive_mode_t mode;
  logic pll_lock, pll_crossing, to_normal, amp_valid;
  logic [15:0] drive_amp, sweep_count;
  int checks = 0, failures = 0;

  drive_loop dut (.clk, .rst_n, .cfg, .sig_valid, .sig, .drive_force, .nco_phase, .nco_sin,
                  .nco_cos, .force_wave, .mode, .pll_lock, .pll_crossing, .to_normal, .amp,
                  .amp_valid, .fword, .drive_amp, .sweep_count);
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979, DT = 0.5e-6, W0 = 2.0 * PI * 10.0e3, Q = 20.0;
  localparam real KF = 4.0e6 * W0 * W0 / (Q * 0.5);
  real x = 0.0, v = 0.0;
  int cyc = 0, n_switch = 0, n_cross = 0, maxf = 0;
  always @(posedge clk) begin
    real a;
    a = KF * real'(drive_force) / 32768.0 - W0 * W0 * x - (W0 / Q) * v;
    v = v + DT * a;
    x = x + DT * v;
    cyc++;
    sig_valid <= (cyc % 8 == 0);
    sig <= 24'($rtoi(x));
    if (to_normal && rst_n) n_switch++;
    if (pll_crossing && rst_n) n_cross++;
    if (int'(drive_force) > maxf) maxf = int'(drive_force);
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '{st_en: 1'b0, cv_gain_sel: 1'b0, dec_log2: 3'd5, restart: 1'b0,
            amp_target: 16'd8192, pid_kp: 16'd64, pid_ki: 16'd16, pid_kd: 16'd0,
            sweep_fmin: 16'd262, sweep_fmax: 16'd393, sweep_step: 16'd13,
            phase_offset: 16'h4000 + 16'd1300, amp_on_th: 16'd4096, amp_off_th: 16'd1024,
            pll_kp_sh: 4'd6, pll_ki_sh: 4'd2, pll_hyst: 16'd256,
            startup_amp: 16'd16384, st_amp: 16'd0, st_lo: 16'h0, st_hi: 16'h0,
            zro_c0: 16'd0, zro_c1: 16'd0, zro_c2: 16'd0,
            sf_c0: 16'h4000, sf_c1: 16'd0, sf_c2: 16'd0};
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (mode != MODE_STARTUP) begin failures++; $display("FAIL not in start-up"); end
    repeat (600_000) @(negedge clk);
    $display("mode %0d lock %0d f=%f Hz amp=%0d drive_amp=%0d sweeps=%0d", mode, pll_lock,
             real'(fword) * 2.0e6 / 4294967296.0, amp, drive_amp, sweep_count);
    checks += 4;
    if (mode != MODE_NORMAL) begin failures++; $display("FAIL mode"); end
    if (!pll_lock) begin failures++; $display("FAIL lock"); end
    if (real'(fword) * 2.0e6 / 4294967296.0 < 9900.0 || real'(fword) * 2.0e6 / 4294967296.0 > 10100.0) begin
      failures++; $display("FAIL frequency");
    end
    if (real'(amp) < 0.95 * 8192.0 * 256.0 || real'(amp) > 1.05 * 8192.0 * 256.0) begin
      failures++; $display("FAIL amplitude");
    end
    maxf = 0;
    repeat (2000) @(negedge clk);
    checks++;
    if (real'(maxf) < 0.97 * real'(drive_amp) || real'(maxf) > 1.01 * real'(drive_amp)) begin
      failures++; $display("FAIL force amplitude %0d vs %0d", maxf, drive_amp);
    end
    checks += 2;
    if (n_switch != 1) begin failures++; $display("FAIL switches %0d", n_switch); end
    if (n_cross < 100) begin failures++; $display("FAIL crossings %0d", n_cross); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
