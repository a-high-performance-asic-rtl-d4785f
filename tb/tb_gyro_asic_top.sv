// tb_gyro_asic_top: end-to-end test of the whole interface at its default
// parameters, with a MEMS gyroscope model closing the drive loop.
// MEMS model (real arithmetic, 2 MHz steps): the drive mode is a resonator
// (f0 = 10 kHz, Q = 20) excited by the drive force word; the drive pick-off
// capacitance is its displacement. The sense pick-off sees
//   dc_sense = 0.5*(rate/500 dps)*(velocity/w0) + 0.02*displacement
//              + self-test force * 60 fF
// (Coriolis term in velocity phase, a small quadrature term, and the
// self-test force), with no sense-mode dynamics.
// Sequence: reset -> start-up sweep -> switch to normal mode -> PLL lock and
// PID settling -> rate steps of +250/-250 dps -> DC transfer characteristic
// over +-500 dps (full scale, linearity) -> SPI register and NVRAM
// access, including a frame with bad parity -> ZRO and scale-factor
// compensation -> self-test -> restart of the drive loop. Each mechanism is
// counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_gyro_asic_top;
  import gyro_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [31:0] dc_drive_af, dc_sense_af;
  logic signed [15:0] temp;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic signed [FORCE_W-1:0] drive_force, st_force;
  logic cv_gain_sel, rate_valid;
  sample_t rate_out;
  core_status_t status;

  int checks = 0, failures = 0;

  gyro_asic_top dut (.*);

  always #250 clk = ~clk;   // 2 MHz

  // ---------------- MEMS model ----------------
  localparam real PI = 3.14159265358979;
  localparam real DT = 0.5e-6;
  localparam real F0 = 10.0e3, Q = 20.0;
  localparam real W0 = 2.0 * PI * F0;
  localparam real KF = 7.9e13;        // aF/s^2 per unit force
  real x = 0.0, v = 0.0, rate_dps = 0.0;

  always @(posedge clk) begin
    real f, a;
    f = real'(drive_force) / 32768.0;
    a = KF * f - W0 * W0 * x - (W0 / Q) * v;
    v = v + DT * a;
    x = x + DT * v;
  end
  always_comb begin
    dc_drive_af = $rtoi(x);
    dc_sense_af = $rtoi(0.5 * (rate_dps / 500.0) * (v / W0) + 0.02 * x
                        + real'(st_force) / 32768.0 * 60000.0);
  end

  // ---------------- mechanism counters ----------------
  int n_sweep = 0, n_to_normal = 0, n_lock = 0, n_pid = 0, n_cic = 0, n_iir = 0,
      n_interp = 0, n_crossing = 0, n_parity = 0, n_nv = 0, n_poly = 0, n_st = 0,
      n_fallback = 0;
  logic [31:0] last_sweep;
  logic last_lock = 1'b0;
  drive_mode_t last_mode = MODE_STARTUP;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.u_drive.u_mode.sweep_fword != last_sweep && status.mode == MODE_STARTUP) n_sweep++;
    last_sweep = dut.u_core.u_drive.u_mode.sweep_fword;
    if (dut.u_core.u_drive.to_normal) n_to_normal++;
    if (status.pll_lock && !last_lock) n_lock++;
    last_lock = status.pll_lock;
    if (last_mode == MODE_NORMAL && status.mode == MODE_STARTUP) n_fallback++;
    last_mode = status.mode;
    if (status.mode == MODE_NORMAL && dut.u_core.u_drive.amp_valid) n_pid++;
    if (dut.u_core.u_chain_drive.dec_valid) n_cic++;
    if (dut.u_core.u_chain_drive.u_bp.out_valid) n_iir++;
    if (dut.u_core.u_chain_drive.u_cic_int.out_valid) n_interp++;
    if (dut.u_core.u_drive.pll_crossing) n_crossing++;
    if (dut.u_core.u_comp.u_zro.done) n_poly++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- SPI host ----------------
  task automatic spi_frame(input bit wr, input logic [14:0] addr, input logic [15:0] data,
                           input bit bad_parity, output logic [15:0] rdata, output bit rpar);
    logic [32:0] f;
    logic [16:0] rx;
    f = {wr, addr, data, 1'b0};
    f[0] = ^f[32:1] ^ bad_parity;
    rx = '0;
    cs_n = 1'b0;
    repeat (8) @(posedge clk);
    for (int i = 32; i >= 0; i--) begin
      mosi = f[i];
      repeat (8) @(posedge clk);
      sclk = 1'b1;
      if (i <= 16) rx = {rx[15:0], miso};
      repeat (8) @(posedge clk);
      sclk = 1'b0;
    end
    repeat (8) @(posedge clk);
    cs_n = 1'b1;
    repeat (16) @(posedge clk);
    rdata = rx[16:1];
    rpar  = rx[0];
  endtask

  task automatic spi_write(input logic [14:0] addr, input logic [15:0] data);
    logic [15:0] d; bit p;
    spi_frame(1'b1, addr, data, 1'b0, d, p);
  endtask

  task automatic spi_read(input logic [14:0] addr, output logic [15:0] data);
    bit p;
    spi_frame(1'b0, addr, 16'h0, 1'b0, data, p);
    check((^data) == p, "read parity from the slave is even");
  endtask

  // average of the compensated rate over n output samples
  task automatic avg_rate(input int n, output real r);
    real acc = 0.0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk iff rate_valid);
      acc += real'(rate_out);
    end
    r = acc / n;
  endtask

  task automatic wait_ms(input real ms);
    repeat ($rtoi(ms * 2000.0)) @(posedge clk);
  endtask

  initial if ($test$plusargs("trace")) forever begin
    repeat (1000) @(posedge clk);
    $display("t=%0t mode=%0d f=%0d pe=%0d lock=%0d amp=%0d damp=%0d x=%.0f", $time, status.mode,
             status.fword, dut.u_core.u_drive.phase_err, status.pll_lock, dut.u_core.amp, status.drive_amp, x);
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    real r0, rp, rn, rz, rs, rst0;
    logic [15:0] d;
    bit p;
    int t_normal;
    temp = 16'sd0;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;

    // start-up sweep until the oscillation is detected
    t_normal = 0;
    while (status.mode != MODE_NORMAL && t_normal < 200_000) begin
      @(posedge clk); t_normal++;
    end
    check(status.mode == MODE_NORMAL, "drive loop reached normal mode");
    $display("normal mode after %0d us, fword=%0d", t_normal / 2, status.fword);

    wait_ms(40.0);
    check(status.pll_lock, "PLL locked");
    $display("fword=%0d (%.1f Hz) amp=%0d drive_amp=%0d x=%.0f aF",
             status.fword, real'(status.fword) * 2.0e6 / 4294967296.0, dut.u_core.amp,
             status.drive_amp, x);
    begin
      real fhz;
      fhz = real'(status.fword) * 2.0e6 / 4294967296.0;
      check(fhz > 9800.0 && fhz < 10200.0, "drive frequency near the resonance");
    end
    check(status.amp > 24'(int'(0.9 * 8192 * 256)) && status.amp < 24'(int'(1.1 * 8192 * 256)),
          "PID holds the amplitude at the target");

    // angular rate steps
    avg_rate(500, r0);
    rate_dps = 250.0; wait_ms(5.0); avg_rate(500, rp);
    rate_dps = -250.0; wait_ms(5.0); avg_rate(500, rn);
    rate_dps = 0.0; wait_ms(5.0);
    $display("rate: zero %.0f  +250 %.0f  -250 %.0f", r0, rp, rn);
    check(rp - r0 > 100000.0, "positive rate gives a positive output");
    check(r0 - rn > 100000.0, "negative rate gives a negative output");
    check((rp - r0) / (r0 - rn) > 0.9 && (rp - r0) / (r0 - rn) < 1.1, "rate response symmetric");
    // DC transfer characteristic over the full scale of +-500 dps: least-squares
    // line through five points, largest deviation must stay below 0.5 % of
    // the full-scale output
    begin
      real pts[5], rin[5], sx, sy, sxx, sxy, k, c, dev, fs;
      for (int i = 0; i < 5; i++) begin
        rin[i] = -500.0 + 250.0 * i;
        rate_dps = rin[i]; wait_ms(5.0); avg_rate(500, pts[i]);
      end
      rate_dps = 0.0; wait_ms(5.0);
      sx = 0; sy = 0; sxx = 0; sxy = 0;
      for (int i = 0; i < 5; i++) begin
        sx += rin[i]; sy += pts[i]; sxx += rin[i] * rin[i]; sxy += rin[i] * pts[i];
      end
      k = (5.0 * sxy - sx * sy) / (5.0 * sxx - sx * sx);
      c = (sy - k * sx) / 5.0;
      dev = 0; fs = k * 500.0;
      for (int i = 0; i < 5; i++)
        if ((pts[i] - k * rin[i] - c) > dev || -(pts[i] - k * rin[i] - c) > dev)
          dev = (pts[i] - k * rin[i] - c) > 0 ? pts[i] - k * rin[i] - c : -(pts[i] - k * rin[i] - c);
      $display("transfer: %.0f %.0f %.0f %.0f %.0f  scale %.1f /dps, nonlinearity %.4f %% FS",
               pts[0], pts[1], pts[2], pts[3], pts[4], k, 100.0 * dev / fs);
      check(pts[4] < 8388607.0 && pts[0] > -8388608.0, "full scale +-500 dps fits the output word");
      check(dev < 0.005 * fs, "nonlinearity over +-500 dps below 0.5 % of full scale");
    end

    // SPI: registers, NVRAM, parity
    spi_read(15'h420, d);
    check(d[0] == 1'b1 && d[1] == 1'b1, "status register reads normal mode and lock");
    spi_write(15'h005, 16'hBEEF);
    spi_write(15'h3FF, 16'h1234);
    spi_read(15'h005, d); check(d == 16'hBEEF, "NVRAM word 5 written and read back");
    spi_read(15'h3FF, d); check(d == 16'h1234, "NVRAM last word written and read back");
    n_nv += 2;
    spi_frame(1'b1, 15'h005, 16'h0000, 1'b1, d, p);   // bad parity: must be dropped
    spi_read(15'h005, d); check(d == 16'hBEEF, "write with bad parity is dropped");
    spi_read(15'h420, d); check(d[15:8] == 8'd1, "parity error counted");
    n_parity = int'(d[15:8]);

    // ZRO and scale factor compensation
    avg_rate(500, rz);
    spi_write(15'h411, 16'd2000);                       // ZRO c0 = 2000 << 8
    wait_ms(1.0); avg_rate(500, rs);
    $display("ZRO: before %.0f after %.0f", rz, rs);
    check(rz - rs > 0.95 * 512000.0 && rz - rs < 1.05 * 512000.0, "ZRO c0 subtracted");
    spi_write(15'h411, 16'd0);
    spi_write(15'h414, 16'h2000);                       // SF = 0.5
    rate_dps = 250.0; wait_ms(5.0); avg_rate(500, rs);
    $display("SF 0.5 at +250: %.0f (full %.0f)", rs, rp);
    check(rs > 0.45 * rp && rs < 0.55 * rp, "scale factor applied");
    spi_write(15'h414, 16'h4000);
    spi_write(15'h412, 16'h4000);                       // ZRO c1: temperature slope
    temp = 16'sd16384;                                  // +0.5 of full scale
    wait_ms(1.0); avg_rate(500, rs);
    check(rp - rs > 0.9 * 0.5 * 16384.0 * 256.0 && rp - rs < 1.1 * 0.5 * 16384.0 * 256.0,
          "ZRO temperature polynomial applied");
    spi_write(15'h412, 16'h0); temp = 16'sd0;
    rate_dps = 0.0; wait_ms(5.0);

    // self-test
    avg_rate(500, rst0);
    spi_write(15'h40E, 16'd8000);                       // self-test amplitude
    spi_write(15'h40F, 16'd400);                        // window low  = 400 << 8
    spi_write(15'h410, 16'd30000);                      // window high
    spi_write(15'h400, 16'h0015);                       // dec 32, self-test on
    wait_ms(12.0);
    avg_rate(500, rs);
    $display("self-test: rate %.0f -> %.0f, done=%0d pass=%0d", rst0, rs, status.st_done, status.st_pass);
    check(status.st_done && status.st_pass, "self-test done and passed");
    check(rs - rst0 > 102400.0, "self-test stimulus seen as rate");
    if (status.st_done) n_st++;
    spi_write(15'h400, 16'h0014);

    // restart: back to start-up, and the loop must recover
    spi_write(15'h400, 16'h0034);
    repeat (100) @(posedge clk);
    check(status.mode == MODE_STARTUP, "restart returns to start-up mode");
    spi_write(15'h400, 16'h0014);
    t_normal = 0;
    while (status.mode != MODE_NORMAL && t_normal < 200_000) begin
      @(posedge clk); t_normal++;
    end
    check(status.mode == MODE_NORMAL, "drive loop restarted");
    repeat (4) @(posedge clk);

    // every mechanism must have happened
    $display("counts: sweep=%0d to_normal=%0d lock=%0d pid=%0d cic=%0d iir=%0d interp=%0d crossing=%0d parity=%0d nvram=%0d poly=%0d selftest=%0d fallback=%0d",
             n_sweep, n_to_normal, n_lock, n_pid, n_cic, n_iir, n_interp, n_crossing, n_parity,
             n_nv, n_poly, n_st, n_fallback);
    check(n_sweep > 0, "start-up sweep happened");
    check(n_to_normal > 1, "mode switch happened (twice)");
    check(n_lock > 0, "PLL lock happened");
    check(n_pid > 0, "PID updates happened");
    check(n_cic > 0 && n_iir > 0 && n_interp > 0, "filter chain ran");
    check(n_crossing > 0, "phase detector crossings happened");
    check(n_parity > 0, "parity error happened");
    check(n_nv > 0, "NVRAM accesses happened");
    check(n_poly > 0, "polynomial unit ran");
    check(n_st > 0, "self-test happened");
    check(n_fallback > 0, "fall-back to start-up happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
