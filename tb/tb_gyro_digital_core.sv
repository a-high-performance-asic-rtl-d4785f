// tb_gyro_digital_core: the digital ASIC on its own, fed with 3-bit codes
// from two first-order 8-level delta-sigma quantizers in the testbench. The
// drive code carries a 10 kHz tone of 3 levels, reduced while the NCO is
// far from 10 kHz as a resonator would; the sense code carries
// R*cos + Qd*sin of the same tone (Coriolis and quadrature parts). Checks:
// start-up -> normal mode and PLL lock on the tone; the NCO frequency; the
// rate and quadrature outputs equal R and Qd times the chain gain (the same
// floating-point formula as tb_filter_chain) within 5 %; the status register
// a register reset value and an NVRAM word through SPI; rate output every 8 clocks.
module tb_gyro_digital_core;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] code_drive = 3'd3, code_sense = 3'd3;
  logic signed [15:0] temp = '0;
  logic sclk = 0, cs_n = 1, mosi = 0, miso;
  logic signed [15:0] drive_force, st_force;
  logic cv_gain_sel, rate_valid;
  sample_t rate_out;
  core_status_t status;
  int checks = 0, failures = 0;

  gyro_digital_core dut (.*);
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;
  localparam real F = 10.0e3;
  real R = 1.5, Qd = 0.5, e_d = 0.0, e_s = 0.0;
  longint cyc = 0;

  function automatic int quant(input real y);
    int q;
    q = 2 * $rtoi($floor((y + 7.0) / 2.0 + 0.5)) - 7;
    if (q > 7) q = 7;
    if (q < -7) q = -7;
    return q;
  endfunction

  always @(negedge clk) begin
    real ph, yd, ys, fn, ad;
    int qd, qs;
    cyc++;
    ph = 2.0 * PI * F * real'(cyc) / 2.0e6;
    // drive tone amplitude follows a resonance curve (Q = 20) of the NCO
    // frequency, so the start-up sweep finds it as it would a MEMS resonance
    fn = real'(status.fword) * 2.0e6 / 4294967296.0;
    ad = 3.0 / $sqrt(1.0 + (40.0 * (fn - F) / F) * (40.0 * (fn - F) / F));
    if (status.mode == MODE_NORMAL) ad = 3.0;
    yd = ad * $sin(ph) + e_d;
    ys = R * $cos(ph) + Qd * $sin(ph) + e_s;
    qd = quant(yd); qs = quant(ys);
    e_d = yd - real'(qd); e_s = ys - real'(qs);
    code_drive = 3'((qd + 7) / 2);
    code_sense = 3'((qs + 7) / 2);
  end

  function automatic real bq_gain(input biquad_t c, input real fr, input real fs);
    real w, nr, ni, dr, di;
    w  = 2.0 * PI * fr / fs;
    nr = (real'(c.b0) + real'(c.b1) * $cos(w) + real'(c.b2) * $cos(2.0 * w)) / 4194304.0;
    ni = -(real'(c.b1) * $sin(w) + real'(c.b2) * $sin(2.0 * w)) / 4194304.0;
    dr = 1.0 + (real'(c.a1) * $cos(w) + real'(c.a2) * $cos(2.0 * w)) / 4194304.0;
    di = -(real'(c.a1) * $sin(w) + real'(c.a2) * $sin(2.0 * w)) / 4194304.0;
    return $sqrt((nr * nr + ni * ni) / (dr * dr + di * di));
  endfunction

  function automatic real chain_gain(input real fr);
    real g, x;
    x = PI * fr / 2.0e6;
    g = $pow($sin(32.0 * x) / (32.0 * $sin(x)), 4.0) * 1048576.0;
    g *= bq_gain(BQ_BANDPASS, fr, 62500.0) * bq_gain(BQ_BANDSTOP1, fr, 62500.0) *
         bq_gain(BQ_BANDSTOP2, fr, 62500.0) * bq_gain(BQ_LOWPASS, fr, 250000.0);
    x = PI * fr / 250000.0;
    g *= $pow($sin(4.0 * x) / (4.0 * $sin(x)), 3.0);
    return g;
  endfunction

  task automatic spi_frame(input bit wr, input logic [14:0] addr, input logic [15:0] data,
                           output logic [16:0] rx);
    logic [32:0] f;
    f = {wr, addr, data, 1'b0};
    f[0] = ^f[32:1];
    rx = '0;
    @(negedge clk); cs_n = 0;
    repeat (8) @(negedge clk);
    for (int i = 32; i >= 0; i--) begin
      mosi = f[i];
      repeat (8) @(negedge clk);
      sclk = 1;
      if (i <= 16) rx = {rx[15:0], miso};
      repeat (8) @(negedge clk);
      sclk = 0;
    end
    repeat (8) @(negedge clk);
    cs_n = 1;
    repeat (16) @(negedge clk);
  endtask

  int last_rv = 0, bad_rate = 0, n_rate = 0;
  always @(posedge clk) if (rate_valid && rst_n) begin
    if (last_rv != 0 && int'(cyc) - last_rv != 8) bad_rate++;
    last_rv = int'(cyc);
    n_rate++;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real g, fhz;
    logic [16:0] rx;
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (status.mode != MODE_STARTUP) begin failures++; $display("FAIL not start-up"); end
    repeat (300_000) @(negedge clk);
    g = chain_gain(F);
    fhz = real'(status.fword) * 2.0e6 / 4294967296.0;
    $display("mode %0d lock %0d f %f rate %0d (exp %f) quad %f (exp %f)", status.mode,
             status.pll_lock, fhz, rate_out, R * g, real'(status.quad), Qd * g);
    checks += 5;
    if (status.mode != MODE_NORMAL) begin failures++; $display("FAIL mode"); end
    if (!status.pll_lock) begin failures++; $display("FAIL lock"); end
    if (fhz < 9995.0 || fhz > 10005.0) begin failures++; $display("FAIL frequency"); end
    if (real'(rate_out) < 0.95 * R * g || real'(rate_out) > 1.05 * R * g) begin
      failures++; $display("FAIL rate");
    end
    if (real'(status.quad) < 0.95 * Qd * g - 0.02 * R * g || real'(status.quad) > 1.05 * Qd * g + 0.02 * R * g) begin
      failures++; $display("FAIL quadrature");
    end
    checks++;
    if (bad_rate != 0 || n_rate < 1000) begin failures++; $display("FAIL rate output spacing"); end
    spi_frame(1'b0, 15'h420, 16'h0, rx);
    checks++;
    if (rx[2:1] != 2'b11) begin failures++; $display("FAIL status read %h", rx[16:1]); end
    spi_frame(1'b0, 15'h401, 16'h0, rx);
    checks++;
    if (rx[16:1] != 16'h2000) begin failures++; $display("FAIL amplitude target read %h", rx[16:1]); end
    spi_frame(1'b1, 15'h123, 16'hC0DE, rx);
    spi_frame(1'b0, 15'h123, 16'h0, rx);
    checks += 2;
    if (rx[16:1] != 16'hC0DE) begin failures++; $display("FAIL NVRAM read %h", rx[16:1]); end
    if (^rx != 1'b0) begin failures++; $display("FAIL parity"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
