// tb_drive_pll: the PLL with an NCO in its loop must lock to a sine drive
// signal (sampled every 8 cycles like the filter chain output) of a
// frequency it does not start at, ending with the NCO sine in phase with the
// signal and the frequency word within 0.2 % of the signal's; lock must be
// reported. Then a small noisy signal that never goes below -hyst must
// produce no qualified crossings (the modified phase detector), and a
// phase jump must clear the lock.
module tb_drive_pll;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, load = 0, sig_valid = 0;
  logic [31:0] fword_init = 32'd20400000, fmin = 32'd17000000, fmax = 32'd26000000;
  logic [3:0] kp_sh = 4'd6, ki_sh = 4'd2;
  sample_t hyst = 24'd65536, sig = '0;
  logic [31:0] fword, phase;
  logic crossing, lock;
  logic signed [15:0] phase_err;
  logic signed [15:0] nsin, ncos;
  int checks = 0, failures = 0;

  drive_pll dut (.clk, .rst_n, .enable, .load, .fword_init, .fmin, .fmax, .kp_sh, .ki_sh, .hyst,
                 .sig_valid, .sig, .phase, .fword, .crossing, .phase_err, .lock);
  nco u_nco (.clk, .rst_n, .fword, .phase, .sin_out(nsin), .cos_out(ncos));
  always #5 clk = ~clk;

  real f_sig = 10123.0;     // Hz at a 2 MHz clock
  real ph_sig = 0.3;        // turns
  real amp_sig = 2.0e6;
  real noise = 0.0;
  int cyc = 0;
  int n_cross = 0;
  always @(posedge clk) if (crossing && rst_n) n_cross++;

  always @(negedge clk) begin
    ph_sig += f_sig / 2.0e6;
    if (ph_sig >= 1.0) ph_sig -= 1.0;
    cyc++;
    sig_valid = (cyc % 8 == 0);
    if (sig_valid)
      sig = 24'($rtoi(amp_sig * $sin(2.0 * 3.14159265358979 * ph_sig) +
                      noise * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0)));
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real fw_exp, dphi;
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk); enable = 1;
    repeat (400_000) @(negedge clk);
    fw_exp = f_sig / 2.0e6 * 4294967296.0;
    $display("fword %0d expected %f, phase_err %0d lock %0d", fword, fw_exp, phase_err, lock);
    checks++;
    if (real'(fword) < 0.998 * fw_exp || real'(fword) > 1.002 * fw_exp) begin
      failures++; $display("FAIL frequency");
    end
    checks++;
    if (!lock) begin failures++; $display("FAIL no lock"); end
    // phase: NCO phase vs signal phase at the same instant
    dphi = real'(phase) / 4294967296.0 - ph_sig;
    if (dphi > 0.5) dphi -= 1.0;
    if (dphi < -0.5) dphi += 1.0;
    checks++;
    if (dphi > 0.02 || dphi < -0.02) begin failures++; $display("FAIL phase offset %f turn", dphi); end
    // phase jump: lock must drop
    ph_sig += 0.5;
    repeat (2000) @(negedge clk);
    checks++;
    if (lock) begin failures++; $display("FAIL lock not cleared by phase jump"); end
    // small noisy signal, above -hyst: no qualified crossings
    amp_sig = 20000.0; noise = 30000.0;
    repeat (2000) @(negedge clk);
    n_cross = 0;
    repeat (50000) @(negedge clk);
    checks++;
    if (n_cross != 0) begin failures++; $display("FAIL %0d crossings on a small signal", n_cross); end
    // disabled: fword follows fword_init
    enable = 0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (fword != fword_init) begin failures++; $display("FAIL disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
