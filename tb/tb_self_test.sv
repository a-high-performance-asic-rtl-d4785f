// tb_self_test: the self-test force must be st_amp * ref_wave / 2^15 while
// enabled and zero otherwise; after SETTLE rate samples st_done rises and
// st_pass tells whether the rate lies in [st_lo, st_hi]; disabling clears
// both.
module tb_self_test;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0, st_en = 0, rate_valid = 0, st_done, st_pass;
  logic [15:0] st_amp = 16'd12000;
  logic signed [15:0] ref_wave = '0, st_force;
  sample_t rate = '0, st_lo = 24'd100000, st_hi = 24'd200000;
  int checks = 0, failures = 0;

  self_test #(.SETTLE(16)) dut (.clk, .rst_n, .st_en, .st_amp, .ref_wave, .rate_valid, .rate,
                                .st_lo, .st_hi, .st_force, .st_done, .st_pass);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int r, input bit exp_pass);
    st_en = 0; @(negedge clk); @(negedge clk);
    checks += 2;
    if (st_done || st_pass) begin failures++; $display("FAIL flags not cleared"); end
    if (st_force != 0) begin failures++; $display("FAIL force while disabled"); end
    st_en = 1;
    for (int i = 0; i < 40; i++) begin
      ref_wave = 16'($urandom);
      rate = 24'(r); rate_valid = (i % 2 == 0);
      @(negedge clk);
      checks++;
      if (int'(st_force) != ((int'(ref_wave) * int'(st_amp)) >>> 15)) begin
        failures++; $display("FAIL force %0d", st_force);
      end
      if (i == 20) begin
        checks++;
        if (st_done) begin failures++; $display("FAIL done too early"); end
      end
    end
    rate_valid = 0;
    checks += 2;
    if (!st_done) begin failures++; $display("FAIL not done"); end
    if (st_pass != exp_pass) begin failures++; $display("FAIL pass=%0d for rate %0d", st_pass, r); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(150000, 1);
    run(50000, 0);
    run(250000, 0);
    run(100000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
