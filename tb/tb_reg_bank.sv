// tb_reg_bank: checks the reset values read back through the map, that
// every writable register stores a random value and reads it back (and
// appears in the cfg output), and that the status words read the status
// input fields.
module tb_reg_bank;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [14:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  core_status_t status;
  core_cfg_t cfg;
  int checks = 0, failures = 0;

  reg_bank dut (.clk, .rst_n, .we, .addr, .wdata, .rdata, .status, .cfg);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [15:0] v;
    status = '{mode: MODE_NORMAL, pll_lock: 1'b1, st_pass: 1'b0, st_done: 1'b1,
               parity_errors: 8'h5A, rate: 24'h123456, quad: 24'hABCDEF, amp: 24'h0F1E2D,
               fword: 32'h01470000, drive_amp: 16'h4321};
    repeat (2) @(negedge clk); rst_n = 1;
    addr = 15'h400; #1; expect_eq(rdata, 16'h0014, "CTRL reset (dec 32)");
    addr = 15'h405; #1; expect_eq(rdata, 16'd262, "fmin reset (8 kHz)");
    addr = 15'h406; #1; expect_eq(rdata, 16'd393, "fmax reset (12 kHz)");
    addr = 15'h414; #1; expect_eq(rdata, 16'h4000, "SF c0 reset 1.0");
    for (int a = 'h401; a <= 'h416; a++) begin
      @(negedge clk); addr = 15'(a); wdata = 16'($urandom); we = 1; v = wdata;
      if (a == 'h40B) v = {8'h0, v[7:0]};
      @(negedge clk); we = 0; #1;
      expect_eq(rdata, v, $sformatf("register %h", a));
    end
    @(negedge clk); addr = 15'h400; wdata = 16'h003F; we = 1;
    @(negedge clk); we = 0; #1;
    expect_eq(rdata, 16'h003F, "CTRL");
    expect_eq({cfg.restart, cfg.dec_log2, cfg.cv_gain_sel, cfg.st_en}, 6'h3F, "CTRL fields");
    addr = 15'h401; #1; expect_eq(cfg.amp_target, rdata, "cfg amp_target");
    addr = 15'h416; #1; expect_eq(cfg.sf_c2, rdata, "cfg sf_c2");
    addr = 15'h420; #1; expect_eq(rdata, 16'h5A0B, "status word");
    addr = 15'h421; #1; expect_eq(rdata, 16'h1234, "rate hi");
    addr = 15'h422; #1; expect_eq(rdata, 16'h0056, "rate lo");
    addr = 15'h423; #1; expect_eq(rdata, 16'hABCD, "quad");
    addr = 15'h424; #1; expect_eq(rdata, 16'h0F1E, "amp");
    addr = 15'h425; #1; expect_eq(rdata, 16'h0147, "fword");
    addr = 15'h426; #1; expect_eq(rdata, 16'h4321, "drive amp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
