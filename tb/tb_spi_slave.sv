// tb_spi_slave: a mode-0 SPI host (SCLK = clk/16) talks to the slave, which
// is connected to a memory model answering reads one cycle after bus_re.
// Checks: writes reach the bus with the right address and data, reads
// return the stored word with even parity on MISO, a frame with bad parity
// or the wrong length is dropped and counted.
module tb_spi_slave;
  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, mosi = 0, miso;
  logic [14:0] bus_addr;
  logic bus_re, bus_we;
  logic [15:0] bus_wdata, bus_rdata;
  logic [7:0] parity_errors;
  int checks = 0, failures = 0;
  logic [15:0] mem [32768];
  int n_we = 0;

  spi_slave dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .bus_addr, .bus_re, .bus_we,
                 .bus_wdata, .bus_rdata, .parity_errors);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (bus_we && rst_n) begin mem[bus_addr] <= bus_wdata; n_we++; end
    if (bus_re) bus_rdata <= mem[bus_addr];
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input int nbits, input bit wr, input logic [14:0] addr,
                       input logic [15:0] data, input bit bad, output logic [16:0] rx);
    logic [32:0] f;
    f = {wr, addr, data, 1'b0};
    f[0] = ^f[32:1] ^ bad;
    rx = '0;
    @(negedge clk); cs_n = 0;
    repeat (8) @(negedge clk);
    for (int i = 32; i > 32 - nbits; i--) begin
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

  initial begin
    logic [16:0] rx;
    logic [15:0] model [32768];
    for (int i = 0; i < 32768; i++) begin mem[i] = '0; model[i] = '0; end
    bus_rdata = '0;
    repeat (4) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      logic [14:0] a;
      logic [15:0] d;
      a = 15'($urandom_range(0, 2047));
      d = 16'($urandom);
      frame(33, 1, a, d, 0, rx);
      model[a] = d;
      checks++;
      if (mem[a] != d) begin failures++; $display("FAIL write %h to %h", d, a); end
      a = 15'($urandom_range(0, 2047));
      frame(33, 0, a, 16'h0, 0, rx);
      checks += 2;
      if (rx[16:1] != model[a]) begin failures++; $display("FAIL read %h: %h expected %h", a, rx[16:1], model[a]); end
      if (^rx != 1'b0) begin failures++; $display("FAIL read parity"); end
    end
    // bad parity write is dropped and counted
    begin
      int we0;
      we0 = n_we;
      frame(33, 1, 15'h10, 16'hDEAD, 1, rx);
      checks += 2;
      if (n_we != we0) begin failures++; $display("FAIL bad-parity write executed"); end
      if (parity_errors != 8'd1) begin failures++; $display("FAIL parity error count %0d", parity_errors); end
      frame(20, 1, 15'h10, 16'hDEAD, 0, rx);
      checks += 2;
      if (n_we != we0) begin failures++; $display("FAIL short frame executed"); end
      if (parity_errors != 8'd2) begin failures++; $display("FAIL short frame not counted"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
