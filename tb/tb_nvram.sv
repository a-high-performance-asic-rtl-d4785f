// tb_nvram: writes random words to random addresses of the 1k x 16 memory,
// keeps a copy in the testbench, and checks every read one cycle later.
module tb_nvram;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [1024];
  logic valid [1024];
  int checks = 0, failures = 0;

  nvram dut (.clk, .we, .re, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) valid[i] = 0;
    // fill the whole memory
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; re = 0; addr = 10'(i); wdata = 16'($urandom);
      model[i] = wdata; valid[i] = 1;
    end
    // random mix of reads and writes
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      addr = 10'($urandom);
      if ($urandom_range(0, 2) == 0) begin
        we = 1; re = 0; wdata = 16'($urandom); model[addr] = wdata;
      end else begin
        logic [9:0] a;
        we = 0; re = 1; a = addr;
        @(negedge clk); we = 0; re = 0;
        checks++;
        if (rdata != model[a]) begin
          failures++;
          $display("FAIL addr %0d read %h expected %h", a, rdata, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
