// tb_poly_unit: random x and coefficients; the result must equal Horner's
// rule evaluated in the testbench (acc = acc*x/2^15 + c, floor division,
// saturated to 24 bits) and arrive DEG+2 = 4 cycles after the cycle that holds start.
module tb_poly_unit;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [15:0] x = '0;
  logic signed [23:0] c [3];
  logic signed [23:0] y;
  int checks = 0, failures = 0;

  poly_unit dut (.clk, .rst_n, .start, .x, .c, .busy, .done, .y);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) c[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      longint acc;
      int lat;
      x = 16'($urandom);
      for (int i = 0; i < 3; i++) c[i] = 24'($urandom);
      acc = longint'(c[2]);
      acc = ((acc * longint'(x)) >>> 15) + longint'(c[1]);
      acc = ((acc * longint'(x)) >>> 15) + longint'(c[0]);
      if (acc > 8388607) acc = 8388607;
      if (acc < -8388608) acc = -8388608;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks += 2;
      if (lat != 4) begin failures++; $display("FAIL latency %0d", lat); end
      if (longint'(y) != acc) begin failures++; $display("FAIL y=%0d expected %0d", y, acc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
