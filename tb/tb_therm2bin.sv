// tb_therm2bin: exhaustive test of the thermometer-to-binary encoder. Every
// 7-bit input is applied; valid thermometer codes must give their level and
// any code must give its number of ones.
module tb_therm2bin;
  logic [6:0] therm;
  logic [2:0] bin;
  int checks = 0, failures = 0;

  therm2bin dut (.therm, .bin);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int ones;
      therm = 7'(v);
      #1;
      ones = 0;
      for (int k = 0; k < 7; k++) if (v[k]) ones++;
      checks++;
      if (int'(bin) != ones) begin
        failures++;
        $display("FAIL therm=%b bin=%0d expected %0d", therm, bin, ones);
      end
    end
    for (int l = 0; l <= 7; l++) begin
      therm = 7'((1 << l) - 1);
      #1;
      checks++;
      if (int'(bin) != l) begin failures++; $display("FAIL level %0d", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
