// tb_cv_frontend: checks vo = Vb*dc/Cint of the C/V model for random
// capacitance changes at both gain settings (Vb = 3.35 V, Cint = 2 pF / 4 pF).
module tb_cv_frontend;
  logic signed [31:0] dc_af, vo_uv;
  logic gain_sel;
  int checks = 0, failures = 0;

  cv_frontend dut (.dc_af, .gain_sel, .vo_uv);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      real expv;
      dc_af    = $signed(32'($urandom_range(0, 1_000_000))) - 32'sd500_000;
      gain_sel = 1'($urandom);
      #1;
      expv = 3.35 * real'(dc_af) * 1.0e-18 / (gain_sel ? 4.0e-12 : 2.0e-12) * 1.0e6;
      checks++;
      if (real'(vo_uv) - expv > 1.0 || expv - real'(vo_uv) > 1.0) begin
        failures++;
        $display("FAIL dc=%0d gain=%0d vo=%0d exp=%f", dc_af, gain_sel, vo_uv, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
