// tb_cic_interpolator: feeds random words at the low rate and four high-rate
// strobes per word; the output must equal the zero-stuffed input filtered by
// ORDER boxcars of length 4 and divided by 4^(ORDER-1). The pipeline
// alignment is found on early outputs, then every output is checked; a DC
// input must come out unchanged, and there must be four outputs per input.
module tb_cic_interpolator;
  localparam int N = 3, L = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, hi_stb = 0, out_valid;
  logic signed [23:0] in_data = '0, out_data;
  int checks = 0, failures = 0;

  cic_interpolator dut (.clk, .rst_n, .in_valid, .in_data, .hi_stb, .out_valid, .out_data);
  always #5 clk = ~clk;

  int xs[$];     // zero-stuffed input at the high rate
  int outs[$];
  int nin = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid && rst_n) outs.push_back(int'(out_data));

  task automatic run(input bit dc);
    int h[];
    int best;
    h = new[1]; h[0] = 1;
    for (int k = 0; k < N; k++) begin
      int g[];
      g = new[h.size() + L - 1];
      foreach (g[i]) g[i] = 0;
      foreach (h[i]) for (int j = 0; j < L; j++) g[i + j] += h[i];
      h = g;
    end
    xs.delete(); outs.delete();
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int v;
      v = dc ? -1234567 : int'($signed(24'($urandom)) >>> 2);
      @(negedge clk); in_valid = 1; in_data = 24'(v);
      @(negedge clk); in_valid = 0;
      for (int s = 0; s < L; s++) begin
        xs.push_back(s == 0 ? v : 0);
        @(negedge clk); hi_stb = 1;
        @(negedge clk); hi_stb = 0;
        @(negedge clk);
      end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (outs.size() != 200 * L) begin failures++; $display("FAIL %0d outputs", outs.size()); end
    best = -100;
    for (int d = -8; d < 8; d++) begin
      bit ok = 1;
      for (int m = 20; m < 30; m++) begin
        longint y = 0;
        for (int k = 0; k < h.size(); k++) if (m + d - k >= 0) y += h[k] * xs[m + d - k];
        if ((y >>> ((N - 1) * 2)) != longint'(outs[m])) ok = 0;
      end
      if (ok) best = d;
    end
    checks++;
    if (best == -100) begin failures++; $display("FAIL no alignment"); end
    else for (int m = 20; m + best < xs.size() && m < outs.size(); m++) begin
      longint y = 0;
      for (int k = 0; k < h.size(); k++) if (m + best - k >= 0) y += h[k] * xs[m + best - k];
      checks++;
      if ((y >>> ((N - 1) * 2)) != longint'(outs[m])) begin
        failures++; $display("FAIL out %0d = %0d expected %0d", m, outs[m], y >>> 4);
      end
    end
    if (dc) begin
      checks++;
      if (outs[outs.size() - 1] != -1234567) begin failures++; $display("FAIL DC gain"); end
    end
  endtask

  initial begin
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
