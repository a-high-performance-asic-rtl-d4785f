// tb_cic_decimator: the decimator's output must equal the input filtered by
// its impulse response, ORDER cascaded boxcars of length R, taken every R-th
// sample (gain-normalised by 2^(4*(5-log2 R))). The testbench builds that
// response by convolution, finds the pipeline alignment on the first outputs
// and then checks every output, for R = 32 and R = 16, plus the output rate
// (one word per R inputs) and the full-scale DC value 7 * 2^20.
module tb_cic_decimator;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [2:0] dec_log2 = 3'd5;
  logic signed [3:0] in_data = '0;
  logic signed [23:0] out_data;
  int checks = 0, failures = 0;

  cic_decimator dut (.clk, .rst_n, .dec_log2, .in_valid, .in_data, .out_valid, .out_data);
  always #5 clk = ~clk;

  int xs[$];
  int outs[$];
  int out_t[$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) xs.push_back(int'(in_data));
    if (out_valid && rst_n) begin outs.push_back(int'(out_data)); out_t.push_back(cyc); end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int l2, input bit dc);
    int r, hl, best, sh;
    int h[];
    r = 1 << l2;
    sh = 4 * (5 - l2);
    // impulse response of N boxcars of length r
    h = new[1]; h[0] = 1;
    for (int k = 0; k < N; k++) begin
      int g[];
      g = new[h.size() + r - 1];
      foreach (g[i]) g[i] = 0;
      foreach (h[i]) for (int j = 0; j < r; j++) g[i + j] += h[i];
      h = g;
    end
    hl = h.size();
    rst_n = 0; xs.delete(); outs.delete(); out_t.delete(); dec_log2 = 3'(l2);
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1; in_valid = 1;
    for (int i = 0; i < 40 * r; i++) begin
      in_data = dc ? 4'sd7 : 4'($signed(2 * $urandom_range(0, 7) - 7));
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    // alignment: output m corresponds to the filtered input ending at index e = m*r + best
    best = -1000;
    for (int d = -r; d < r; d++) begin
      bit ok = 1;
      for (int m = 8; m < 12; m++) begin
        longint y = 0;
        int e = m * r + d;
        for (int k = 0; k < hl; k++) if (e - k >= 0 && e - k < xs.size()) y += h[k] * xs[e - k];
        if (((y <<< sh) & 64'hFFFFFF) != (longint'(outs[m]) & 64'hFFFFFF)) ok = 0;
      end
      if (ok) best = d;
    end
    checks++;
    if (best == -1000) begin failures++; $display("FAIL no alignment for R=%0d", r); end
    else for (int m = 8; m < outs.size(); m++) begin
      longint y = 0;
      int e = m * r + best;
      if (e >= xs.size()) break;
      for (int k = 0; k < hl; k++) if (e - k >= 0) y += h[k] * xs[e - k];
      checks++;
      if ((y <<< sh) != longint'(outs[m])) begin
        failures++;
        $display("FAIL R=%0d out %0d = %0d expected %0d", r, m, outs[m], y <<< sh);
      end
    end
    // rate: one output per r inputs
    for (int m = 2; m < out_t.size(); m++) begin
      checks++;
      if (out_t[m] - out_t[m-1] != r) begin failures++; $display("FAIL output spacing"); end
    end
    if (dc) begin
      checks++;
      if (outs[outs.size() - 1] != 7 * (1 << 20)) begin
        failures++; $display("FAIL DC full scale %0d", outs[outs.size() - 1]);
      end
    end
  endtask

  initial begin
    run(5, 0);
    run(4, 0);
    run(5, 1);
    run(4, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
