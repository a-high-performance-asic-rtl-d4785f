// tb_filter_chain: the chain is fed with 3-bit codes from a first-order
// 8-level delta-sigma quantizer in the testbench carrying a sine of
// amplitude 3 levels. The output amplitude (correlation with the tone at
// the output sample times) must match the chain gain computed here in
// floating point from the filter formulas: CIC decimator droop
// |sin(pi f R/fs) / (R sin(pi f/fs))|^4 * 2^20, the four biquads'
// |H(e^jw)| and the interpolator droop, within 5 %, for tones at 7, 10 and
// 14 kHz; a tone at the sense resonance, 12.0 kHz, must be
// attenuated by more than 60 dB relative to 10 kHz. The output rate must be
// one word per 8 clocks.
module tb_filter_chain;
  import gyro_pkg::*;
  logic clk = 0, rst_n = 0, dec_valid, out_valid;
  logic [2:0] code = 3'd3, dec_log2 = 3'd5;
  sample_t dec_data, out_data;
  int checks = 0, failures = 0;

  filter_chain dut (.clk, .rst_n, .code, .dec_log2, .dec_valid, .dec_data, .out_valid, .out_data);
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979;
  real f = 10.0e3, amp = 3.0, err = 0.0;
  longint cyc = 0;
  always @(negedge clk) begin
    real u, y;
    int q;
    cyc++;
    u = amp * $sin(2.0 * PI * f * real'(cyc) / 2.0e6);
    y = u + err;
    q = 2 * $rtoi($floor((y + 7.0) / 2.0 + 0.5)) - 7;
    if (q > 7) q = 7;
    if (q < -7) q = -7;
    err = y - real'(q);
    code = 3'((q + 7) / 2);
  end

  real sacc, cacc;
  int nacc, last_t, bad_spacing;
  bit acc_on = 0;
  always @(posedge clk) if (out_valid && rst_n) begin
    if (acc_on) begin
      sacc += real'(out_data) * $sin(2.0 * PI * f * real'(cyc) / 2.0e6);
      cacc += real'(out_data) * $cos(2.0 * PI * f * real'(cyc) / 2.0e6);
      nacc++;
      if (last_t != 0 && int'(cyc) - last_t != 8) bad_spacing++;
    end
    last_t = int'(cyc);
  end

  function automatic real bq_gain(input biquad_t c, input real fr, input real fs);
    real w, nr, ni, dr, di;
    w  = 2.0 * PI * fr / fs;
    nr = (real'(c.b0) + real'(c.b1) * $cos(w) + real'(c.b2) * $cos(2.0 * w)) / 4194304.0;
    ni = -(real'(c.b1) * $sin(w) + real'(c.b2) * $sin(2.0 * w)) / 4194304.0;
    dr = 1.0 + (real'(c.a1) * $cos(w) + real'(c.a2) * $cos(2.0 * w)) / 4194304.0;
    di = -(real'(c.a1) * $sin(w) + real'(c.a2) * $sin(2.0 * w)) / 4194304.0;
    return $sqrt((nr * nr + ni * ni) / (dr * dr + di * di));
  endfunction

  function automatic real chain_gain(input real fr);
    real g, x;
    x = PI * fr / 2.0e6;
    g = $pow($sin(32.0 * x) / (32.0 * $sin(x)), 4.0) * 1048576.0;
    g *= bq_gain(BQ_BANDPASS, fr, 62500.0) * bq_gain(BQ_BANDSTOP1, fr, 62500.0) *
         bq_gain(BQ_BANDSTOP2, fr, 62500.0) * bq_gain(BQ_LOWPASS, fr, 250000.0);
    x = PI * fr / 250000.0;
    g *= $pow($sin(4.0 * x) / (4.0 * $sin(x)), 3.0);
    return g;
  endfunction

  task automatic measure(input real fr, output real a);
    f = fr;
    acc_on = 0;
    repeat (30000) @(negedge clk);
    sacc = 0.0; cacc = 0.0; nacc = 0; bad_spacing = 0; last_t = 0; acc_on = 1;
    repeat (80000) @(negedge clk);
    acc_on = 0;
    a = 2.0 * $sqrt(sacc * sacc + cacc * cacc) / real'(nacc);
    checks++;
    if (bad_spacing != 0 || nacc < 9900) begin failures++; $display("FAIL output rate"); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real fr [3] = '{7.0e3, 10.0e3, 14.0e3};
    real a, a10, e;
    repeat (4) @(negedge clk); rst_n = 1;
    a10 = 0.0;
    foreach (fr[i]) begin
      measure(fr[i], a);
      e = amp * chain_gain(fr[i]);
      $display("f=%f measured %f expected %f", fr[i], a, e);
      checks++;
      if (a < 0.95 * e || a > 1.05 * e) begin failures++; $display("FAIL gain at %f", fr[i]); end
      if (i == 1) a10 = a;
    end
    measure(12.0e3, a);
    $display("12.0 kHz: %f (%f dB)", a, 20.0 * $log10(a / a10));
    checks++;
    if (a > a10 * 0.001) begin failures++; $display("FAIL band-stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
