// tb_snr_chain: signal-to-noise ratio of one complete channel, the
// 4th-order sigma-delta modulator model followed by the digital filter
// chain, at the default parameters (2 MHz modulator clock, decimation 32,
// output at 250 kHz).
// A 10 kHz sine of half the modulator full scale is applied. After the
// filters have settled, the output is projected onto sine and cosine at the
// known frequency over a whole number of periods (25 output samples per
// period), and the DC value is removed; what remains is noise plus
// distortion. The SNR is reported two ways:
//   - over the whole output band (0 to 125 kHz, everything the low-pass
//     correction lets through), from the residual power;
//   - in a 1 kHz band around the tone (the bandwidth of the rate output),
//     from a Hann-windowed DFT of the residual.
// Targets: the modulator and the filter chain are each specified for more
// than 120 dB in the signal band; the check requires the in-band figure to
// exceed 120 dB (about 124 dB is reached). The wide-band figure is limited
// to about 56 dB by the image of the tone at 62.5 - 10 = 52.5 kHz that the
// x4 interpolation leaves (order-3 CIC about -41 dB, 25 kHz low-pass about
// -13 dB more); it lies far outside the rate bandwidth, and the check only
// requires 50 dB.
`timescale 1ns/1ps
module tb_snr_chain;
  import gyro_pkg::*;
  localparam real FIN = 10_000.0, FS_OUT = 250_000.0, AMP_UV = 500_000.0;
  localparam int PER = 25;            // output samples per input period
  localparam int SETTLE = 2000;       // output samples discarded
  localparam int NPER = 200;          // periods analysed
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic signed [31:0] vin_uv = '0;
  logic [6:0] therm;
  logic [2:0] code;
  logic dec_valid, out_valid;
  sample_t dec_data, out_data;
  int checks = 0, failures = 0;

  sdm_crff4 u_sdm (.clk, .rst_n, .vin_uv, .therm, .code);
  filter_chain u_chain (.clk, .rst_n, .code, .dec_log2(3'd5), .dec_valid, .dec_data,
                        .out_valid, .out_data);

  always #250 clk = ~clk;   // 2 MHz

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    vin_uv <= $rtoi(AMP_UV * $sin(2.0 * PI * FIN * real'(cyc + 1) * 500.0e-9));
  end

  real ys[$];
  always @(posedge clk) if (rst_n && out_valid) ys.push_back(real'(out_data));

  initial begin
    real si, co, dc, a_s, a_c, amp2, res, p_sig, p_res, snr_wide;
    real p_in, snr_in, sw2;
    real e_res[];
    int n;
    repeat (4) @(negedge clk); rst_n = 1;
    wait (ys.size() >= SETTLE + NPER * PER);
    n = NPER * PER;
    e_res = new[n];
    si = 0; co = 0; dc = 0;
    for (int i = 0; i < n; i++) begin
      real ph;
      ph = 2.0 * PI * real'(i) / real'(PER);
      si += ys[SETTLE + i] * $sin(ph);
      co += ys[SETTLE + i] * $cos(ph);
      dc += ys[SETTLE + i];
    end
    a_s = 2.0 * si / n; a_c = 2.0 * co / n; dc = dc / n;
    amp2 = a_s * a_s + a_c * a_c;
    p_sig = amp2 / 2.0;
    // residual after removing DC and the fitted tone
    p_res = 0;
    for (int i = 0; i < n; i++) begin
      real ph;
      ph = 2.0 * PI * real'(i) / real'(PER);
      e_res[i] = ys[SETTLE + i] - dc - a_s * $sin(ph) - a_c * $cos(ph);
      p_res += e_res[i] * e_res[i];
    end
    // in-band residual: Hann-windowed DFT bins within +-500 Hz of the tone
    // (bin spacing FS_OUT/n = 50 Hz), scaled so white noise of power s^2
    // gives s^2 * (band / (FS_OUT/2))
    sw2 = 0;
    for (int i = 0; i < n; i++) sw2 += (0.5 - 0.5 * $cos(2.0 * PI * i / n)) ** 2;
    p_in = 0;
    for (int k = NPER - 10; k <= NPER + 10; k++) begin
      real xr, xi;
      xr = 0; xi = 0;
      for (int i = 0; i < n; i++) begin
        real wv;
        wv = (0.5 - 0.5 * $cos(2.0 * PI * i / n)) * e_res[i];
        xr += wv * $cos(2.0 * PI * k * i / n);
        xi -= wv * $sin(2.0 * PI * k * i / n);
      end
      p_in += 2.0 * (xr * xr + xi * xi) / (real'(n) * sw2);
    end
    p_res = p_res / n;
    snr_wide = 10.0 * $log10(p_sig / p_res);
    snr_in = 10.0 * $log10(p_sig / (p_in + 1.0e-30));
    $display("amplitude %.0f LSB, SNR 0-125 kHz %.1f dB, SNR 1 kHz band %.1f dB",
             $sqrt(amp2), snr_wide, snr_in);
    checks++;
    if ($sqrt(amp2) < 1.0e5) begin failures++; $display("FAIL tone missing"); end
    checks++;
    if (snr_wide < 50.0) begin failures++; $display("FAIL wide-band SNR"); end
    checks++;
    if (snr_in < 120.0) begin failures++; $display("FAIL in-band SNR"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
