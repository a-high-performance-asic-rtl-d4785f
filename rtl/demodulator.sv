// demodulator: synchronous demodulation of the sense channel. Each filtered
// sense sample is multiplied by the NCO cosine and sine taken at the same
// instant; because the drive and sense channels have identical filter
// delays and the NCO is locked to the drive channel, the cosine product is
// the Coriolis (angular-rate) component and the sine product the
// quadrature component, with no separate phase adjustment. Each product is
// low-pass filtered by an iir_stage (BQ_RATE_LP, 1 kHz). The x2 factor
// restores the amplitude lost by mixing (mean of cos^2 is 1/2). Reusing the
// drive channel for the demodulation phase is the document's; the filter
// corner and formats are this design's.
// Timing: rate/quad are updated 5 cycles after each sig_valid.
module demodulator
  import gyro_pkg::*;
#(
  parameter biquad_t COEF_LP = BQ_RATE_LP
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sig_valid,
  input  sample_t                  sig,
  input  logic signed [TRIG_W-1:0] ref_cos,
  input  logic signed [TRIG_W-1:0] ref_sin,
  output logic                     out_valid,
  output sample_t                  rate,
  output sample_t                  quad
);
  logic signed [47:0] p_i, p_q;
  sample_t mix_i, mix_q;
  logic mix_v, q_v;
  logic [1:0] busy;

  always_comb begin
    p_i = 48'(sig) * 48'(ref_cos);
    p_q = 48'(sig) * 48'(ref_sin);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mix_i <= '0; mix_q <= '0; mix_v <= 1'b0;
    end else begin
      mix_v <= sig_valid;
      if (sig_valid) begin
        mix_i <= sat24(64'(p_i >>> (TRIG_W - 2)));
        mix_q <= sat24(64'(p_q >>> (TRIG_W - 2)));
      end
    end
  end

  iir_stage u_lp_i (.clk, .rst_n, .coef(COEF_LP), .in_valid(mix_v), .in_data(mix_i),
                    .busy(busy[0]), .out_valid(out_valid), .out_data(rate));
  iir_stage u_lp_q (.clk, .rst_n, .coef(COEF_LP), .in_valid(mix_v), .in_data(mix_q),
                    .busy(busy[1]), .out_valid(q_v), .out_data(quad));
endmodule
