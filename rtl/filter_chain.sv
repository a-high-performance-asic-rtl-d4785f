// filter_chain: the digital filter chain of one modulator channel (drive or
// sense), in the order the document lists it:
//   CIC decimator -> IIR band-pass -> IIR band-stop -> IIR band-stop
//   -> CIC interpolator -> IIR low-pass correction.
// The 3-bit modulator code (levels 0..7 of the mid-rise quantizer) is mapped
// to the odd signed levels -7..+7 and decimated by 2^dec_log2 into 24-bit
// words. The wide band-pass passes every plausible drive frequency, the two
// staggered band-stops remove the sense resonance, the interpolator raises
// the rate by 4 and the low-pass removes the interpolation images and the
// remaining out-of-band energy. Filter frequencies and orders are this
// design's choices (see gyro_pkg); the order of the stages is the document's.
// Timing: code is sampled on every clk (the 2 MHz modulator clock). With
// dec_log2 = 5 the band filters run at clk/32 and the output (out_valid) at
// clk/8; dec_log2 is limited to 4..5 so every IIR stage has its four steps.
module filter_chain
  import gyro_pkg::*;
#(
  parameter biquad_t COEF_BP  = BQ_BANDPASS,
  parameter biquad_t COEF_BS1 = BQ_BANDSTOP1,
  parameter biquad_t COEF_BS2 = BQ_BANDSTOP2,
  parameter biquad_t COEF_LP  = BQ_LOWPASS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] code,
  input  logic [2:0] dec_log2,
  output logic       dec_valid,   // decimated-rate strobe (band filters' rate)
  output sample_t    dec_data,    // CIC decimator output
  output logic       out_valid,
  output sample_t    out_data
);
  localparam int L_LOG2 = 2;

  logic [2:0] dl2;
  logic signed [3:0] level;
  logic bp_v, bs1_v, bs2_v, int_v;
  sample_t bp_d, bs1_d, bs2_d, int_d;
  logic [3:0] hi_cnt, hi_last;
  logic hi_stb;
  logic unused_busy;
  logic [3:0] busy;

  always_comb begin
    dl2     = (dec_log2 < 3'd4) ? 3'd4 : (dec_log2 > 3'd5) ? 3'd5 : dec_log2;
    level   = $signed({~code[2], code[1:0], 1'b1});  // 2*code - 7
    hi_last = 4'((5'd1 << (dl2 - 3'(L_LOG2))) - 5'd1);
    hi_stb  = (hi_cnt == hi_last);
    unused_busy = ^busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hi_cnt <= '0;
    else        hi_cnt <= hi_stb ? 4'd0 : hi_cnt + 4'd1;
  end

  cic_decimator #(.ORDER(4), .IN_W(4), .DEC_LOG2_MAX(5)) u_cic_dec (
    .clk, .rst_n, .dec_log2(dl2), .in_valid(1'b1), .in_data(level),
    .out_valid(dec_valid), .out_data(dec_data));

  iir_stage u_bp  (.clk, .rst_n, .coef(COEF_BP),  .in_valid(dec_valid), .in_data(dec_data),
                   .busy(busy[0]), .out_valid(bp_v),  .out_data(bp_d));
  iir_stage u_bs1 (.clk, .rst_n, .coef(COEF_BS1), .in_valid(bp_v),  .in_data(bp_d),
                   .busy(busy[1]), .out_valid(bs1_v), .out_data(bs1_d));
  iir_stage u_bs2 (.clk, .rst_n, .coef(COEF_BS2), .in_valid(bs1_v), .in_data(bs1_d),
                   .busy(busy[2]), .out_valid(bs2_v), .out_data(bs2_d));

  cic_interpolator #(.ORDER(3), .L_LOG2(L_LOG2), .W(DATA_W)) u_cic_int (
    .clk, .rst_n, .in_valid(bs2_v), .in_data(bs2_d), .hi_stb,
    .out_valid(int_v), .out_data(int_d));

  iir_stage u_lp  (.clk, .rst_n, .coef(COEF_LP), .in_valid(int_v), .in_data(int_d),
                   .busy(busy[3]), .out_valid(out_valid), .out_data(out_data));
endmodule
