// temp_comp: zero-rate-output (ZRO) cancellation and temperature
// compensation of ZRO and scale factor (SF):
//   rate_c = (rate - ZRO(T)) * SF(T)
// with ZRO(T) = z0 + z1*T + z2*T^2 and SF(T) = s0 + s1*T + s2*T^2 evaluated
// by two polynomial units; T is the temperature code as a signed fraction
// of full scale (T/2^15). ZRO coefficients are chain-scale words (16-bit
// register value << 8); SF coefficients are Q2.14 (0x4000 = 1.0), widened to
// Q2.22. The document lists the compensation; the quadratic order and the
// formats are this design's.
// Timing: out_valid pulses 5 cycles after rate_valid; a new rate may arrive
// every 5 or more cycles (later ones are dropped while busy).
module temp_comp
  import gyro_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rate_valid,
  input  sample_t            rate,
  input  logic signed [15:0] temp,
  input  logic [15:0]        zro_c [3],
  input  logic [15:0]        sf_c [3],
  output logic               out_valid,
  output sample_t            rate_c
);
  sample_t zc [3], sc [3];
  sample_t zro, sf, rate_r;
  logic z_busy, z_done, s_busy, s_done;
  logic signed [63:0] prod;

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      zc[i] = $signed({zro_c[i], 8'h0});
      sc[i] = sample_t'($signed(sf_c[i])) <<< 8;
    end
    prod = 64'(64'(rate_r) - 64'(zro)) * 64'(sf);
  end

  poly_unit #(.DEG(2), .X_W(16), .XF(15), .Y_W(DATA_W)) u_zro (
    .clk, .rst_n, .start(rate_valid && !z_busy), .x(temp), .c(zc), .busy(z_busy), .done(z_done), .y(zro));
  poly_unit #(.DEG(2), .X_W(16), .XF(15), .Y_W(DATA_W)) u_sf (
    .clk, .rst_n, .start(rate_valid && !z_busy), .x(temp), .c(sc), .busy(s_busy), .done(s_done), .y(sf));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rate_r <= '0; out_valid <= 1'b0; rate_c <= '0;
    end else begin
      out_valid <= 1'b0;
      if (rate_valid && !z_busy) rate_r <= rate;
      if (z_done) begin
        rate_c    <= sat24(prod >>> 22);
        out_valid <= 1'b1;
      end
    end
  end

  logic unused;
  always_comb unused = s_busy ^ s_done;
endmodule
