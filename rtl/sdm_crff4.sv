// sdm_crff4: BEHAVIOURAL MODEL of the switched-capacitor 4th-order low-pass
// CRFF sigma-delta modulator of one channel, with its 8-level flash
// quantizer and flash DAC (an analog circuit; fixed-point arithmetic stands
// in for the voltages, with states scaled by 2^16 of VREF). Each 2 MHz clock
// it computes, with the coefficients of the document's table (A1..A4 =
// 0.8 0.6 0.4 1.0, C1..C4 = 1.167 0.5 0.4 0.05, B1 = 1.167, B5 = 1.8,
// resonator feedback G1 = G2 = 0, so the resonators reduce to integrators):
//   y  = A1 x1 + A2 x2 + A3 x3 + A4 x4 + B5 u          (summing node)
//   seven comparators at (2k-6)/7 * VREF, k = 0..6  -> thermometer code
//   v  = (2*level - 7)/7 * VREF                          (flash DAC)
//   x1 += C1 (B1 u - v);  x2 += C2 x1;  x3 += C3 x2;  x4 += C4 x3
// Integrators 2..4 use the value their predecessor produced in the same
// clock, as the alternating clock phases of the document's integrators
// allow. The thermometer code goes to the 3-bit bus through therm2bin.
// VREF is this model's normalisation; the loop stays stable for inputs up to
// about 0.7 VREF.
// Interface: vin in microvolt; therm and code change on the rising clock.
module sdm_crff4 #(
  parameter int VREF_UV = 1_000_000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [31:0] vin_uv,
  output logic [6:0]         therm,
  output logic [2:0]         code
);
  typedef logic signed [63:0] fx_t;              // value * 2^16 / VREF
  localparam fx_t ONE = 64'sd65536;
  // coefficients in thousandths
  localparam fx_t A1 = 800, A2 = 600, A3 = 400, A4 = 1000;
  localparam fx_t C1 = 1167, C2 = 500, C3 = 400, C4 = 50;
  localparam fx_t B1 = 1167, B5 = 1800;

  fx_t x1, x2, x3, x4;
  fx_t u, y, v, n1, n2, n3, n4;
  logic [6:0] t;
  logic [3:0] lvl;

  always_comb begin
    u = (64'(vin_uv) * ONE) / 64'(VREF_UV);
    y = (A1 * x1 + A2 * x2 + A3 * x3 + A4 * x4 + B5 * u) / 1000;
    for (int k = 0; k < 7; k++) t[k] = (y * 7 > fx_t'(2 * k - 6) * ONE);
    lvl = '0;
    for (int k = 0; k < 7; k++) lvl = lvl + 4'(t[k]);
    v  = (fx_t'(2 * int'(lvl) - 7) * ONE) / 7;
    n1 = x1 + (C1 * ((B1 * u) / 1000 - v)) / 1000;
    n2 = x2 + (C2 * n1) / 1000;
    n3 = x3 + (C3 * n2) / 1000;
    n4 = x4 + (C4 * n3) / 1000;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; x3 <= '0; x4 <= '0;
      therm <= 7'b0000111;
    end else begin
      x1 <= n1; x2 <= n2; x3 <= n3; x4 <= n4;
      therm <= t;
    end
  end

  therm2bin #(.LINES(7)) u_enc (.therm, .bin(code));
endmodule
