// nco: numerically controlled oscillator of the drive loop. A PHASE_W-bit
// accumulator advances by fword every clock (f = fword * f_clk / 2^PHASE_W);
// the top LUT_ADDR_W bits of the phase address two sine tables giving sin and
// cos (cos = sin of phase + quarter turn). The NCO is the oscillator of the
// drive PLL; the document only says the drive frequency is tracked by a PLL,
// so the digital NCO form, widths and table size are this design's choices.
// Timing: phase, sin_out and cos_out are registered and change every cycle.
module nco
  import gyro_pkg::*;
#(
  parameter int LUT_ADDR_W = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [PHASE_W-1:0]        fword,
  output logic [PHASE_W-1:0]        phase,
  output logic signed [TRIG_W-1:0]  sin_out,
  output logic signed [TRIG_W-1:0]  cos_out
);
  logic [PHASE_W-1:0] phase_next;
  logic [LUT_ADDR_W-1:0] a_sin, a_cos;
  logic signed [TRIG_W-1:0] s_next, c_next;

  always_comb begin
    phase_next = phase + fword;
    a_sin = phase_next[PHASE_W-1 -: LUT_ADDR_W];
    a_cos = a_sin + LUT_ADDR_W'(2 ** (LUT_ADDR_W - 2));
  end

  sine_lut #(.ADDR_W(LUT_ADDR_W), .OUT_W(TRIG_W)) u_sin (.phase(a_sin), .sin_out(s_next));
  sine_lut #(.ADDR_W(LUT_ADDR_W), .OUT_W(TRIG_W)) u_cos (.phase(a_cos), .sin_out(c_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= '0;
      sin_out <= '0;
      cos_out <= TRIG_W'(2 ** (TRIG_W - 1) - 1);
    end else begin
      phase   <= phase_next;
      sin_out <= s_next;
      cos_out <= c_next;
    end
  end
endmodule
