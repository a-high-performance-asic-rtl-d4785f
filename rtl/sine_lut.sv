// sine_lut: sine of a phase given as a fraction of a turn. The top two phase
// bits select the quadrant; a 2^(ADDR_W-2)-entry quarter-wave table, filled
// at elaboration with round((2^(OUT_W-1)-1) * sin(2*pi*(i+0.5)/2^ADDR_W)),
// gives the magnitude, mirrored and negated per quadrant. The half-step
// offset keeps the table symmetric so the mirrored quadrants need no extra
// entry. Purely combinational. Helper of the NCO and the force generators.
module sine_lut #(
  parameter int ADDR_W = 10,
  parameter int OUT_W  = 16
) (
  input  logic [ADDR_W-1:0]       phase,
  output logic signed [OUT_W-1:0] sin_out
);
  localparam int QN = 2 ** (ADDR_W - 2);
  typedef logic [OUT_W-2:0] mag_t;
  typedef mag_t table_t [QN];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < QN; i++)
      t[i] = mag_t'($rtoi(((2.0 ** (OUT_W - 1)) - 1.0) *
                          $sin(2.0 * 3.14159265358979 * (real'(i) + 0.5) / real'(4 * QN)) + 0.5));
    return t;
  endfunction

  localparam table_t QTAB = make_table();

  logic [ADDR_W-3:0] idx;
  mag_t mag;

  always_comb begin
    idx     = phase[ADDR_W-2] ? ~phase[ADDR_W-3:0] : phase[ADDR_W-3:0];
    mag     = QTAB[idx];
    sin_out = phase[ADDR_W-1] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  end
endmodule
