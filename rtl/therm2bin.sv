// therm2bin: flash-quantizer output encoder. The seven comparator lines of
// the 8-level quantizer form a thermometer code; the encoder sends its level
// (0..7) on a 3-bit bus. Using the document's idea of narrowing the bus from
// 7 to 3 lines; counting the ones (rather than finding the top edge) is this
// design's choice, so a single bubble in the code costs at most one LSB.
// Purely combinational.
module therm2bin #(
  parameter int LINES = 7,
  parameter int BIN_W = $clog2(LINES + 1)
) (
  input  logic [LINES-1:0] therm,
  output logic [BIN_W-1:0] bin
);
  always_comb begin
    bin = '0;
    for (int i = 0; i < LINES; i++) bin = bin + BIN_W'(therm[i]);
  end
endmodule
