// nvram: 1k x 16-bit calibration memory. The storage is an array with one
// synchronous port: a write stores wdata at addr; a read returns the word at
// addr on rdata the next cycle. The non-volatile cell and its programming
// sequence are process specific and not described, so this array stands in
// for them and keeps its contents only while powered; size and word width
// follow the document.
module nvram #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
