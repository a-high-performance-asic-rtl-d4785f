// poly_unit: polynomial calculation unit. Evaluates
//   y = c[0] + c[1]*x + ... + c[DEG]*x^DEG
// by Horner's rule with a single multiplier, one coefficient per cycle:
//   acc = c[DEG];  acc = acc*x/2^XF + c[k]  for k = DEG-1 .. 0
// x is a signed fraction (x/2^XF), coefficients and y are signed Y_W-bit
// words in the same scale as y; y saturates. The document names the unit;
// its use for the temperature polynomials, the Horner form and the formats
// are this design's.
// Timing: start loads x and the coefficients; done pulses DEG+2 cycles later
// with y valid (and held until the next start).
module poly_unit
  import gyro_pkg::*;
#(
  parameter int DEG = 2,
  parameter int X_W = 16,
  parameter int XF  = 15,
  parameter int Y_W = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [X_W-1:0] x,
  input  logic signed [Y_W-1:0] c [DEG+1],
  output logic                  busy,
  output logic                  done,
  output logic signed [Y_W-1:0] y
);
  localparam int W = Y_W + X_W + 2;
  typedef logic signed [W-1:0] acc_t;

  logic signed [X_W-1:0] x_r;
  logic signed [Y_W-1:0] c_r [DEG+1];
  acc_t acc, prod;
  logic [$clog2(DEG+1)-1:0] k;
  logic signed [Y_W-1:0] acc_sat;

  always_comb begin
    prod = (acc * acc_t'(x_r)) >>> XF;
    if (acc > acc_t'(2 ** (Y_W - 1) - 1))   acc_sat = {1'b0, {(Y_W-1){1'b1}}};
    else if (acc < -acc_t'(2 ** (Y_W - 1))) acc_sat = {1'b1, {(Y_W-1){1'b0}}};
    else                                    acc_sat = acc[Y_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_r <= '0; acc <= '0; k <= '0; busy <= 1'b0; done <= 1'b0; y <= '0;
      for (int i = 0; i <= DEG; i++) c_r[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        x_r  <= x;
        for (int i = 0; i <= DEG; i++) c_r[i] <= c[i];
        acc  <= acc_t'(c[DEG]);
        k    <= $clog2(DEG+1)'(DEG);
        busy <= 1'b1;
      end else if (busy) begin
        if (k == 0) begin
          y    <= acc_sat;
          done <= 1'b1;
          busy <= 1'b0;
        end else begin
          acc <= prod + acc_t'(c_r[k-1]);
          k   <= k - 1'b1;
        end
      end
    end
  end
endmodule
