// cic_interpolator: CIC interpolator of the filter chain. ORDER combs
// (differential delay one) run at the low input rate; each result is held
// until the next high-rate strobe, where it enters the integrator cascade as
// one non-zero sample followed by zeros (zero stuffing); ORDER integrators
// run on every hi_stb. The DC gain of L^(ORDER-1) is removed by an
// arithmetic shift so the output keeps the input scale, then saturated.
// Register growth wraps harmlessly in two's complement. The comb/integrator
// structure follows the document; order, ratio and the gain shift are this
// design's choices.
// Timing: hi_stb must pulse L = 2^L_LOG2 times per in_valid period. An input
// is consumed at the first hi_stb after its in_valid (not in the same
// cycle); out_valid pulses the cycle after every hi_stb.
module cic_interpolator #(
  parameter int ORDER  = 3,
  parameter int L_LOG2 = 2,
  parameter int W      = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  input  logic                hi_stb,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);
  localparam int ACC_W = W + ORDER * L_LOG2 + ORDER;
  localparam int SHIFT = (ORDER - 1) * L_LOG2;
  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t comb_dly [ORDER];
  acc_t integ [ORDER];
  acc_t held;
  logic pending;
  acc_t out_full;

  always_comb out_full = integ[ORDER-1] >>> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) begin
        comb_dly[k] <= '0;
        integ[k]    <= '0;
      end
      held      <= '0;
      pending   <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (hi_stb) begin
        integ[0] <= integ[0] + (pending ? held : acc_t'(0));
        for (int k = 1; k < ORDER; k++) integ[k] <= integ[k] + integ[k-1];
        pending <= 1'b0;
        out_valid <= 1'b1;
        if (out_full > acc_t'(2**(W-1) - 1))   out_data <= {1'b0, {(W-1){1'b1}}};
        else if (out_full < -acc_t'(2**(W-1))) out_data <= {1'b1, {(W-1){1'b0}}};
        else                                   out_data <= out_full[W-1:0];
      end
      if (in_valid) begin
        acc_t v;
        v = acc_t'(in_data);
        for (int k = 0; k < ORDER; k++) begin
          comb_dly[k] <= v;
          v = v - comb_dly[k];
        end
        held    <= v;
        pending <= 1'b1;
      end
    end
  end
endmodule
