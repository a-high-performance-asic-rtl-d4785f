// cic_decimator: programmable CIC decimator, the first stage of the filter
// chain. ORDER integrators run at the input (modulator) rate, a counter keeps
// every 2^dec_log2-th integrator output and ORDER combs with a differential
// delay of one run at the output rate. Register width is
// IN_W + ORDER*DEC_LOG2_MAX, so with the defaults (4-bit levels, order 4,
// ratio up to 32) the output is exactly the 24-bit word the chain carries;
// two's-complement wrap-around in the integrators is harmless. At smaller
// ratios the result is shifted left so that full scale stays the same.
// The integrator/comb structure follows the document; order, ratio range and
// the gain normalisation are this design's choices.
// Timing: in_valid may be high every cycle; out_valid pulses one cycle after
// the in_valid that completes a block of 2^dec_log2 inputs.
module cic_decimator #(
  parameter int ORDER        = 4,
  parameter int IN_W         = 4,
  parameter int DEC_LOG2_MAX = 5,
  parameter int OUT_W        = IN_W + ORDER * DEC_LOG2_MAX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [2:0]              dec_log2,   // ratio = 2^dec_log2, 1..DEC_LOG2_MAX
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  typedef logic signed [OUT_W-1:0] acc_t;

  acc_t integ [ORDER];
  acc_t comb_dly [ORDER];
  logic [DEC_LOG2_MAX-1:0] cnt;
  logic [DEC_LOG2_MAX-1:0] cnt_last;

  always_comb begin
    cnt_last = DEC_LOG2_MAX'((32'd1 << dec_log2) - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) begin
        integ[k]    <= '0;
        comb_dly[k] <= '0;
      end
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        integ[0] <= integ[0] + acc_t'(in_data);
        for (int k = 1; k < ORDER; k++) integ[k] <= integ[k] + integ[k-1];
        if (cnt >= cnt_last) begin
          acc_t v;
          cnt <= '0;
          v = integ[ORDER-1];
          for (int k = 0; k < ORDER; k++) begin
            comb_dly[k] <= v;
            v = v - comb_dly[k];
          end
          out_data  <= v <<< (ORDER * (DEC_LOG2_MAX - int'(dec_log2)));
          out_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
