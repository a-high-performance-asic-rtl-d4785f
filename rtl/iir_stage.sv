// iir_stage: one second-order IIR section in transposed direct form II,
//   y  = b0*x + s1
//   s1 = b1*x - a1*y + s2
//   s2 = b2*x - a2*y
// computed over four steps with only two multipliers and two adders, the
// area/time balance the document chooses for its filter stages. One
// multiplier always takes the input x, the other always takes the output y.
//   step 0 (in_valid): latch x
//   step 1: y  = b0*x + s1          (multiplier 1, adder 1)
//   step 2: s1 = b1*x + s2 - a1*y   (both multipliers, both adders)
//   step 3: s2 = b2*x - a2*y        (both multipliers, adder 1); out_valid next cycle
// The states s1/s2 are kept at full product precision (COEF_FRAC extra
// fraction bits) and y is rounded and saturated to DATA_W bits; these
// formats are this design's choice. Coefficients come in as a port so the
// same stage serves the band-pass, band-stop and low-pass filters.
// Timing: out_valid pulses 4 cycles after in_valid; a new sample may be
// presented every 4 cycles (in_valid while busy is a protocol error,
// flagged by an assertion; its "disable iff" on rst_n is only a simulation
// check, so a lint note that rst_n is also used synchronously creates no
// logic).
module iir_stage
  import gyro_pkg::*;
#(
  parameter int W_DATA = DATA_W,
  parameter int W_COEF = COEF_W,
  parameter int FRAC   = COEF_FRAC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  biquad_t                  coef,
  input  logic                     in_valid,
  input  logic signed [W_DATA-1:0] in_data,
  output logic                     busy,
  output logic                     out_valid,
  output logic signed [W_DATA-1:0] out_data
);
  localparam int PROD_W = W_DATA + W_COEF;
  localparam int ACC_W  = PROD_W + 2;
  typedef logic signed [ACC_W-1:0] acc_t;

  logic [1:0] step;
  logic signed [W_DATA-1:0] x_r, y_r;
  acc_t s1, s2;
  logic signed [W_COEF-1:0] c_x, c_y;   // multiplier control: coefficient select
  acc_t m_x, m_y, add1, add2;
  acc_t y_full;

  always_comb begin
    unique case (step)
      2'd1:    begin c_x = coef.b0; c_y = '0;      end
      2'd2:    begin c_x = coef.b1; c_y = coef.a1; end
      2'd3:    begin c_x = coef.b2; c_y = coef.a2; end
      default: begin c_x = '0;      c_y = '0;      end
    endcase
    m_x  = acc_t'(c_x) * acc_t'(x_r);
    m_y  = acc_t'(c_y) * acc_t'(y_r);
    add1 = m_x + ((step == 2'd1) ? s1 : (step == 2'd2) ? s2 : -m_y);
    add2 = add1 - m_y;
    y_full = (add1 + (acc_t'(1) <<< (FRAC - 1))) >>> FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step      <= '0;
      busy      <= 1'b0;
      x_r       <= '0;
      y_r       <= '0;
      s1        <= '0;
      s2        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          x_r  <= in_data;
          busy <= 1'b1;
          step <= 2'd1;
        end
      end else begin
        unique case (step)
          2'd1: y_r <= sat24(64'(y_full));
          2'd2: s1  <= add2;
          2'd3: begin
            s2        <= add1;
            out_valid <= 1'b1;
            out_data  <= y_r;
            busy      <= 1'b0;
          end
          default: ;
        endcase
        step <= (step == 2'd3) ? 2'd0 : step + 2'd1;
      end
    end
  end

  // A sample must not arrive while the four steps are still running.
  assert property (@(posedge clk) disable iff (!rst_n) !(busy && in_valid))
    else $error("iir_stage: in_valid while busy");
endmodule
