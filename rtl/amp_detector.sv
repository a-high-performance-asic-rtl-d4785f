// amp_detector: drive-oscillation amplitude measurement for the amplitude
// control loop. It keeps the largest |sig| over WIN consecutive samples and
// publishes it at the end of each window. The document names the amplitude
// loop but not the detector; a windowed peak detector is this design's
// choice because it needs no phase information (it also works during the
// start-up sweep, before the PLL has locked).
// Timing: amp_valid pulses for one cycle after every WIN-th sig_valid.
module amp_detector
  import gyro_pkg::*;
#(
  parameter int WIN = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sig_valid,
  input  sample_t sig,
  output logic    amp_valid,
  output sample_t amp
);
  logic [$clog2(WIN)-1:0] cnt;
  sample_t peak, mag;

  always_comb mag = (sig < 0) ? ((sig == -24'sd8388608) ? 24'sd8388607 : -sig) : sig;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; peak <= '0; amp <= '0; amp_valid <= 1'b0;
    end else begin
      amp_valid <= 1'b0;
      if (sig_valid) begin
        if (cnt == $clog2(WIN)'(WIN - 1)) begin
          amp       <= (mag > peak) ? mag : peak;
          amp_valid <= 1'b1;
          peak      <= '0;
          cnt       <= '0;
        end else begin
          if (mag > peak) peak <= mag;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
