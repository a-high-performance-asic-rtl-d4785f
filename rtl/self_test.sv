// self_test: self-test stimulus and check for fail-safe operation. When
// enabled, it produces a force word for the sense electrodes,
//   st_force = st_amp * ref_wave,
// where ref_wave is the unit drive-force waveform. In normal mode the drive
// force is in phase with the proof-mass velocity, as the Coriolis force is,
// so the sense channel reads the stimulus as a known angular rate. After SETTLE rate
// samples with the stimulus on it compares the rate output with the window
// [st_lo, st_hi]: st_done goes high and st_pass tells whether the rate was
// inside. Disabling the test clears both. The document says only that the
// digital core generates a self-test signal for fail-safe operation; the
// stimulus shape and the window check are this design's.
// Timing: st_force is registered; the check uses rate_valid strobes.
module self_test
  import gyro_pkg::*;
#(
  parameter int SETTLE = 2048
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      st_en,
  input  logic [15:0]               st_amp,
  input  logic signed [TRIG_W-1:0]  ref_wave,
  input  logic                      rate_valid,
  input  sample_t                   rate,
  input  sample_t                   st_lo,
  input  sample_t                   st_hi,
  output logic signed [FORCE_W-1:0] st_force,
  output logic                      st_done,
  output logic                      st_pass
);
  logic [$clog2(SETTLE+1)-1:0] cnt;
  logic signed [31:0] prod;

  always_comb prod = 32'(ref_wave) * 32'($signed({1'b0, st_amp}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_force <= '0; cnt <= '0; st_done <= 1'b0; st_pass <= 1'b0;
    end else if (!st_en) begin
      st_force <= '0; cnt <= '0; st_done <= 1'b0; st_pass <= 1'b0;
    end else begin
      st_force <= FORCE_W'(prod >>> 15);
      if (rate_valid) begin
        if (int'(cnt) < SETTLE) cnt <= cnt + 1'b1;
        else begin
          st_done <= 1'b1;
          st_pass <= (rate >= st_lo) && (rate <= st_hi);
        end
      end
    end
  end
endmodule
