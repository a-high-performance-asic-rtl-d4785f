// drive_mode_ctrl: start-up / normal mode control of the drive loop.
// Start-up mode: the force is applied at a fixed large amplitude while the
// NCO frequency sweeps from fmin to fmax in steps of fstep per amplitude
// window, starting over at fmin, until the measured amplitude exceeds
// on_th: the oscillation (and so the phase signal) is then available and the
// block switches to normal mode, where the PLL and the PID amplitude loop
// take over starting from the current sweep frequency. If the amplitude
// stays below off_th for OFF_WINDOWS windows, or restart is set, it returns
// to start-up. The two modes and the repeated sweeps are the document's;
// thresholds, window counting and the fall-back are this design's choices.
// Timing: decisions are taken on amp_valid; to_normal pulses for one cycle
// on the switch.
module drive_mode_ctrl
  import gyro_pkg::*;
#(
  parameter int OFF_WINDOWS = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               restart,
  input  logic               amp_valid,
  input  sample_t            amp,
  input  sample_t            on_th,
  input  sample_t            off_th,
  input  logic [PHASE_W-1:0] fmin,
  input  logic [PHASE_W-1:0] fmax,
  input  logic [PHASE_W-1:0] fstep,
  output drive_mode_t        mode,
  output logic [PHASE_W-1:0] sweep_fword,
  output logic               to_normal,
  output logic [15:0]        sweep_count   // completed sweeps (wrap-arounds)
);
  logic [$clog2(OFF_WINDOWS+1)-1:0] low_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= MODE_STARTUP; sweep_fword <= '0; to_normal <= 1'b0;
      low_cnt <= '0; sweep_count <= '0;
    end else begin
      to_normal <= 1'b0;
      if (restart) begin
        mode        <= MODE_STARTUP;
        sweep_fword <= fmin;
        low_cnt     <= '0;
      end else if (amp_valid) begin
        unique case (mode)
          MODE_STARTUP: begin
            if (sweep_fword < fmin || sweep_fword > fmax) begin
              sweep_fword <= fmin;            // first window after reset
            end else if (amp > on_th) begin
              mode      <= MODE_NORMAL;
              to_normal <= 1'b1;
              low_cnt   <= '0;
            end else if (sweep_fword + fstep > fmax) begin
              sweep_fword <= fmin;
              sweep_count <= sweep_count + 1'b1;
            end else begin
              sweep_fword <= sweep_fword + fstep;
            end
          end
          MODE_NORMAL: begin
            if (amp < off_th) begin
              if (int'(low_cnt) == OFF_WINDOWS - 1) begin
                mode        <= MODE_STARTUP;
                sweep_fword <= fmin;
                low_cnt     <= '0;
              end else low_cnt <= low_cnt + 1'b1;
            end else low_cnt <= '0;
          end
          default: mode <= MODE_STARTUP;
        endcase
      end
    end
  end
endmodule
