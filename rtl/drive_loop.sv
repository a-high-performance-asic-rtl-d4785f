// drive_loop: closed drive loop of the gyroscope (frequency by PLL, amplitude
// by PID). Its input is the filtered drive-channel signal; its output is the
// force word for the drive electrodes:
//   drive_force = drive_amp * sin(NCO phase + phase_offset)
// The phase offset supplies the phase shift the oscillation condition needs
// (the resonator's 90 degrees plus the delay of the drive channel). In
// start-up mode the NCO follows the frequency sweep and the amplitude is the
// fixed start-up value; in normal mode the PLL steers the NCO and the PID
// holds the amplitude measured by the peak detector at amp_target.
// The NCO sine/cosine taken at each signal sample also serve as the
// demodulation reference of the sense channel, which has the same delay.
// Block split and number formats are this design's; the two modes, PLL and
// PID are the document's.
// Timing: everything runs on the modulator clock; drive_force is
// registered and updates every cycle.
module drive_loop
  import gyro_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  core_cfg_t                cfg,
  input  logic                     sig_valid,
  input  sample_t                  sig,
  output logic signed [FORCE_W-1:0] drive_force,
  output logic [PHASE_W-1:0]       nco_phase,
  output logic signed [TRIG_W-1:0] nco_sin,
  output logic signed [TRIG_W-1:0] nco_cos,
  output logic signed [TRIG_W-1:0] force_wave,  // sin(NCO phase + offset)
  output drive_mode_t              mode,
  output logic                     pll_lock,
  output logic                     pll_crossing,
  output logic                     to_normal,
  output sample_t                  amp,
  output logic                     amp_valid,
  output logic [PHASE_W-1:0]       fword,
  output logic [15:0]              drive_amp,
  output logic [15:0]              sweep_count
);
  logic [PHASE_W-1:0] sweep_fword, pll_fword, fmin, fmax, fstep;
  logic signed [15:0] phase_err;
  logic signed [TRIG_W-1:0] force_sin;
  logic [9:0] force_phase;
  logic signed [31:0] force_prod;

  always_comb begin
    fmin  = {cfg.sweep_fmin, 16'h0};
    fmax  = {cfg.sweep_fmax, 16'h0};
    fstep = {4'h0, cfg.sweep_step, 12'h0};
    fword = (mode == MODE_NORMAL) ? pll_fword : sweep_fword;
    force_phase = nco_phase[PHASE_W-1 -: 10] + cfg.phase_offset[15:6];
    force_prod  = 32'(force_sin) * 32'($signed({1'b0, drive_amp}));
  end

  nco u_nco (.clk, .rst_n, .fword, .phase(nco_phase), .sin_out(nco_sin), .cos_out(nco_cos));

  drive_pll u_pll (
    .clk, .rst_n, .enable(mode == MODE_NORMAL), .load(to_normal), .fword_init(sweep_fword),
    .fmin, .fmax, .kp_sh(cfg.pll_kp_sh), .ki_sh(cfg.pll_ki_sh),
    .hyst({cfg.pll_hyst, 8'h0}), .sig_valid, .sig, .phase(nco_phase),
    .fword(pll_fword), .crossing(pll_crossing), .phase_err, .lock(pll_lock));

  amp_detector #(.WIN(64)) u_amp (.clk, .rst_n, .sig_valid, .sig, .amp_valid, .amp);

  drive_mode_ctrl u_mode (
    .clk, .rst_n, .restart(cfg.restart), .amp_valid, .amp,
    .on_th({cfg.amp_on_th, 8'h0}), .off_th({cfg.amp_off_th, 8'h0}),
    .fmin, .fmax, .fstep, .mode, .sweep_fword, .to_normal, .sweep_count);

  pid_ctrl u_pid (
    .clk, .rst_n, .enable(mode == MODE_NORMAL), .amp_valid, .amp,
    .target({cfg.amp_target, 8'h0}), .kp(cfg.pid_kp), .ki(cfg.pid_ki), .kd(cfg.pid_kd),
    .startup_amp(cfg.startup_amp), .drive_amp);

  sine_lut #(.ADDR_W(10), .OUT_W(TRIG_W)) u_force_lut (.phase(force_phase), .sin_out(force_sin));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drive_force <= '0;
      force_wave  <= '0;
    end else begin
      drive_force <= FORCE_W'(force_prod >>> 15);
      force_wave  <= force_sin;
    end
  end

endmodule
