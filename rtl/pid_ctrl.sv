// pid_ctrl: PID amplitude controller of the drive loop. On every amplitude
// measurement in normal mode it computes e = target - amp and
//   acc  += ki * e                      (integrator, clamped)
//   u     = (kp * e + acc + kd * (e - e_prev)) / 2^16
// and clamps u to [0, OUT_MAX] as the drive amplitude. Gains are unsigned
// 16-bit values (gain = value / 2^16). While not enabled (start-up mode) the
// output is startup_amp and the integrator is preset to it so the hand-over
// to normal mode is bumpless. The PID structure is the document's; the
// number formats, clamping and the bumpless preset are this design's.
// Timing: drive_amp updates the cycle after amp_valid.
module pid_ctrl
  import gyro_pkg::*;
#(
  parameter int OUT_MAX = 32767
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        amp_valid,
  input  sample_t     amp,
  input  sample_t     target,
  input  logic [15:0] kp,
  input  logic [15:0] ki,
  input  logic [15:0] kd,
  input  logic [15:0] startup_amp,
  output logic [15:0] drive_amp
);
  typedef logic signed [55:0] wide_t;
  localparam wide_t ACC_MAX = wide_t'(OUT_MAX) <<< 16;

  wide_t e, e_prev, acc, acc_next, u;

  always_comb begin
    e        = wide_t'(target) - wide_t'(amp);
    acc_next = acc + wide_t'($signed({1'b0, ki})) * e;
    if (acc_next > ACC_MAX) acc_next = ACC_MAX;
    if (acc_next < 0)       acc_next = '0;
    u = (wide_t'($signed({1'b0, kp})) * e + acc_next +
         wide_t'($signed({1'b0, kd})) * (e - e_prev)) >>> 16;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; e_prev <= '0; drive_amp <= '0;
    end else if (!enable) begin
      acc       <= wide_t'(startup_amp) <<< 16;
      e_prev    <= '0;
      drive_amp <= startup_amp;
    end else if (amp_valid) begin
      acc    <= acc_next;
      e_prev <= e;
      if (u < 0)                     drive_amp <= '0;
      else if (u > wide_t'(OUT_MAX)) drive_amp <= 16'(OUT_MAX);
      else                           drive_amp <= u[15:0];
    end
  end
endmodule
