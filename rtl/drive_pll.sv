// drive_pll: phase detector and loop filter of the drive PLL. The NCO is the
// PLL oscillator; this block turns the filtered drive signal into its
// frequency word.
// Phase detector: at each rising zero crossing of the drive signal the NCO
// phase is read; when locked the NCO sine is in phase with the signal, so the
// NCO phase there is zero and its signed value is the phase error. The
// crossing lies between two samples; the NCO phase is interpolated back to
// it linearly, e = ph_cur - (ph_cur - ph_prev) * s_cur / (s_cur - s_prev),
// which removes the jitter of the sample grid (about 1/25 turn at 10 kHz). To keep
// noise on a small signal from producing false crossings (the problem the
// document cites for a plain PFD at start-up) a crossing only counts after
// the signal has first gone below -hyst. This qualification is this
// design's form of the document's "modified PFD".
// Loop filter: proportional-integral, updated once per detected crossing:
//   integ -= e << ki_sh ;  fword = integ - (e << kp_sh)
// fword is clamped to [fmin, fmax]. load copies fword_init into the
// integrator (used when the start-up sweep hands over).
// Lock: |e| below LOCK_TH for 16 consecutive crossings sets lock; an error
// above 4*LOCK_TH clears it.
module drive_pll
  import gyro_pkg::*;
#(
  parameter int LOCK_TH = 1024   // phase LSB = 2^-16 turn, about 5.6 degrees
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               load,
  input  logic [PHASE_W-1:0] fword_init,
  input  logic [PHASE_W-1:0] fmin,
  input  logic [PHASE_W-1:0] fmax,
  input  logic [3:0]         kp_sh,
  input  logic [3:0]         ki_sh,
  input  sample_t            hyst,
  input  logic               sig_valid,
  input  sample_t            sig,
  input  logic [PHASE_W-1:0] phase,   // NCO phase at the time of sig
  output logic [PHASE_W-1:0] fword,
  output logic               crossing, // a qualified zero crossing was seen
  output logic signed [15:0] phase_err,
  output logic               lock
);
  logic armed;
  logic [3:0] good_cnt;
  logic signed [47:0] integ, integ_next, f_calc, lo, hi;
  logic signed [15:0] e;
  logic [15:0] e_abs;
  logic [15:0] ph_prev, dph;
  sample_t s_prev;
  logic [24:0] den;
  logic [40:0] corr;

  always_comb begin
    dph    = phase[PHASE_W-1 -: 16] - ph_prev;
    den    = 25'(sig) - 25'(s_prev);           // > 0 at a rising crossing
    corr   = (den == '0) ? '0 : (41'(dph) * 41'(sig)) / 41'(den);
    e      = $signed(phase[PHASE_W-1 -: 16] - corr[15:0]);
    e_abs  = (e < 0) ? 16'(-e) : 16'(e);
    lo     = 48'(fmin);
    hi     = 48'(fmax);
    integ_next = integ - (48'(e) <<< ki_sh);
    if (integ_next < lo) integ_next = lo;
    if (integ_next > hi) integ_next = hi;
    f_calc = integ_next - (48'(e) <<< kp_sh);
    if (f_calc < lo) f_calc = lo;
    if (f_calc > hi) f_calc = hi;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0; integ <= '0; fword <= '0; crossing <= 1'b0;
      phase_err <= '0; lock <= 1'b0; good_cnt <= '0; ph_prev <= '0; s_prev <= '0;
    end else begin
      crossing <= 1'b0;
      if (sig_valid) begin
        ph_prev <= phase[PHASE_W-1 -: 16];
        s_prev  <= sig;
      end
      if (load || !enable) begin
        integ    <= 48'(fword_init);
        fword    <= fword_init;
        armed    <= 1'b0;
        lock     <= 1'b0;
        good_cnt <= '0;
      end else if (sig_valid) begin
        if (sig < -hyst) armed <= 1'b1;
        else if (armed && sig >= 0) begin
          armed     <= 1'b0;
          crossing  <= 1'b1;
          phase_err <= e;
          integ     <= integ_next;
          fword     <= f_calc[PHASE_W-1:0];
          if (e_abs < 16'(LOCK_TH)) begin
            if (good_cnt == 4'd15) lock <= 1'b1;
            else good_cnt <= good_cnt + 1'b1;
          end else begin
            good_cnt <= '0;
            if (e_abs > 16'(4 * LOCK_TH)) lock <= 1'b0;
          end
        end
      end
    end
  end
endmodule
