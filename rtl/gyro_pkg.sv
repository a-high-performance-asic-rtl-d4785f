// gyro_pkg: types and constants shared by the gyroscope interface.
// Data words between the filter stages are 24-bit signed, IIR coefficients
// are Q2.22, the NCO phase is a 32-bit fraction of a turn and the sine
// table is 16-bit signed. The coefficient sets below are this design's
// choice for a 2 MHz modulator clock, a decimation of 32 (62.5 kHz) and an
// interpolation of 4 (250 kHz). They follow the usual bilinear
// biquad forms: for a centre/corner f0, quality Q and sample rate fs,
// w = 2*pi*f0/fs, al = sin(w)/(2Q), a0 = 1+al, every coefficient divided by
// a0 and scaled by 2^22:
//   band-pass: b = {al, 0, -al},               a = {-2cos(w), 1-al}
//   band-stop: b = {1, -2cos(w), 1},           a = {-2cos(w), 1-al}
//   low-pass:  b = {(1-c)/2, 1-c, (1-c)/2},    a = {-2cos(w), 1-al}
package gyro_pkg;

  localparam int DATA_W    = 24;  // filter-chain word
  localparam int COEF_W    = 24;  // IIR coefficient word
  localparam int COEF_FRAC = 22;  // Q2.22
  localparam int PHASE_W   = 32;  // NCO phase accumulator
  localparam int TRIG_W    = 16;  // sine/cosine word (Q1.15)
  localparam int FORCE_W   = 16;  // drive / self-test force word

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // One second-order section: y = b0 x + s1; s1 = b1 x - a1 y + s2; s2 = b2 x - a2 y
  typedef struct packed {
    coef_t b0;
    coef_t b1;
    coef_t b2;
    coef_t a1;
    coef_t a2;
  } biquad_t;

  // Wide band-pass around the drive resonance: f0 = 10 kHz, Q = 0.7, fs = 62.5 kHz
  localparam biquad_t BQ_BANDPASS  = '{b0: 24'sd1577919, b1: 24'sd0, b2: -24'sd1577919,
                                       a1: -24'sd2803858, a2: 24'sd1038466};
  // Band-stops at the sense resonance: 12.0 kHz and 12.6 kHz, Q = 4, fs = 62.5 kHz
  localparam biquad_t BQ_BANDSTOP1 = '{b0: 24'sd3755675, b1: -24'sd2677134, b2: 24'sd3755675,
                                       a1: -24'sd2677134, a2: 24'sd3317045};
  localparam biquad_t BQ_BANDSTOP2 = '{b0: 24'sd3747376, b1: -24'sd2244232, b2: 24'sd3747376,
                                       a1: -24'sd2244232, a2: 24'sd3300447};
  // Low-pass correction after the interpolator: fc = 25 kHz, Q = 0.7071, fs = 250 kHz
  localparam biquad_t BQ_LOWPASS   = '{b0: 24'sd282927, b1: 24'sd565854, b2: 24'sd282927,
                                       a1: -24'sd4793994, a2: 24'sd1731399};
  // Rate output low-pass after demodulation: fc = 1 kHz, Q = 0.7071, fs = 250 kHz
  localparam biquad_t BQ_RATE_LP   = '{b0: 24'sd651, b1: 24'sd1301, b2: 24'sd651,
                                       a1: -24'sd8239543, a2: 24'sd4047842};

  typedef enum logic {MODE_STARTUP = 1'b0, MODE_NORMAL = 1'b1} drive_mode_t;


  // Programmable settings of the digital core (register bank, reset values
  // in reg_bank). Widths of the SPI-visible fields are 16 bits; amplitudes
  // are the upper 16 bits of a 24-bit chain word.
  typedef struct packed {
    logic        st_en;        // self-test force on
    logic        cv_gain_sel;  // C/V gain switch (analog side)
    logic [2:0]  dec_log2;     // CIC decimation 2^dec_log2 (4..5)
    logic        restart;      // force the drive loop back to start-up
    logic [15:0] amp_target;   // drive amplitude set-point
    logic [15:0] pid_kp;       // PID gains, gain = value / 2^16
    logic [15:0] pid_ki;
    logic [15:0] pid_kd;
    logic [15:0] sweep_fmin;   // NCO frequency word [31:16]
    logic [15:0] sweep_fmax;
    logic [15:0] sweep_step;   // added to the frequency word [27:12] per window
    logic [15:0] phase_offset; // force phase relative to NCO, fraction of a turn
    logic [15:0] amp_on_th;    // oscillation detected above this amplitude
    logic [15:0] amp_off_th;   // oscillation lost below this amplitude
    logic [3:0]  pll_kp_sh;    // PLL proportional gain 2^kp_sh per phase LSB
    logic [3:0]  pll_ki_sh;    // PLL integral gain 2^ki_sh per phase LSB
    logic [15:0] pll_hyst;     // zero-crossing hysteresis
    logic [15:0] startup_amp;  // drive amplitude during start-up sweep
    logic [15:0] st_amp;       // self-test force amplitude
    logic [15:0] st_lo;        // self-test pass window on the rate output
    logic [15:0] st_hi;
    logic [15:0] zro_c0;       // ZRO(T) polynomial, value << 8
    logic [15:0] zro_c1;
    logic [15:0] zro_c2;
    logic [15:0] sf_c0;        // SF(T) polynomial, Q2.14 (1.0 = 0x4000)
    logic [15:0] sf_c1;
    logic [15:0] sf_c2;
  } core_cfg_t;

  typedef struct packed {
    drive_mode_t mode;
    logic        pll_lock;
    logic        st_pass;
    logic        st_done;
    logic [7:0]  parity_errors;
    sample_t     rate;         // compensated rate
    sample_t     quad;         // quadrature
    sample_t     amp;          // measured drive amplitude
    logic [31:0] fword;        // drive frequency word
    logic [15:0] drive_amp;    // PID output
  } core_status_t;

  // Saturate a wide signed value to DATA_W bits.
  function automatic sample_t sat24(input logic signed [63:0] v);
    if (v > 64'sd8388607)       return 24'sd8388607;
    else if (v < -64'sd8388608) return -24'sd8388608;
    else                        return sample_t'(v);
  endfunction

endpackage
