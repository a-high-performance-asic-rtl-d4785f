// gyro_asic_top: the complete gyroscope interface, analog ASIC and digital
// ASIC together, between a MEMS gyroscope element and a host.
//   analog side (behavioural models): per channel (drive pick-off and sense
//     pick-off) a C/V converter and a 4th-order CRFF sigma-delta modulator
//     whose 8-level flash quantizer sends a 3-bit code every 2 MHz clock;
//   digital side: gyro_digital_core (filter chains, drive PLL/PID loop with
//     start-up sweep, demodulation, temperature compensation, self-test,
//     SPI with even parity, NVRAM, registers).
// The MEMS element, the force DACs, the band-gap reference, the regulators
// and the temperature sensor are outside: the capacitance changes come in as
// ports (attofarad), the drive and self-test forces and the C/V gain select
// go out, the temperature arrives as a signed code (T/2^15 of full scale).
// Two identical channels for drive and sense are the document's
// architecture; the port units are this design's.
// Timing: single clock, the 2 MHz modulator clock; rate_valid strobes the
// compensated rate at clk/8 (decimation 32, interpolation 4).
module gyro_asic_top
  import gyro_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [31:0]        dc_drive_af,
  input  logic signed [31:0]        dc_sense_af,
  input  logic signed [15:0]        temp,
  input  logic                      sclk,
  input  logic                      cs_n,
  input  logic                      mosi,
  output logic                      miso,
  output logic signed [FORCE_W-1:0] drive_force,
  output logic signed [FORCE_W-1:0] st_force,
  output logic                      cv_gain_sel,
  output logic                      rate_valid,
  output sample_t                   rate_out,
  output core_status_t              status
);
  logic signed [31:0] v_drive, v_sense;
  logic [6:0] therm_drive, therm_sense;
  logic [2:0] code_drive, code_sense;

  cv_frontend u_cv_drive (.dc_af(dc_drive_af), .gain_sel(cv_gain_sel), .vo_uv(v_drive));
  cv_frontend u_cv_sense (.dc_af(dc_sense_af), .gain_sel(cv_gain_sel), .vo_uv(v_sense));

  sdm_crff4 u_sdm_drive (.clk, .rst_n, .vin_uv(v_drive), .therm(therm_drive), .code(code_drive));
  sdm_crff4 u_sdm_sense (.clk, .rst_n, .vin_uv(v_sense), .therm(therm_sense), .code(code_sense));

  gyro_digital_core u_core (
    .clk, .rst_n, .code_drive, .code_sense, .temp, .sclk, .cs_n, .mosi, .miso,
    .drive_force, .st_force, .cv_gain_sel, .rate_valid, .rate_out, .status);

  logic unused_therm;
  always_comb unused_therm = ^{therm_drive, therm_sense};
endmodule
