// gyro_digital_core: the digital ASIC of the gyroscope interface. It takes
// the 3-bit codes of the drive and sense modulators (one per 2 MHz clock) and
//   - filters each channel with its own filter_chain,
//   - closes the drive loop (drive_loop: PLL on frequency, PID on amplitude,
//     start-up sweep) and outputs the drive force word,
//   - demodulates the sense channel with the drive NCO (rate, quadrature),
//   - removes ZRO and corrects the scale factor over temperature
//     (temp_comp), giving the 24-bit rate output,
//   - generates the self-test force and checks its response (self_test),
//   - connects an SPI host to the 1k x 16 NVRAM and the registers.
// The functions are the ones the document lists for its digital ASIC; the
// partition, register map and number formats are this design's.
// Timing: one clock domain, the modulator clock; rate_valid pulses at
// clk/8 (for decimation 32).
module gyro_digital_core
  import gyro_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [2:0]                code_drive,
  input  logic [2:0]                code_sense,
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
  core_cfg_t cfg;

  logic drv_dec_v, sns_dec_v, drv_v, sns_v;
  sample_t drv_dec, sns_dec, drv_sig, sns_sig;
  logic [PHASE_W-1:0] nco_phase, fword;
  logic signed [TRIG_W-1:0] nco_sin, nco_cos, force_wave;
  drive_mode_t mode;
  logic pll_lock, pll_crossing, to_normal, amp_valid;
  sample_t amp, rate, quad;
  logic [15:0] drive_amp, sweep_count;
  logic demod_v;
  logic st_done, st_pass;
  logic [14:0] bus_addr;
  logic bus_re, bus_we;
  logic [15:0] bus_wdata, bus_rdata, nv_rdata, reg_rdata;
  logic [7:0] parity_errors;
  logic sel_reg_q;
  logic [15:0] zro_c [3], sf_c [3];

  filter_chain u_chain_drive (.clk, .rst_n, .code(code_drive), .dec_log2(cfg.dec_log2),
                              .dec_valid(drv_dec_v), .dec_data(drv_dec),
                              .out_valid(drv_v), .out_data(drv_sig));
  filter_chain u_chain_sense (.clk, .rst_n, .code(code_sense), .dec_log2(cfg.dec_log2),
                              .dec_valid(sns_dec_v), .dec_data(sns_dec),
                              .out_valid(sns_v), .out_data(sns_sig));

  drive_loop u_drive (.clk, .rst_n, .cfg, .sig_valid(drv_v), .sig(drv_sig), .drive_force,
                      .nco_phase, .nco_sin, .nco_cos, .force_wave, .mode, .pll_lock, .pll_crossing,
                      .to_normal, .amp, .amp_valid, .fword, .drive_amp, .sweep_count);

  demodulator u_demod (.clk, .rst_n, .sig_valid(sns_v), .sig(sns_sig), .ref_cos(nco_cos),
                       .ref_sin(nco_sin), .out_valid(demod_v), .rate, .quad);

  always_comb begin
    zro_c = '{cfg.zro_c0, cfg.zro_c1, cfg.zro_c2};
    sf_c  = '{cfg.sf_c0, cfg.sf_c1, cfg.sf_c2};
  end

  temp_comp u_comp (.clk, .rst_n, .rate_valid(demod_v), .rate, .temp, .zro_c, .sf_c,
                    .out_valid(rate_valid), .rate_c(rate_out));

  self_test #(.SETTLE(2048)) u_st (.clk, .rst_n, .st_en(cfg.st_en), .st_amp(cfg.st_amp),
                    .ref_wave(force_wave), .rate_valid, .rate(rate_out),
                    .st_lo({cfg.st_lo, 8'h0}), .st_hi({cfg.st_hi, 8'hFF}),
                    .st_force, .st_done, .st_pass);

  spi_slave u_spi (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .bus_addr, .bus_re, .bus_we,
                   .bus_wdata, .bus_rdata, .parity_errors);

  nvram #(.DEPTH(1024), .WIDTH(16)) u_nvram (
    .clk, .we(bus_we && bus_addr[14:10] == 5'd0), .re(bus_re && bus_addr[14:10] == 5'd0),
    .addr(bus_addr[9:0]), .wdata(bus_wdata), .rdata(nv_rdata));

  reg_bank u_regs (.clk, .rst_n, .we(bus_we && bus_addr[14:10] != 5'd0), .addr(bus_addr),
                   .wdata(bus_wdata), .rdata(reg_rdata), .status, .cfg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sel_reg_q <= 1'b0;
    else if (bus_re) sel_reg_q <= (bus_addr[14:10] != 5'd0);
  end

  // register reads are combinational; hold their value one cycle like the NVRAM's
  logic [15:0] reg_rdata_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      reg_rdata_q <= '0;
    else if (bus_re) reg_rdata_q <= reg_rdata;
  end

  always_comb begin
    bus_rdata   = sel_reg_q ? reg_rdata_q : nv_rdata;
    cv_gain_sel = cfg.cv_gain_sel;
    status = '{mode: mode, pll_lock: pll_lock, st_pass: st_pass, st_done: st_done,
               parity_errors: parity_errors, rate: rate_out, quad: quad, amp: amp,
               fword: fword, drive_amp: drive_amp};
  end
endmodule
