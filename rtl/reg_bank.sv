// reg_bank: configuration and status registers of the digital core, reached
// over SPI at word addresses 0x400 and up (0x000-0x3FF is the NVRAM).
//   0x400 CTRL  [0] self-test enable [1] C/V gain select [4:2] log2 decimation
//               [5] restart drive start-up
//   0x401 amplitude target     0x402-0x404 PID kp, ki, kd
//   0x405 sweep fmin           0x406 sweep fmax     0x407 sweep step
//   0x408 force phase offset   0x409 amp on-threshold 0x40A amp off-threshold
//   0x40B PLL gains [3:0] kp shift [7:4] ki shift   0x40C PLL hysteresis
//   0x40D start-up amplitude   0x40E self-test amplitude
//   0x40F/0x410 self-test window low/high
//   0x411-0x413 ZRO c0..c2     0x414-0x416 SF c0..c2
//   read only: 0x420 status [0] mode [1] PLL lock [2] self-test pass
//              [3] self-test done [15:8] SPI parity errors
//   0x421 rate[23:8] 0x422 rate[7:0] 0x423 quadrature[23:8]
//   0x424 amplitude[23:8] 0x425 frequency word[31:16] 0x426 drive amplitude
// Reset values give a working drive loop for a resonator between the sweep
// limits (8 to 12 kHz at a 2 MHz clock). The map and reset values are this
// design's choices. Writes take effect the next cycle; reads are
// combinational (the SPI slave registers them).
module reg_bank
  import gyro_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [14:0]  addr,
  input  logic [15:0]  wdata,
  output logic [15:0]  rdata,
  input  core_status_t status,
  output core_cfg_t    cfg
);
  localparam core_cfg_t CFG_RESET = '{
    st_en: 1'b0, cv_gain_sel: 1'b0, dec_log2: 3'd5, restart: 1'b0,
    amp_target: 16'd8192, pid_kp: 16'd128, pid_ki: 16'd32, pid_kd: 16'd0,
    sweep_fmin: 16'd262, sweep_fmax: 16'd393, sweep_step: 16'd13,
    phase_offset: 16'h3C00, amp_on_th: 16'd4096, amp_off_th: 16'd1024,
    pll_kp_sh: 4'd6, pll_ki_sh: 4'd2, pll_hyst: 16'd256,
    startup_amp: 16'd16384, st_amp: 16'd0, st_lo: 16'h8000, st_hi: 16'h7FFF,
    zro_c0: 16'd0, zro_c1: 16'd0, zro_c2: 16'd0,
    sf_c0: 16'h4000, sf_c1: 16'd0, sf_c2: 16'd0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg <= CFG_RESET;
    else if (we) begin
      unique case (addr)
        15'h400: begin
          cfg.st_en       <= wdata[0];
          cfg.cv_gain_sel <= wdata[1];
          cfg.dec_log2    <= wdata[4:2];
          cfg.restart     <= wdata[5];
        end
        15'h401: cfg.amp_target   <= wdata;
        15'h402: cfg.pid_kp       <= wdata;
        15'h403: cfg.pid_ki       <= wdata;
        15'h404: cfg.pid_kd       <= wdata;
        15'h405: cfg.sweep_fmin   <= wdata;
        15'h406: cfg.sweep_fmax   <= wdata;
        15'h407: cfg.sweep_step   <= wdata;
        15'h408: cfg.phase_offset <= wdata;
        15'h409: cfg.amp_on_th    <= wdata;
        15'h40A: cfg.amp_off_th   <= wdata;
        15'h40B: begin cfg.pll_kp_sh <= wdata[3:0]; cfg.pll_ki_sh <= wdata[7:4]; end
        15'h40C: cfg.pll_hyst     <= wdata;
        15'h40D: cfg.startup_amp  <= wdata;
        15'h40E: cfg.st_amp       <= wdata;
        15'h40F: cfg.st_lo        <= wdata;
        15'h410: cfg.st_hi        <= wdata;
        15'h411: cfg.zro_c0       <= wdata;
        15'h412: cfg.zro_c1       <= wdata;
        15'h413: cfg.zro_c2       <= wdata;
        15'h414: cfg.sf_c0        <= wdata;
        15'h415: cfg.sf_c1        <= wdata;
        15'h416: cfg.sf_c2        <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (addr)
      15'h400: rdata = {10'h0, cfg.restart, cfg.dec_log2, cfg.cv_gain_sel, cfg.st_en};
      15'h401: rdata = cfg.amp_target;
      15'h402: rdata = cfg.pid_kp;
      15'h403: rdata = cfg.pid_ki;
      15'h404: rdata = cfg.pid_kd;
      15'h405: rdata = cfg.sweep_fmin;
      15'h406: rdata = cfg.sweep_fmax;
      15'h407: rdata = cfg.sweep_step;
      15'h408: rdata = cfg.phase_offset;
      15'h409: rdata = cfg.amp_on_th;
      15'h40A: rdata = cfg.amp_off_th;
      15'h40B: rdata = {8'h0, cfg.pll_ki_sh, cfg.pll_kp_sh};
      15'h40C: rdata = cfg.pll_hyst;
      15'h40D: rdata = cfg.startup_amp;
      15'h40E: rdata = cfg.st_amp;
      15'h40F: rdata = cfg.st_lo;
      15'h410: rdata = cfg.st_hi;
      15'h411: rdata = cfg.zro_c0;
      15'h412: rdata = cfg.zro_c1;
      15'h413: rdata = cfg.zro_c2;
      15'h414: rdata = cfg.sf_c0;
      15'h415: rdata = cfg.sf_c1;
      15'h416: rdata = cfg.sf_c2;
      15'h420: rdata = {status.parity_errors, 4'h0, status.st_done, status.st_pass,
                        status.pll_lock, status.mode};
      15'h421: rdata = status.rate[23:8];
      15'h422: rdata = {8'h0, status.rate[7:0]};
      15'h423: rdata = status.quad[23:8];
      15'h424: rdata = status.amp[23:8];
      15'h425: rdata = status.fword[31:16];
      15'h426: rdata = status.drive_amp;
      default: rdata = 16'h0;
    endcase
  end
endmodule
