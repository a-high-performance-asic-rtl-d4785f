// spi_slave: serial host interface with even parity. SPI mode 0 (MOSI
// sampled on rising SCLK, MISO changed on falling SCLK), MSB first, frames of
// 33 bits framed by cs_n low:
//   bit 0      1 = write, 0 = read
//   bits 1-15  15-bit word address (0x000-0x3FF NVRAM, 0x400-  registers)
//   bits 16-31 16-bit data (write data from the host; read data on MISO)
//   bit 32     parity bit chosen by the sender so the frame holds an even
//              number of ones (on MISO: even parity over the read data)
// A write is carried out at cs_n rising only if exactly 33 bits arrived and
// the parity is even; otherwise it is dropped and parity_errors counts up.
// Reads are issued as soon as the address is complete and the data is
// latched two cycles later, before MISO needs it. SCLK, cs_n and MOSI are
// synchronised into the core clock, so SCLK must be at most clk/8. The
// document only gives "standard SPI with even parity check"; the frame
// layout and timing are this design's.
module spi_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  output logic [14:0] bus_addr,
  output logic        bus_re,
  output logic        bus_we,
  output logic [15:0] bus_wdata,
  input  logic [15:0] bus_rdata,
  output logic [7:0]  parity_errors
);
  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  logic rise, fall, cs_rise, active;
  logic [5:0]  nbits;
  logic [32:0] shreg;
  logic        par;
  logic [16:0] tx;        // read data + parity, MSB first
  logic [1:0]  rd_pipe;

  always_comb begin
    rise    = sclk_s[1] & ~sclk_s[2];
    fall    = ~sclk_s[1] & sclk_s[2];
    cs_rise = cs_s[1] & ~cs_s[2];
    active  = ~cs_s[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0; cs_s <= '1; mosi_s <= '0;
      nbits <= '0; shreg <= '0; par <= 1'b0; tx <= '0; miso <= 1'b0;
      bus_addr <= '0; bus_re <= 1'b0; bus_we <= 1'b0; bus_wdata <= '0;
      parity_errors <= '0; rd_pipe <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
      bus_re <= 1'b0;
      bus_we <= 1'b0;
      rd_pipe <= {rd_pipe[0], bus_re};
      if (rd_pipe[1]) tx <= {bus_rdata, ^bus_rdata};
      if (!active) begin
        nbits <= '0;
        par   <= 1'b0;
        if (cs_rise) begin
          if (nbits == 6'd33 && !par) begin
            if (shreg[32]) begin
              bus_we    <= 1'b1;
              bus_addr  <= shreg[31:17];
              bus_wdata <= shreg[16:1];
            end
          end else begin
            parity_errors <= parity_errors + 1'b1;
          end
        end
      end else begin
        if (rise) begin
          shreg <= {shreg[31:0], mosi_s[1]};
          par   <= par ^ mosi_s[1];
          if (nbits != 6'd63) nbits <= nbits + 1'b1;
          if (nbits == 6'd15) begin
            bus_addr <= {shreg[13:0], mosi_s[1]};
            bus_re   <= 1'b1;
          end
        end
        if (fall) begin
          if (nbits >= 6'd16 && nbits <= 6'd32) begin
            miso <= tx[16];
            tx   <= {tx[15:0], 1'b0};
          end else begin
            miso <= 1'b0;
          end
        end
      end
    end
  end
endmodule
