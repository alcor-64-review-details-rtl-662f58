// alcor_spi -- SPI configuration interface, register file access and the
// End of Column status registers.
//
// An SPI word is 24 bits, MSB first: command[23:20], 4 unused bits [19:16]
// that give the chip time to decode the command, payload[15:0]. The command
// MSB selects read (1) or write (0):
//   x000  Pointer register           (read / write)
//   x001  Data register: the configuration register addressed by the Pointer
//   x010  SPI status register        (read / write)
//   0110  Rad error register reset   1110  Rad error register read
//   0111  EoC status register reset  1111  EoC status register read
// A read returns the register on MISO during the payload bits of the same
// word. Pointer bit 15 turns on auto increment: bits 14:0 then advance after
// every Data register access, so a block of registers needs one Pointer
// write and then one transaction per register.
//
// There are 272 configuration registers of 16 bits: addresses 0..255 are the
// 4 registers of each of the 64 pixels (address = (column*8 + pixel)*4 +
// register), reached over cfg_we/cfg_addr/cfg_wdata/cfg_rdata; addresses
// 256..271 are the 16 EoC configuration registers held here. Reads of other
// addresses return 0 and writes to them are ignored. The Pointer, the SPI
// status register and the EoC configuration registers are TMR-protected (the
// shift register itself is not). The Rad error register counts corrected
// upsets reported on seu_evt (saturating); the EoC status register collects
// sticky flags from status_set.
//
// Timing: SPI mode 0 (data sampled on the rising SCK edge, MISO changed on the
// falling edge), CS active low. SCK, CS and MOSI are sampled with the chip
// clock through two-flop synchronisers, so SCK must be slower than clk/4
// (20 MHz against 394 MHz). A write takes effect a few clocks after the 24th
// rising SCK edge.
//
// Word format, command codes, register counts, auto increment and TMR follow
// the published description; the address map, the SPI mode, oversampling and
// the meaning of the status bits are this design's choices.
module alcor_spi
  import alcor_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              spi_sck,
  input  logic              spi_cs_n,
  input  logic              spi_mosi,
  output logic              spi_miso,
  // pixel configuration bus
  output logic              cfg_we,
  output logic [7:0]        cfg_addr,
  output logic [CFG_W-1:0]  cfg_wdata,
  input  logic [CFG_W-1:0]  cfg_rdata,
  // End of Column configuration and status
  output logic [EOC_CFG_REGS-1:0][CFG_W-1:0] eoc_cfg,
  input  logic              seu_evt,
  input  logic [15:0]       status_set,
  output logic [15:0]       rad_err,
  output logic [15:0]       eoc_status,
  output logic              seu
);
  // synchronisers
  logic [2:0] sck_s;
  logic [1:0] cs_s, mosi_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s  <= '0;
      cs_s   <= 2'b11;
      mosi_s <= '0;
    end else begin
      sck_s  <= {sck_s[1:0], spi_sck};
      cs_s   <= {cs_s[0], spi_cs_n};
      mosi_s <= {mosi_s[0], spi_mosi};
    end
  end
  logic sck_rise, sck_fall, active;
  assign active   = !cs_s[1];
  assign sck_rise = active && sck_s[1] && !sck_s[2];
  assign sck_fall = active && !sck_s[1] && sck_s[2];

  logic [23:0] sr;
  logic [4:0]  bitcnt;
  logic [15:0] rdata;
  logic        done;        // 24th bit received this clock
  logic        miso_q;

  // registers
  logic [15:0] ptr_q, ptr_d, stat_q, stat_d;
  logic        ptr_we, stat_we, ptr_seu, stat_seu;
  logic [EOC_CFG_REGS-1:0] ecfg_we, ecfg_seu;

  logic [14:0] addr;
  logic        sr_used;     // the current word has been executed
  assign addr = ptr_q[14:0];

  assign cfg_addr  = addr[7:0];
  assign cfg_wdata = sr[15:0];

  function automatic logic [15:0] reg_read(input logic [2:0] c, input logic [14:0] a,
                                           input logic [15:0] p, input logic [15:0] s,
                                           input logic [15:0] pix, input logic [15:0] eoc,
                                           input logic [15:0] re, input logic [15:0] es);
    case (c)
      3'b000: return p;
      3'b001: return (a < 15'd256) ? pix : ((a < 15'd272) ? eoc : 16'h0000);
      3'b010: return s;
      3'b110: return re;
      3'b111: return es;
      default: return 16'h0000;
    endcase
  endfunction

  logic [15:0] eoc_rd;
  assign eoc_rd = eoc_cfg[addr[3:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr     <= '0;
      bitcnt <= '0;
      rdata  <= '0;
      miso_q <= 1'b0;
    end else if (!active) begin
      bitcnt <= '0;
      miso_q <= 1'b0;
    end else begin
      if (sck_rise) begin
        sr     <= {sr[22:0], mosi_s[1]};
        bitcnt <= bitcnt + 5'd1;
      end
      // the command is complete after 4 bits: latch the read data
      if (bitcnt == 5'd4 && !sck_rise)
        rdata <= reg_read(sr[2:0], addr, ptr_q, stat_q, cfg_rdata, eoc_rd, rad_err, eoc_status);
      if (sck_fall && bitcnt >= 5'd8 && bitcnt < 5'd24)
        miso_q <= rdata[4'(5'd23 - bitcnt)];
    end
  end
  assign spi_miso = miso_q;
  assign done     = active && bitcnt == 5'd24 && !sck_rise && !sck_fall && !sr_used;

  // one execution per word
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 sr_used <= 1'b0;
    else if (!active)           sr_used <= 1'b0;
    else if (done)              sr_used <= 1'b1;
  end

  logic [3:0] wcmd;
  assign wcmd = sr[23:20];
  logic data_acc, incr;
  assign data_acc = done && wcmd[2:0] == 3'b001;
  assign incr     = data_acc && ptr_q[15];

  assign ptr_we  = (done && wcmd == 4'b0000) || incr;
  assign ptr_d   = (done && wcmd == 4'b0000) ? sr[15:0] : {ptr_q[15], ptr_q[14:0] + 15'd1};
  assign stat_we = done && wcmd == 4'b0010;
  assign stat_d  = sr[15:0];
  assign cfg_we  = done && wcmd == 4'b0001 && addr < 15'd256;

  tmr_reg #(.W(16)) u_ptr  (.clk(clk), .rst_n(rst_n), .we(ptr_we),  .d(ptr_d),  .q(ptr_q),  .seu(ptr_seu));
  tmr_reg #(.W(16)) u_stat (.clk(clk), .rst_n(rst_n), .we(stat_we), .d(stat_d), .q(stat_q), .seu(stat_seu));

  for (genvar r = 0; r < EOC_CFG_REGS; r++) begin : g_ecfg
    assign ecfg_we[r] = done && wcmd == 4'b0001 && addr == 15'(256 + r);
    tmr_reg #(.W(CFG_W)) u_reg (.clk(clk), .rst_n(rst_n), .we(ecfg_we[r]), .d(sr[15:0]),
                                .q(eoc_cfg[r]), .seu(ecfg_seu[r]));
  end

  assign seu = ptr_seu | stat_seu | (|ecfg_seu);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad_err    <= '0;
      eoc_status <= '0;
    end else begin
      if (done && wcmd == 4'b0110)                 rad_err <= '0;
      else if ((seu_evt || seu) && rad_err != '1)  rad_err <= rad_err + 16'd1;
      if (done && wcmd == 4'b0111) eoc_status <= status_set;
      else                         eoc_status <= eoc_status | status_set;
    end
  end
endmodule
