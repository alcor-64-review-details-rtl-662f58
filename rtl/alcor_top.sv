// alcor_top -- digital core of the ALCOR-64 SiPM readout chip.
//
// 64 pixels in 8 columns of 8. Each pixel times the edges of its two
// discriminators with a coarse counter and four TDCs and buffers the words.
// Each column has its own End of Column readout (freeze-and-scan FSM1, LSB/MSB
// input FIFOs, framing FSM2 with CRC, output FIFO) and its own 8b/10b DDR
// serializer driving one LVDS data output. One SPI interface reaches the 272
// configuration registers and the status registers. The reset line decoder
// turns the width of reset pulses into Hard reset, Start and New Orbit, and
// keeps the frame timing shared by all columns.
//
// Interface: the analogue parts are outside this module. disc1/disc2 are the
// discriminator outputs of every pixel, tdc_start/tdc_busy talk to the
// analogue TDC interpolators, tp_in is the test pulse that opens the shutter
// window, ddr_out are the 8 serial outputs. All logic runs on clk (394 MHz in
// the chip; the DDR outputs switch on both edges).
//
// Configuration map (this design's choice): pixel register 0 = {spare, shutter
// delay[6:3], shutter enable[2], mode[1:0]}; EoC register 0 = {spare,
// en_code[3], force_align[2], stat_en[1], run[0]}; EoC registers 1 and 2 hold
// the 4-bit column shutter delays of columns 0..3 and 4..7. The other
// registers are stored and read back only.
//
// The shutter delay chains are behavioural models with sub-clock delays; all
// other logic is synthesizable. A hard reset clears all logic except the reset
// decoder, including configuration.
module alcor_top
  import alcor_pkg::*;
#(
  parameter int unsigned IN_DEPTH    = 64,
  parameter int unsigned OUT_DEPTH   = 128,
  parameter int unsigned TIMEOUT_W   = 9,
  parameter int unsigned RST_LATENCY = 12
) (
  input  logic clk,
  input  logic por_n,
  input  logic rst_line,
  input  logic tp_in,
  input  logic [N_COL-1:0][N_PIX-1:0]            disc1,
  input  logic [N_COL-1:0][N_PIX-1:0]            disc2,
  output logic [N_COL-1:0][N_PIX-1:0][N_TDC-1:0] tdc_start,
  input  logic [N_COL-1:0][N_PIX-1:0][N_TDC-1:0] tdc_busy,
  input  logic spi_sck,
  input  logic spi_cs_n,
  input  logic spi_mosi,
  output logic spi_miso,
  output logic [N_COL-1:0] ddr_out
);
  // ---------------- reset and frame timing ----------------
  logic                hard_rst, start_p, orbit_p, frame_par, end_rollover, fc_seu;
  logic [COARSE_W-1:0] eoc_coarse, last_coarse;
  logic [15:0]         frame_num;
  logic                core_rst_n;

  alcor_frame_ctrl #(.LATENCY(RST_LATENCY)) u_frame (
    .clk(clk), .rst_n(por_n), .rst_line(rst_line),
    .hard_rst(hard_rst), .start_p(start_p), .orbit_p(orbit_p),
    .coarse(eoc_coarse), .frame_num(frame_num), .frame_par(frame_par),
    .end_rollover(end_rollover), .last_coarse(last_coarse), .seu(fc_seu));

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) core_rst_n <= 1'b0;
    else        core_rst_n <= !hard_rst;
  end

  // ---------------- SPI and registers ----------------
  logic                 cfg_we;
  logic [7:0]           cfg_addr;
  logic [CFG_W-1:0]     cfg_wdata, cfg_rdata;
  logic [EOC_CFG_REGS-1:0][CFG_W-1:0] eoc_cfg;
  logic [15:0]          rad_err, eoc_status, status_set;
  logic                 spi_seu;
  logic [N_COL-1:0]     col_seu, in_ovf, out_ovf;
  eoc_cfg0_t            ecfg0;
  assign ecfg0      = eoc_cfg0_t'(eoc_cfg[0]);
  assign status_set = {out_ovf, in_ovf};

  alcor_spi u_spi (
    .clk(clk), .rst_n(core_rst_n),
    .spi_sck(spi_sck), .spi_cs_n(spi_cs_n), .spi_mosi(spi_mosi), .spi_miso(spi_miso),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .cfg_rdata(cfg_rdata),
    .eoc_cfg(eoc_cfg), .seu_evt(fc_seu | (|col_seu)), .status_set(status_set),
    .rad_err(rad_err), .eoc_status(eoc_status), .seu(spi_seu));

  // ---------------- columns ----------------
  logic [N_COL-1:0][N_PIX-1:0][PIX_CFG_REGS-1:0][CFG_W-1:0] pix_cfg;
  assign cfg_rdata = pix_cfg[cfg_addr[7:5]][cfg_addr[4:2]][cfg_addr[1:0]];

  for (genvar c = 0; c < N_COL; c++) begin : g_col
    logic [N_PIX:0]               busy_ch, dval_ch, wr_n_ch;
    logic [N_PIX:0][PIXW_W-1:0]   data_ch;
    logic                         freeze, rd_en, stat_clr, col_tp;
    pix_status_t [N_PIX-1:0]      pstat;
    logic [3:0]                   col_dly;
    logic [32:0]                  out_data;
    logic                         out_empty, out_rd;

    assign busy_ch[0] = 1'b0;
    assign dval_ch[0] = 1'b0;
    assign wr_n_ch[0] = 1'b1;
    assign data_ch[0] = '1;
    assign col_dly    = (c < 4) ? eoc_cfg[1][4*(c%4) +: 4] : eoc_cfg[2][4*(c%4) +: 4];

    alcor_shutter_delay #(.STEP_PS(100)) u_col_dly (.din(tp_in), .sel(col_dly), .dout(col_tp));

    for (genvar p = 0; p < N_PIX; p++) begin : g_pix
      logic      shut;
      pix_cfg0_t pc0;
      assign pc0 = pix_cfg0_t'(pix_cfg[c][p][0]);

      alcor_shutter_delay #(.STEP_PS(350)) u_pix_dly (.din(col_tp), .sel(pc0.shutter_delay), .dout(shut));

      alcor_pixel #(.PIX_ID(3'(p))) u_pix (
        .clk(clk), .rst_n(core_rst_n), .frame_clr(start_p | orbit_p),
        .disc1(disc1[c][p]), .disc2(disc2[c][p]), .shutter_win(shut),
        .tdc_start(tdc_start[c][p]), .tdc_busy(tdc_busy[c][p]),
        .cfg_we(cfg_we && cfg_addr[7:2] == 6'(c*N_PIX + p)), .cfg_addr(cfg_addr[1:0]),
        .cfg_wdata(cfg_wdata), .cfg_q(pix_cfg[c][p]),
        .freeze(freeze), .rd_en(rd_en),
        .busy_up(busy_ch[p]), .busy_dn(busy_ch[p+1]),
        .dval_up(dval_ch[p]), .dval_dn(dval_ch[p+1]),
        .data_up(data_ch[p]), .wr_up_n(wr_n_ch[p]),
        .data_dn(data_ch[p+1]), .wr_dn_n(wr_n_ch[p+1]),
        .stat_clr(stat_clr), .status(pstat[p]), .coarse_q());
    end

    alcor_eoc_column #(.COL_ID(3'(c)), .IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH),
                       .TIMEOUT_W(TIMEOUT_W)) u_eoc (
      .clk(clk), .rst_n(core_rst_n),
      .col_busy(busy_ch[N_PIX]), .col_dval(dval_ch[N_PIX]),
      .col_data(data_ch[N_PIX]), .col_wr_n(wr_n_ch[N_PIX]),
      .freeze(freeze), .rd_en(rd_en),
      .run(ecfg0.run), .stat_en(ecfg0.stat_en), .frame_par(frame_par), .frame_num(frame_num),
      .end_rollover(end_rollover), .last_coarse(last_coarse),
      .pix_status(pstat), .stat_clr(stat_clr),
      .out_rd(out_rd), .out_data(out_data), .out_empty(out_empty),
      .in_ovf(in_ovf[c]), .out_ovf(out_ovf[c]), .seu(col_seu[c]));

    alcor_ddr_serializer u_ddr (
      .clk(clk), .rst_n(core_rst_n), .enable(ecfg0.run), .en_code(ecfg0.en_code),
      .force_align(ecfg0.force_align),
      .fifo_empty(out_empty), .fifo_data(out_data), .fifo_rd(out_rd), .dout(ddr_out[c]));
  end
endmodule
