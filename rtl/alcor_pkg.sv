// alcor_pkg -- constants, types and helper functions shared by the ALCOR-64
// digital blocks.
//
// Word formats follow the published data format: a 32-bit event word is
// {Col ID[31:29], Pix ID[28:26], TDC ID[25:24], Coarse[23:9], Fine[8:0]}.
// Inside a column a pixel drives a 30-bit word: the 29 low bits of the event
// word plus one extra MSB, the frame parity ("coarse MSB"), that the End of
// Column uses to steer the word into the LSB or MSB input FIFO. The column ID
// is added by the End of Column. Control words are the K28.x symbol repeated in
// all four bytes, flagged by a 33rd bit (K flag) in the output FIFO.
//
// The CRC polynomial is not published; this design uses the IEEE 802.3 CRC-32
// polynomial 0x04C11DB7, MSB first, initial value 0xFFFFFFFF, no final XOR.
package alcor_pkg;

  localparam int unsigned N_COL    = 8;   // columns (one EoC readout + DDR each)
  localparam int unsigned N_PIX    = 8;   // pixels per column
  localparam int unsigned N_TDC    = 4;   // TDCs per pixel
  localparam int unsigned COARSE_W = 15;  // coarse counter, rollover 2^15 clocks
  localparam int unsigned FINE_W   = 9;   // fine counter
  localparam int unsigned PIXW_W   = 30;  // pixel word on the column bus
  localparam int unsigned CFG_W    = 16;  // configuration register width
  localparam int unsigned PIX_CFG_REGS = 4;   // configuration registers per pixel
  localparam int unsigned EOC_CFG_REGS = 16;  // EoC configuration registers
  localparam int unsigned N_CFG_REGS   = N_COL*N_PIX*PIX_CFG_REGS + EOC_CFG_REGS; // 272

  // K28.y symbols used by the data stream
  localparam logic [7:0] K28_0 = 8'h1C;  // frame header
  localparam logic [7:0] K28_1 = 8'h3C;  // align comma (forced from SPI configuration)
  localparam logic [7:0] K28_2 = 8'h5C;  // end of frame
  localparam logic [7:0] K28_3 = 8'h7C;  // status header
  localparam logic [7:0] K28_4 = 8'h9C;  // CRC header
  localparam logic [7:0] K28_5 = 8'hBC;  // idle comma (output FIFO empty)

  localparam logic [31:0] CRC_POLY = 32'h04C1_1DB7;
  localparam logic [31:0] CRC_INIT = 32'hFFFF_FFFF;

  typedef enum logic [1:0] {
    MODE_LE   = 2'd0,  // leading edge: 1 word per hit
    MODE_TOT  = 2'd1,  // time over threshold on discriminator 1: 2 words per hit
    MODE_TOT2 = 2'd2,  // leading edge of disc 1, trailing edge of disc 2: 2 words
    MODE_SR   = 2'd3   // slew rate: leading edges of disc 1 and disc 2: 2 words
  } mode_e;

  // Pixel word as carried on the column bus (30 bits)
  typedef struct packed {
    logic                frame_par;
    logic [2:0]          pix_id;
    logic [1:0]          tdc_id;
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine;
  } pix_word_t;

  // Pixel status (the 26 low bits of a pixel status word)
  typedef struct packed {
    logic [5:0] lost_ev;    // words lost, output buffer full
    logic [3:0] lost_tdc1;  // hits lost, TDC 0 busy
    logic [3:0] lost_tdc2;
    logic [3:0] lost_tdc3;
    logic [3:0] lost_tdc4;
    logic [3:0] seu_cnt;    // corrected single-event upsets
  } pix_status_t;

  // Pixel configuration register 0 layout (the other three are stored only)
  typedef struct packed {
    logic [8:0] spare;
    logic [3:0] shutter_delay;  // 16 steps of the in-pixel shutter delay chain
    logic       shutter_en;     // gate hits with the shutter window
    mode_e      mode;
  } pix_cfg0_t;

  // EoC configuration register 0 layout
  typedef struct packed {
    logic [11:0] spare;
    logic        en_code;       // 8b10b encoding on (off: raw byte, 2 MSBs zero)
    logic        force_align;   // send K28.1 align commas instead of data
    logic        stat_en;       // add pixel status words to every frame
    logic        run;           // EoC configured: start the readout FSMs
  } eoc_cfg0_t;

  function automatic logic [31:0] kword(input logic [7:0] k);
    return {4{k}};
  endfunction

  // One 32-bit data word into the running CRC, MSB first
  function automatic logic [31:0] crc32_word(input logic [31:0] crc, input logic [31:0] data);
    logic [31:0] c;
    c = crc;
    for (int i = 31; i >= 0; i--) begin
      if (c[31] ^ data[i]) c = {c[30:0], 1'b0} ^ CRC_POLY;
      else                 c = {c[30:0], 1'b0};
    end
    return c;
  endfunction

endpackage
