// alcor_link_monitor -- receiver and frame checker for one serial data link
// of the chip, for the chip-level testbench.
//
// Samples the DDR line once in each clock phase, finds the 10-bit symbol
// boundary on the first K28.5 idle or K28.1 align comma, decodes 8b/10b with the reference
// decoder and regroups four bytes (first byte = bits 7:0) into a 33-bit word
// {K flag, data}. Idle (K28.5) and align (K28.1) words are counted. The rest
// must form frames: K28.0, frame number, events, K28.2, optional K28.3 and
// eight pixel status words (pixel 7 first), EoC status, K28.4, CRC-32
// (polynomial 0x04C11DB7, MSB first, preset to all ones, over frame number to
// EoC status), recomputed here bit by bit.
//
// Per event it checks the column number, and that the fine time equals the
// conversion length of the TDC model that timed it (FAST selects the set).
// Per frame it checks the CRC and that the frame number is the previous one
// plus one, or 0 after a Start. It sums the loss counters of the status words. Every count is an
// output; the parent prints the verdict. The receiver re-aligns after each
// chip reset (rst_n low) or while the link is disabled.
module alcor_link_monitor
  import tb_8b10b_pkg::*;
  import tb_alcor_stim_pkg::*;
#(
  parameter int COL  = 0,
  parameter bit FAST = 1'b0   // TDC conversion lengths: tdc_dur(..., FAST)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic din,
  output int   checks,
  output int   failures,
  output int   frames,
  output int   events,
  output int   idle_words,
  output int   align_words,
  output int   rollover_frames,
  output int   zero_frames,       // frames numbered 0 (after a Start)
  output int   stat_blocks,
  output int   in_loss,
  output int   out_loss,
  output int   lost_tdc,
  output int   lost_ev
);
  logic [9:0]  win;
  bit          aligned;
  int          phase, nbyte;
  logic [31:0] wacc;
  logic [3:0]  kacc;

  typedef enum {M_HDR, M_FNUM, M_BODY, M_STAT, M_CRCHDR, M_CRC} m_e;
  m_e          ms;
  int          nstat;
  logic [31:0] crc_run;
  int          last_fnum;

  initial begin
    checks = 0; failures = 0; frames = 0; events = 0; idle_words = 0; align_words = 0;
    rollover_frames = 0; zero_frames = 0; stat_blocks = 0; in_loss = 0; out_loss = 0;
    lost_tdc = 0; lost_ev = 0;
    win = '0; aligned = 0; phase = 0; nbyte = 0; wacc = '0; kacc = '0;
    ms = M_HDR; nstat = 0; crc_run = '1; last_fnum = -1;
  end

  task automatic fail(input string what);
    failures++;
    $display("FAIL: link %0d: %s at %0t", COL, what, $time);
  endtask

  function automatic logic [31:0] crc_bit(input logic [31:0] c, input logic [31:0] d);
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[31] ^ d[i];
      c  = {c[30:0], 1'b0};
      if (fb) c = c ^ 32'h04C11DB7;
    end
    return c;
  endfunction

  task automatic word(input logic k, input logic [31:0] w);
    if (k && w == 32'hBCBCBCBC) begin
      idle_words++;
      return;
    end
    if (k && w == 32'h3C3C3C3C) begin
      align_words++;
      return;
    end
    case (ms)
      M_HDR: begin
        checks++;
        if (k && w == 32'h1C1C1C1C) begin
          crc_run = '1;
          ms = M_FNUM;
        end else begin
          fail($sformatf("expected a frame header, got %b %h", k, w));
        end
      end
      M_FNUM: begin
        checks++;
        if (k || w[31:16] != 16'h0) fail("bad frame number word");
        if (last_fnum >= 0 && int'(w[15:0]) != last_fnum + 1 && w[15:0] != 16'h0) begin
          failures++;
          $display("FAIL: link %0d: frame %0d after %0d", COL, w[15:0], last_fnum);
        end
        if (w[15:0] == 16'h0) zero_frames++;
        last_fnum = int'(w[15:0]);
        crc_run = crc_bit(crc_run, w);
        ms = M_BODY;
      end
      M_BODY: begin
        if (k && w == 32'h5C5C5C5C) begin
          ms = M_STAT;
          nstat = -1;
        end else begin
          checks++;
          if (k || int'(w[31:29]) != COL ||
              w[8:0] != tdc_dur(COL, int'(w[28:26]), int'(w[25:24]), FAST))
            fail($sformatf("bad event %b %h", k, w));
          events++;
          crc_run = crc_bit(crc_run, w);
        end
      end
      M_STAT: begin
        if (nstat < 0 && k && w == 32'h7C7C7C7C) begin
          nstat = 0;
          stat_blocks++;
        end else if (nstat >= 0 && nstat < 8) begin
          checks++;
          if (k || int'(w[31:29]) != COL || int'(w[28:26]) != 7 - nstat)
            fail($sformatf("bad pixel status word %b %h", k, w));
          lost_ev  += int'(w[25:20]);
          lost_tdc += int'(w[19:16]) + int'(w[15:12]) + int'(w[11:8]) + int'(w[7:4]);
          crc_run = crc_bit(crc_run, w);
          nstat++;
        end else begin
          checks++;
          if (k) fail("EoC status word is a K word");
          if (w[15:0] == 16'h7FFF) rollover_frames++;
          in_loss  += int'(w[23:16]);
          out_loss += int'(w[31:24]);
          crc_run = crc_bit(crc_run, w);
          ms = M_CRCHDR;
        end
      end
      M_CRCHDR: begin
        checks++;
        if (!(k && w == 32'h9C9C9C9C)) fail("expected the CRC header");
        ms = M_CRC;
      end
      M_CRC: begin
        checks++;
        if (k || w != crc_run) fail($sformatf("CRC %h, expected %h", w, crc_run));
        frames++;
        ms = M_HDR;
      end
      default: ms = M_HDR;
    endcase
  endtask

  task automatic take_bit(input logic b);
    logic [9:0] d;
    win = {win[8:0], b};
    if (!aligned) begin
      if (win == 10'b0011111010 || win == 10'b1100000101 ||
          win == 10'b0011111001 || win == 10'b1100000110) begin
        aligned = 1;
        phase = 0;
        wacc = {(win[3:0] == 4'b1010 || win[3:0] == 4'b0101) ? 8'hBC : 8'h3C, 24'h0};
        kacc = 4'b1000;
        nbyte = 1;
      end
      return;
    end
    phase++;
    if (phase == 10) begin
      phase = 0;
      d = decode(win);
      if (!d[9]) begin
        checks++;
        fail($sformatf("invalid symbol %b", win));
      end
      wacc = {d[7:0], wacc[31:8]};
      kacc = {d[8], kacc[3:1]};
      nbyte++;
      if (nbyte == 4) begin
        nbyte = 0;
        if (!(kacc == 4'b0000 || kacc == 4'b1111)) begin
          checks++;
          fail("mixed K flags in a word");
        end
        word(kacc[0], wacc);
      end
    end
  endtask

  task automatic sample();
    if (rst_n && enable) begin
      take_bit(din);
    end else begin
      aligned = 0;
      ms = M_HDR;
      last_fnum = -1;
    end
  endtask

  always @(posedge clk) #2 sample();
  always @(negedge clk) #2 sample();
endmodule
