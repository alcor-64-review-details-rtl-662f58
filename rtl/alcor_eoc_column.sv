// alcor_eoc_column -- End of Column readout of one pixel column.
//
// What it does: collects the words of the 8 pixels of a column, sorts them by
// frame and writes framed 33-bit words ({K flag, word}) into the output FIFO
// that feeds the column's DDR serializer.
//
// How it works:
//  * FSM1 (column scan, Hamming-protected state): IDLE until the column reports
//    busy (some pixel holds data), then one FREEZE clock that makes every
//    pixel with data set its DVAL flag, then READ: the pixels put their words
//    on the bus from the top down, one word per clock, until the DVAL chain of
//    the column is released. Then IDLE again.
//  * Each word read is steered by its frame-parity bit (the extra coarse MSB)
//    into FIFO IN LSB (parity 0) or FIFO IN MSB (parity 1), 64 x 32 each, with
//    the column ID put in bits 31:29. A word for a full FIFO is dropped and
//    counted (EoC IN FIFO loss).
//  * FSM2 (framing, Hamming-protected state), once the EoC is configured (run):
//      K28.0 header word (0x1C1C1C1C), frame number (16 bit: the number the
//      chip counter held while its frame parity equalled this FIFO's, so a
//      frame that opens during the previous frame's timeout keeps its own),
//      the events of the current input FIFO, until the frame has ended (the
//      chip's frame parity differs from the FIFO being read),
//      then a timeout of 2^TIMEOUT_W ticks of clk/2 (512 x 2 = 1024 clocks)
//      in which late words of the ended frame are still moved, and until that
//      FIFO is empty,
//      K28.2 end of frame, optionally K28.3 and the 8 pixel status words
//      (pixel 7 first), the EoC status word, K28.4 and the CRC-32 of the data
//      words of the frame (frame number to EoC status word),
//      then the next frame from the other input FIFO.
//    Control words wait for room in the output FIFO; an event word that meets
//    a full output FIFO is dropped and counted (EoC OUT FIFO loss).
//    The EoC status word is {OUT loss[7:0], IN loss[7:0], 0x7FFF} after a
//    rollover, or {OUT loss, IN loss, last coarse counter value} after Start or
//    New Orbit. Both loss counters saturate and are cleared once written, and
//    stat_clr clears the pixel status counters at the same time.
//  * Output FIFO 128 x 33, first word fall through, read by the serializer.
//
// Timing: one bus word per clock in READ; FSM2 writes at most one word per
// clock. The sequence of words, the FIFO sizes, the timeout and the status
// word formats follow the published description; the exact hand-over between
// FSM1 and the pixels, the dropping policy and the CRC definition (see
// alcor_pkg) are this design's choices.
module alcor_eoc_column
  import alcor_pkg::*;
#(
  parameter logic [2:0]  COL_ID    = 3'd0,
  parameter int unsigned IN_DEPTH  = 64,
  parameter int unsigned OUT_DEPTH = 128,
  parameter int unsigned TIMEOUT_W = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  // column bus (from the bottom pixel)
  input  logic                col_busy,
  input  logic                col_dval,
  input  logic [PIXW_W-1:0]   col_data,
  input  logic                col_wr_n,
  output logic                freeze,
  output logic                rd_en,
  // frame timing and configuration
  input  logic                run,
  input  logic                stat_en,
  input  logic                frame_par,
  input  logic [15:0]         frame_num,
  input  logic                end_rollover,
  input  logic [COARSE_W-1:0] last_coarse,
  input  pix_status_t [N_PIX-1:0] pix_status,
  output logic                stat_clr,
  // output FIFO to the DDR serializer
  input  logic                out_rd,
  output logic [32:0]         out_data,
  output logic                out_empty,
  // monitoring
  output logic                in_ovf,    // an input word was dropped this clock
  output logic                out_ovf,   // an event was dropped at the output FIFO
  output logic                seu
);
  // ---------------- FSM1: column scan ----------------
  typedef enum logic [1:0] {F1_IDLE, F1_FREEZE, F1_READ} f1_e;
  logic [1:0] f1_q, f1_d;
  logic       f1_seu;

  always_comb begin
    f1_d = f1_q;
    case (f1_e'(f1_q))
      F1_IDLE:   if (col_busy) f1_d = F1_FREEZE;
      F1_FREEZE: f1_d = F1_READ;
      F1_READ:   if (!col_dval) f1_d = F1_IDLE;
      default:   f1_d = F1_IDLE;
    endcase
  end
  hamming_state_reg #(.W(2)) u_f1 (.clk(clk), .rst_n(rst_n), .d(f1_d), .q(f1_q), .seu(f1_seu));

  assign freeze = (f1_e'(f1_q) == F1_FREEZE);
  assign rd_en  = (f1_e'(f1_q) == F1_READ);

  // ---------------- input FIFOs ----------------
  logic        take;
  logic [31:0] in_word;
  logic [1:0]  in_full, in_empty, in_rd;
  logic [1:0][31:0] in_q;

  assign take    = rd_en && !col_wr_n;
  assign in_word = {COL_ID, col_data[28:0]};
  assign in_ovf  = take && in_full[col_data[29]];

  for (genvar f = 0; f < 2; f++) begin : g_in
    sync_fifo #(.W(32), .DEPTH(IN_DEPTH)) u_fifo (
      .clk(clk), .rst_n(rst_n),
      .wr(take && col_data[29] == 1'(f)), .wdata(in_word),
      .rd(in_rd[f]), .rdata(in_q[f]), .empty(in_empty[f]), .full(in_full[f]));
  end

  // ---------------- FSM2: framing ----------------
  typedef enum logic [3:0] {
    S_IDLE, S_HDR, S_FNUM, S_READ, S_WAIT, S_EOF, S_STHDR, S_STAT,
    S_EOCST, S_CRCHDR, S_CRC
  } s_e;
  logic [3:0] s_q, s_d;
  logic       s_seu;
  s_e         st;
  assign st = s_e'(s_q);

  logic                 cur;          // input FIFO of the frame being sent
  logic [1:0][15:0]     fnum_q;       // frame number last seen with each parity
  logic [2:0]           sidx;         // pixel status index
  logic [TIMEOUT_W+1:0] tmo;          // timeout: bits above bit 0 are the clk/2 counter
  logic [31:0]          crc;
  logic [7:0]           in_loss, out_loss;
  logic                 out_full;
  logic                 o_wr;
  logic [32:0]          o_word;
  logic                 ev_pop;       // move one event this clock
  logic                 crc_upd, crc_init;

  logic [31:0] eoc_status;
  assign eoc_status = {out_loss, in_loss,
                       end_rollover ? 16'h7FFF : {{(16-COARSE_W){1'b0}}, last_coarse}};

  always_comb begin
    s_d      = s_q;
    o_wr     = 1'b0;
    o_word   = '0;
    ev_pop   = 1'b0;
    crc_upd  = 1'b0;
    crc_init = 1'b0;
    stat_clr = 1'b0;
    case (st)
      S_IDLE: if (run) s_d = S_HDR;
      S_HDR: begin
        o_word = {1'b1, kword(K28_0)};
        o_wr   = !out_full;
        crc_init = !out_full;
        if (!out_full) s_d = S_FNUM;
      end
      S_FNUM: begin
        o_word  = {1'b0, 16'h0000, fnum_q[cur]};
        o_wr    = !out_full;
        crc_upd = !out_full;
        if (!out_full) s_d = S_READ;
      end
      S_READ, S_WAIT: begin
        o_word = {1'b0, in_q[cur]};
        if (!in_empty[cur]) begin
          ev_pop  = 1'b1;
          o_wr    = !out_full;
          crc_upd = !out_full;
        end
        if (st == S_READ && frame_par != cur) s_d = S_WAIT;
        if (st == S_WAIT && tmo[TIMEOUT_W+1] && in_empty[cur]) s_d = S_EOF;
      end
      S_EOF: begin
        o_word = {1'b1, kword(K28_2)};
        o_wr   = !out_full;
        if (!out_full) s_d = stat_en ? S_STHDR : S_EOCST;
      end
      S_STHDR: begin
        o_word = {1'b1, kword(K28_3)};
        o_wr   = !out_full;
        if (!out_full) s_d = S_STAT;
      end
      S_STAT: begin
        o_word  = {1'b0, COL_ID, sidx, pix_status[sidx]};
        o_wr    = !out_full;
        crc_upd = !out_full;
        if (!out_full && sidx == 3'd0) s_d = S_EOCST;
      end
      S_EOCST: begin
        o_word   = {1'b0, eoc_status};
        o_wr     = !out_full;
        crc_upd  = !out_full;
        stat_clr = !out_full;
        if (!out_full) s_d = S_CRCHDR;
      end
      S_CRCHDR: begin
        o_word = {1'b1, kword(K28_4)};
        o_wr   = !out_full;
        if (!out_full) s_d = S_CRC;
      end
      S_CRC: begin
        o_word = {1'b0, crc};
        o_wr   = !out_full;
        if (!out_full) s_d = S_HDR;
      end
      default: s_d = S_IDLE;
    endcase
  end

  hamming_state_reg #(.W(4)) u_f2 (.clk(clk), .rst_n(rst_n), .d(s_d), .q(s_q), .seu(s_seu));

  assign in_rd[0] = ev_pop && !cur;
  assign in_rd[1] = ev_pop &&  cur;
  assign out_ovf  = ev_pop && out_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur      <= 1'b0;
      fnum_q   <= '0;
      sidx     <= 3'd7;
      tmo      <= '0;
      crc      <= CRC_INIT;
      in_loss  <= '0;
      out_loss <= '0;
    end else begin
      fnum_q[frame_par] <= frame_num;
      if (st == S_IDLE) cur <= frame_par;
      if (st == S_CRC && !out_full) cur <= ~cur;
      if (st == S_STAT && !out_full) sidx <= sidx - 3'd1;
      if (st == S_EOF) sidx <= 3'd7;
      if (st == S_READ)                        tmo <= '0;
      else if (st == S_WAIT && !tmo[TIMEOUT_W+1]) tmo <= tmo + 1'b1;
      if (crc_init)     crc <= CRC_INIT;
      else if (crc_upd) crc <= crc32_word(crc, o_word[31:0]);
      if (st == S_EOCST && !out_full) begin
        in_loss  <= in_ovf  ? 8'd1 : 8'd0;
        out_loss <= 8'd0;
      end else begin
        if (in_ovf  && in_loss  != 8'hFF) in_loss  <= in_loss  + 8'd1;
        if (out_ovf && out_loss != 8'hFF) out_loss <= out_loss + 8'd1;
      end
    end
  end

  // ---------------- output FIFO ----------------
  sync_fifo #(.W(33), .DEPTH(OUT_DEPTH)) u_out (
    .clk(clk), .rst_n(rst_n), .wr(o_wr), .wdata(o_word),
    .rd(out_rd), .rdata(out_data), .empty(out_empty), .full(out_full));

  assign seu = f1_seu | s_seu;
endmodule
