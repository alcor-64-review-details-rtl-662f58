// alcor_pixel -- digital logic of one ALCOR pixel.
//
// What it does: turns discriminator edges into 30-bit time-stamped words and
// hands them to the End of Column over a bus shared by the 8 pixels of a
// column.
//
// How it works:
//  * Coarse counter: 15 bits, free running at the chip clock, plus the frame
//    parity bit (the "extra MSB" that separates frames). frame_clr (Start or
//    New Orbit) loads 0 and toggles the parity; the rollover 0x7FFF -> 0 also
//    toggles it.
//  * Hit FSM (one per pixel, Hamming-protected state): selects the edges to
//    time for the configured mode. LE: rising edge of disc1 (1 word per hit).
//    TOT: rising and falling edge of disc1. TOT2: rising edge of disc1 and
//    falling edge of disc2. SR: rising edges of disc1 and disc2 (2 words per
//    hit). In the 2-edge modes the FSM waits for the second edge after a timed
//    first edge. With the shutter enabled a first edge counts only while the
//    shutter window is high.
//  * TDC control: 4 TDCs used in turn (round robin). An edge starts the next
//    TDC (tdc_start, held until the TDC raises tdc_busy) and latches the
//    coarse counter; that TDC's 9-bit fine counter then counts the clocks
//    while tdc_busy is high. Every timed edge moves the turn to the next TDC;
//    if the TDC whose turn it is has not finished, the edge is lost and that
//    TDC's Lost counter is incremented.
//  * Output buffer, depth 4, with its write logic (one finished conversion per
//    clock, lowest TDC first; a full buffer drops the word and increments Lost
//    Ev) and read logic (column bus, below).
//  * Column bus: when the End of Column asserts freeze, the pixel sets its data
//    valid flag DVAL if it holds data. During the read phase (rd_en) the
//    top-most pixel with DVAL (none above it has dval_up) drives its oldest
//    word on data_dn with wr_dn_n low, pops it and clears DVAL on that clock;
//    other pixels pass the bus from above. busy_dn and dval_dn are the ORs of
//    the column above and this pixel. Pixel 0 is the top of the column.
//  * Four 16-bit configuration registers, TMR-protected, written over a
//    parallel bus; register 0 holds mode, shutter enable and shutter delay.
//  * Status counters (Lost Ev 6 bits, Lost TDC1..4 4 bits, SEU 4 bits, all
//    saturating) cleared by stat_clr.
//
// Timing: discriminator inputs are taken as synchronous to clk (sampled once
// per clock); the real chip starts the TDCs asynchronously. A word reaches the
// bus at the earliest 2 clocks after the end of tdc_busy.
//
// The block list (coarse counter, 4 TDC controls with fine counters, mode
// FSMs, 4-deep buffer with write/read FSMs, shutter, 4 x 16-bit TMR
// configuration registers, Hamming-protected FSMs, freeze/DVAL readout) follows
// the published description. Edge choices per mode, round-robin TDC use, the
// bus signalling and the configuration bus are this design's choices.
module alcor_pixel
  import alcor_pkg::*;
#(
  parameter logic [2:0] PIX_ID = 3'd0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  frame_clr,   // Start or New Orbit: coarse = 0, parity toggles
  // front end
  input  logic                  disc1,
  input  logic                  disc2,
  input  logic                  shutter_win,
  // analogue TDCs
  output logic [N_TDC-1:0]      tdc_start,
  input  logic [N_TDC-1:0]      tdc_busy,
  // configuration
  input  logic                  cfg_we,      // write to this pixel
  input  logic [1:0]            cfg_addr,
  input  logic [CFG_W-1:0]      cfg_wdata,
  output logic [PIX_CFG_REGS-1:0][CFG_W-1:0] cfg_q,
  // column bus
  input  logic                  freeze,
  input  logic                  rd_en,
  input  logic                  busy_up,
  output logic                  busy_dn,
  input  logic                  dval_up,
  output logic                  dval_dn,
  input  logic [PIXW_W-1:0]     data_up,
  input  logic                  wr_up_n,
  output logic [PIXW_W-1:0]     data_dn,
  output logic                  wr_dn_n,
  // status
  input  logic                  stat_clr,
  output pix_status_t           status,
  output logic [COARSE_W-1:0]   coarse_q     // coarse counter, for observation
);
  // ---------------- configuration registers (TMR) ----------------
  logic [PIX_CFG_REGS-1:0] cfg_seu;
  for (genvar r = 0; r < PIX_CFG_REGS; r++) begin : g_cfg
    tmr_reg #(.W(CFG_W)) u_cfg (
      .clk(clk), .rst_n(rst_n), .we(cfg_we && cfg_addr == 2'(r)),
      .d(cfg_wdata), .q(cfg_q[r]), .seu(cfg_seu[r]));
  end
  pix_cfg0_t cfg0;
  assign cfg0 = pix_cfg0_t'(cfg_q[0]);

  // ---------------- coarse counter ----------------
  logic par;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coarse_q <= '0;
      par      <= 1'b0;
    end else if (frame_clr) begin
      coarse_q <= '0;
      par      <= ~par;
    end else begin
      coarse_q <= coarse_q + 1'b1;
      if (coarse_q == '1) par <= ~par;
    end
  end

  // ---------------- edge detection and hit FSM ----------------
  logic d1_q, d2_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1_q <= 1'b0;
      d2_q <= 1'b0;
    end else begin
      d1_q <= disc1;
      d2_q <= disc2;
    end
  end

  logic rise1, fall1, rise2, fall2;
  assign rise1 = disc1 & ~d1_q;
  assign fall1 = ~disc1 & d1_q;
  assign rise2 = disc2 & ~d2_q;
  assign fall2 = ~disc2 & d2_q;

  logic edge_a, edge_b;      // first / second edge of the mode
  always_comb begin
    edge_a = rise1 && (!cfg0.shutter_en || shutter_win);
    case (cfg0.mode)
      MODE_TOT:  edge_b = fall1;
      MODE_TOT2: edge_b = fall2;
      MODE_SR:   edge_b = rise2;
      default:   edge_b = 1'b0;
    endcase
  end

  // hit FSM: 0 = waiting for a first edge, 1 = first edge timed, waiting for the second
  logic hit_q, hit_d, hit_seu;
  logic take_a, take_b;      // edges that are timed (if a TDC is free)

  // ---------------- TDC control ----------------
  typedef enum logic [1:0] {T_IDLE, T_WAIT, T_CONV, T_DONE} tdc_st_e;
  tdc_st_e [N_TDC-1:0]      t_st;
  logic [N_TDC-1:0][COARSE_W-1:0] t_coarse;
  logic [N_TDC-1:0]         t_par;
  logic [N_TDC-1:0][FINE_W-1:0]   t_fine;
  logic [1:0]               rr;          // next TDC to use
  logic [1:0]               a_idx, b_idx;
  logic [N_TDC-1:0]         t_go;        // TDCs started this clock
  logic [N_TDC-1:0]         t_lost;      // hits lost on this TDC this clock
  logic [N_TDC-1:0]         t_wr;        // result moved to the buffer this clock

  always_comb begin
    a_idx  = rr;
    b_idx  = rr;
    t_go   = '0;
    t_lost = '0;
    take_a = 1'b0;
    take_b = 1'b0;
    hit_d  = hit_q;
    if (cfg0.mode == MODE_LE) hit_d = 1'b0;
    // second edge of a pending hit
    if (hit_q && edge_b && cfg0.mode != MODE_LE) begin
      take_b = 1'b1;
      hit_d  = 1'b0;
    end
    if (edge_a && (!hit_q || take_b || cfg0.mode == MODE_LE)) take_a = 1'b1;
    // the order of the two edges in one clock: a pending hit's second edge first
    if (take_b) begin
      b_idx = rr;
      if (t_st[b_idx] == T_IDLE) begin
        t_go[b_idx] = 1'b1;
      end else begin
        t_lost[b_idx] = 1'b1;
      end
      a_idx = rr + 2'd1;
    end
    if (take_a) begin
      if (t_st[a_idx] == T_IDLE) begin
        t_go[a_idx] = 1'b1;
        if (cfg0.mode != MODE_LE) hit_d = 1'b1;
      end else begin
        t_lost[a_idx] = 1'b1;
      end
    end
  end

  hamming_state_reg #(.W(1)) u_hit (
    .clk(clk), .rst_n(rst_n), .d(hit_d), .q(hit_q), .seu(hit_seu));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else        rr <= rr + 2'(take_a) + 2'(take_b);
  end

  for (genvar t = 0; t < N_TDC; t++) begin : g_tdc
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        t_st[t]     <= T_IDLE;
        t_coarse[t] <= '0;
        t_par[t]    <= 1'b0;
        t_fine[t]   <= '0;
      end else begin
        case (t_st[t])
          T_IDLE: if (t_go[t]) begin
            t_st[t]     <= T_WAIT;
            t_coarse[t] <= coarse_q;
            t_par[t]    <= par;
            t_fine[t]   <= '0;
          end
          T_WAIT: if (tdc_busy[t]) begin
            t_st[t]   <= T_CONV;
            t_fine[t] <= 9'd1;
          end
          T_CONV: if (tdc_busy[t]) begin
            if (t_fine[t] != '1) t_fine[t] <= t_fine[t] + 1'b1;
          end else begin
            t_st[t] <= T_DONE;
          end
          T_DONE: if (t_wr[t]) t_st[t] <= T_IDLE;
          default: t_st[t] <= T_IDLE;
        endcase
      end
    end
    assign tdc_start[t] = (t_st[t] == T_WAIT) && !tdc_busy[t] && (t_fine[t] == '0);
  end

  // ---------------- output buffer (depth 4) ----------------
  logic [3:0][PIXW_W-1:0] buf_mem;
  logic [1:0] wp, rp;
  logic [2:0] cnt;
  logic       buf_full, buf_empty;
  logic       wr_any, pop;
  logic [1:0] wr_idx;
  pix_word_t  wr_word;
  logic       lost_ev_evt;

  assign buf_full  = (cnt == 3'd4);
  assign buf_empty = (cnt == 3'd0);

  always_comb begin
    t_wr   = '0;
    wr_any = 1'b0;
    wr_idx = '0;
    for (int t = N_TDC-1; t >= 0; t--) begin
      if (t_st[t] == T_DONE) begin
        wr_any = 1'b1;
        wr_idx = 2'(t);
      end
    end
    if (wr_any) t_wr[wr_idx] = 1'b1;
    wr_word.frame_par = t_par[wr_idx];
    wr_word.pix_id    = PIX_ID;
    wr_word.tdc_id    = wr_idx;
    wr_word.coarse    = t_coarse[wr_idx];
    wr_word.fine      = t_fine[wr_idx];
  end
  assign lost_ev_evt = wr_any && buf_full && !pop;

  // ---------------- column bus ----------------
  logic dval_q, grant;
  assign grant   = rd_en && dval_q && !dval_up;
  assign pop     = grant;
  assign data_dn = grant ? buf_mem[rp] : data_up;
  assign wr_dn_n = grant ? 1'b0 : wr_up_n;
  assign dval_dn = dval_up | dval_q;
  assign busy_dn = busy_up | !buf_empty;

  always_ff @(posedge clk) begin
    if (wr_any && (!buf_full || pop)) buf_mem[wp] <= wr_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp     <= '0;
      rp     <= '0;
      cnt    <= '0;
      dval_q <= 1'b0;
    end else begin
      if (wr_any && (!buf_full || pop)) wp <= wp + 2'd1;
      if (pop) rp <= rp + 2'd1;
      cnt <= cnt + 3'(wr_any && (!buf_full || pop)) - 3'(pop);
      if (freeze)     dval_q <= !buf_empty;
      else if (grant) dval_q <= 1'b0;
    end
  end

  // ---------------- status counters ----------------
  logic seu_evt;
  assign seu_evt = hit_seu | (|cfg_seu);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status <= '0;
    end else if (stat_clr) begin
      status <= '0;
    end else begin
      if (lost_ev_evt && status.lost_ev != '1) status.lost_ev <= status.lost_ev + 1'b1;
      if (t_lost[0] && status.lost_tdc1 != '1) status.lost_tdc1 <= status.lost_tdc1 + 1'b1;
      if (t_lost[1] && status.lost_tdc2 != '1) status.lost_tdc2 <= status.lost_tdc2 + 1'b1;
      if (t_lost[2] && status.lost_tdc3 != '1) status.lost_tdc3 <= status.lost_tdc3 + 1'b1;
      if (t_lost[3] && status.lost_tdc4 != '1) status.lost_tdc4 <= status.lost_tdc4 + 1'b1;
      if (seu_evt   && status.seu_cnt != '1)   status.seu_cnt   <= status.seu_cnt + 1'b1;
    end
  end
endmodule
