// tb_alcor_eoc_column -- self-checking testbench of the End of Column block.
// A behavioural column (8 pixels with word queues, DVAL snapshot on freeze,
// top-first read) feeds the DUT, which is built with small FIFOs (8 in, 16
// out) and a short timeout (2^3 ticks of clk/2 = 16 clocks). A monitor pops the
// output FIFO and parses every frame: K28.0, frame number, events, K28.2,
// optional K28.3 + 8 pixel status words, EoC status, K28.4, CRC. The CRC is
// recomputed bit by bit here. Each injected word carries a serial number and
// the index of its frame, so the monitor checks that every event lands in the
// right frame and is received at most once. Scenarios: frames with and without
// status words, late words of an ended frame accepted during the timeout, End
// of Rollover status value, output FIFO full (events dropped, OUT loss), input
// FIFO full (IN loss), and a final count: received + IN loss + OUT loss ==
// injected. Each mechanism must be seen at least once.
module tb_alcor_eoc_column;
  import alcor_pkg::*;
  localparam logic [2:0] COL = 3'd5;
  localparam int TW = 3;

  logic clk = 1'b0;
  logic rst_n;
  logic col_busy, col_dval, col_wr_n, freeze, rd_en;
  logic [29:0] col_data;
  logic run, stat_en, frame_par, end_rollover, stat_clr;
  logic [15:0] frame_num;
  logic [14:0] last_coarse;
  pix_status_t [7:0] pix_status;
  logic out_rd, out_empty, in_ovf, out_ovf, seu;
  logic [32:0] out_data;
  int checks = 0, failures = 0;

  alcor_eoc_column #(.COL_ID(COL), .IN_DEPTH(8), .OUT_DEPTH(16), .TIMEOUT_W(TW)) dut (
    .clk(clk), .rst_n(rst_n), .col_busy(col_busy), .col_dval(col_dval),
    .col_data(col_data), .col_wr_n(col_wr_n), .freeze(freeze), .rd_en(rd_en),
    .run(run), .stat_en(stat_en), .frame_par(frame_par), .frame_num(frame_num),
    .end_rollover(end_rollover), .last_coarse(last_coarse), .pix_status(pix_status),
    .stat_clr(stat_clr), .out_rd(out_rd), .out_data(out_data), .out_empty(out_empty),
    .in_ovf(in_ovf), .out_ovf(out_ovf), .seu(seu));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- behavioural pixel column ----------------
  logic [29:0] pq[8][$];
  logic [7:0]  dv;
  int          injected = 0;
  int          epoch_of[int];     // serial number -> frame index
  int          epoch = 0;

  // drive the bus half a clock after each rising edge
  always @(negedge clk) begin
    int top;
    logic any;
    top = -1;
    any = 1'b0;
    for (int p = 0; p < 8; p++) begin
      if (pq[p].size() != 0) any = 1'b1;
      if (dv[p] && top < 0) top = p;
    end
    col_busy <= any;
    col_dval <= |dv;
    col_wr_n <= !(rd_en && top >= 0);
    col_data <= (top >= 0) ? pq[top][0] : '1;
  end

  always @(posedge clk) begin
    if (freeze) begin
      for (int p = 0; p < 8; p++) dv[p] <= (pq[p].size() != 0);
    end else if (rd_en && !col_wr_n) begin
      for (int p = 0; p < 8; p++) begin
        if (dv[p]) begin
          void'(pq[p].pop_front());
          dv[p] <= 1'b0;
          break;
        end
      end
    end
  end

  // one word with a serial number (coarse) and its frame index (fine)
  task automatic inject(input int ep);
    int p;
    logic [29:0] w;
    p = $urandom_range(0, 7);
    w = {1'(ep % 2), 3'(p), 2'($urandom_range(0, 3)), 15'(injected), 9'(ep)};
    pq[p].push_back(w);
    epoch_of[injected] = ep;
    injected++;
  endtask

  // ---------------- output monitor ----------------
  typedef enum {M_HDR, M_FNUM, M_BODY, M_STAT, M_EOCST, M_CRCHDR, M_CRC} m_e;
  m_e          ms = M_HDR;
  logic        rd_on = 1'b1;
  int          frame_idx = -1;
  int          nstat;
  logic [31:0] crc_run;
  int          got[int];
  int          received = 0, in_loss_sum = 0, out_loss_sum = 0;
  int          n_eof = 0, n_stat_blocks = 0, n_crc_ok = 0, n_stat_clr = 0;
  logic [15:0] fnum_rx[int];
  logic [15:0] exp_low[int];      // expected low half of the EoC status word per frame
  logic        had_stat[int];
  time         t_eof[int];

  function automatic logic [31:0] crc_bit(input logic [31:0] c, input logic [31:0] d);
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[31] ^ d[i];
      c  = {c[30:0], 1'b0};
      if (fb) c = c ^ 32'h04C11DB7;
    end
    return c;
  endfunction

  always @(negedge clk) out_rd <= rd_on && !out_empty;

  always @(posedge clk) begin
    if (stat_clr) n_stat_clr++;
    if (out_rd && !out_empty) begin
      logic        k;
      logic [31:0] w;
      k = out_data[32];
      w = out_data[31:0];
      case (ms)
        M_HDR: begin
          checks++;
          if (!(k && w == 32'h1C1C1C1C)) begin
            failures++;
            $display("FAIL: expected frame header, got %b %h at %0t", k, w, $time);
          end else begin
            frame_idx++;
            had_stat[frame_idx] = 1'b0;
            crc_run = 32'hFFFFFFFF;
            ms = M_FNUM;
          end
        end
        M_FNUM: begin
          check(!k && w[31:16] == 16'h0, "frame number word");
          fnum_rx[frame_idx] = w[15:0];
          crc_run = crc_bit(crc_run, w);
          ms = M_BODY;
        end
        M_BODY: begin
          if (k && w == 32'h5C5C5C5C) begin
            n_eof++;
            t_eof[frame_idx] = $time;
            ms = M_STAT;
            nstat = -1;
          end else begin
            int sn;
            checks++;
            sn = int'(w[23:9]);
            if (k || w[31:29] != COL || !epoch_of.exists(sn) || got.exists(sn) ||
                epoch_of[sn] != frame_idx || int'(w[8:0]) != frame_idx) begin
              failures++;
              $display("FAIL: bad event %b %h in frame %0d at %0t", k, w, frame_idx, $time);
            end
            got[sn] = 1;
            received++;
            crc_run = crc_bit(crc_run, w);
          end
        end
        M_STAT: begin
          if (nstat < 0 && k && w == 32'h7C7C7C7C) begin
            nstat = 0;
            had_stat[frame_idx] = 1'b1;
            n_stat_blocks++;
          end else if (nstat >= 0 && nstat < 8) begin
            check(!k && w == {COL, 3'(7 - nstat), pix_status[7 - nstat]}, "pixel status word");
            crc_run = crc_bit(crc_run, w);
            nstat++;
          end else begin
            check(!k, "EoC status word");
            check(w[15:0] == exp_low[frame_idx], "EoC status time field");
            in_loss_sum  += int'(w[23:16]);
            out_loss_sum += int'(w[31:24]);
            crc_run = crc_bit(crc_run, w);
            ms = M_CRCHDR;
          end
        end
        M_CRCHDR: begin
          check(k && w == 32'h9C9C9C9C, "CRC header");
          ms = M_CRC;
        end
        M_CRC: begin
          check(!k && w == crc_run, "frame CRC");
          if (!k && w == crc_run) n_crc_ok++;
          ms = M_HDR;
        end
        default: ms = M_HDR;
      endcase
    end
  end

  // new frame: flip the parity, set the frame number and the reason
  task automatic new_frame(input logic rollover, input logic [14:0] lc);
    @(negedge clk);
    exp_low[epoch] = rollover ? 16'h7FFF : {1'b0, lc};
    end_rollover = rollover;
    last_coarse  = lc;
    frame_par    = ~frame_par;
    frame_num    = frame_num + 16'd1;
    epoch++;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  time t_flip0;

  initial begin
    rst_n = 1'b0; run = 1'b0; stat_en = 1'b1; frame_par = 1'b0; frame_num = 16'd100;
    end_rollover = 1'b0; last_coarse = '0; dv = '0;
    for (int p = 0; p < 8; p++) pix_status[p] = pix_status_t'($urandom);
    #22 rst_n = 1'b1;
    idle(10);
    check(out_empty, "nothing sent before run");
    @(negedge clk) run = 1'b1;

    // frame 0: 10 words, then 2 late words during the timeout
    for (int i = 0; i < 10; i++) begin
      inject(0);
      idle($urandom_range(1, 6));
    end
    idle(10);
    new_frame(1'b0, 15'h0ABC);
    t_flip0 = $time;
    for (int i = 0; i < 5; i++) inject(1);
    idle(3);
    inject(0);
    inject(0);
    idle(80);
    check(n_eof == 1 && had_stat[0], "frame 0 closed with status words");
    check(fnum_rx[0] == 16'd100, "frame 0 number");
    check(t_eof.exists(0) && t_eof[0] - t_flip0 >= 16 * 10, "end of frame after the timeout");

    // frame 1 ends by rollover; status words disabled from now on
    stat_en = 1'b0;
    new_frame(1'b1, 15'h0);
    idle(60);
    check(n_eof == 2 && !had_stat[1] && fnum_rx[1] == 16'd101, "frame 1 without status words");

    // frame 2: reader stalled, too many events -> OUT loss; frame 3 then
    // fills its input FIFO while the frame-2 trailer waits -> IN loss
    rd_on = 1'b0;
    for (int i = 0; i < 30; i++) inject(2);
    idle(60);
    new_frame(1'b0, 15'h1234);
    for (int i = 0; i < 20; i++) inject(3);
    idle(80);
    rd_on = 1'b1;
    idle(100);
    new_frame(1'b0, 15'h0042);
    for (int i = 0; i < 4; i++) begin
      inject(4);
      idle(3);
    end
    idle(20);
    new_frame(1'b1, 15'h0);
    idle(150);

    check(frame_idx >= 4 && n_eof >= 5, "five frames closed");
    check(n_crc_ok == n_eof, "every frame CRC matches");
    check(received + in_loss_sum + out_loss_sum == injected, "received + lost == injected");
    check(out_loss_sum > 0, "OUT FIFO loss seen");
    check(in_loss_sum > 0, "IN FIFO loss seen");
    check(n_stat_blocks == 1, "one status block (stat_en only in frame 0)");
    check(n_stat_clr == n_eof, "status clear once per frame");
    check(!seu, "no upset flagged");
    $display("frames=%0d injected=%0d received=%0d in_loss=%0d out_loss=%0d",
             frame_idx + 1, injected, received, in_loss_sum, out_loss_sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
