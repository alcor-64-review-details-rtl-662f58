// tb_alcor_pixel -- self-checking testbench of the pixel logic. Two pixels
// (IDs 0 at the top and 5 below it) share a column bus, each with four TDC
// models of known conversion length. The testbench plays the End of Column
// (freeze, then read until DVAL is released) and compares every word read
// with a word predicted from its own clock count, TDC turn and conversion
// lengths. Covered: LE, TOT, TOT2 and SR modes, round-robin TDC use, a hit lost
// on a busy TDC, words lost on a full buffer, shutter gating, frame parity
// after frame_clr, top-first bus order, the freeze snapshot, status counters
// and their clear, and an upset in the Hamming-protected hit FSM.
module tb_alcor_pixel;
  import alcor_pkg::*;
  logic clk = 1'b0;
  logic rst_n, frame_clr, freeze, rd_en, stat_clr;
  logic [1:0] disc1, disc2, shutter, cfg_we, busy, dval, wr_n;
  logic [1:0][3:0] tdc_start, tdc_busy;
  logic [1:0] cfg_addr;
  logic [15:0] cfg_wdata;
  logic [1:0][3:0][15:0] cfg_q;
  logic [1:0][29:0] data;
  pix_status_t [1:0] status;
  logic [1:0][14:0] coarse_q;
  logic [1:0][3:0][8:0] dur;
  int checks = 0, failures = 0;

  localparam logic [2:0] ID [2] = '{3'd0, 3'd5};

  alcor_pixel #(.PIX_ID(3'd0)) p0 (
    .clk(clk), .rst_n(rst_n), .frame_clr(frame_clr),
    .disc1(disc1[0]), .disc2(disc2[0]), .shutter_win(shutter[0]),
    .tdc_start(tdc_start[0]), .tdc_busy(tdc_busy[0]),
    .cfg_we(cfg_we[0]), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .cfg_q(cfg_q[0]),
    .freeze(freeze), .rd_en(rd_en), .busy_up(1'b0), .busy_dn(busy[0]),
    .dval_up(1'b0), .dval_dn(dval[0]), .data_up('1), .wr_up_n(1'b1),
    .data_dn(data[0]), .wr_dn_n(wr_n[0]), .stat_clr(stat_clr), .status(status[0]),
    .coarse_q(coarse_q[0]));
  alcor_pixel #(.PIX_ID(3'd5)) p1 (
    .clk(clk), .rst_n(rst_n), .frame_clr(frame_clr),
    .disc1(disc1[1]), .disc2(disc2[1]), .shutter_win(shutter[1]),
    .tdc_start(tdc_start[1]), .tdc_busy(tdc_busy[1]),
    .cfg_we(cfg_we[1]), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .cfg_q(cfg_q[1]),
    .freeze(freeze), .rd_en(rd_en), .busy_up(busy[0]), .busy_dn(busy[1]),
    .dval_up(dval[0]), .dval_dn(dval[1]), .data_up(data[0]), .wr_up_n(wr_n[0]),
    .data_dn(data[1]), .wr_dn_n(wr_n[1]), .stat_clr(stat_clr), .status(status[1]),
    .coarse_q(coarse_q[1]));

  for (genvar p = 0; p < 2; p++) begin : g_p
    for (genvar t = 0; t < 4; t++) begin : g_t
      alcor_tdc_model u_tdc (.clk(clk), .start(tdc_start[p][t]), .dur(dur[p][t]), .busy(tdc_busy[p][t]));
    end
  end

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference time base: mirrors the 15-bit coarse counter and the parity
  logic [14:0] tcnt;
  logic        tpar;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt <= '0;
      tpar <= 1'b0;
    end else if (frame_clr) begin
      tcnt <= '0;
      tpar <= ~tpar;
    end else begin
      tcnt <= tcnt + 1'b1;
    end
  end

  logic [29:0] exp_q[2][$];   // expected words per pixel
  logic [29:0] got_q[$];
  int          got_pix[$];
  int          turn[2];
  logic [2:0]  upset;

  function automatic logic [29:0] mkword(input int p, input int t, input logic [14:0] c);
    return {tpar, ID[p], 2'(t), c, dur[p][t]};
  endfunction

  // one edge timed by pixel p (the edge is seen on the next rising clock)
  task automatic expect_edge(input int p, input bit lost);
    if (!lost) exp_q[p].push_back(mkword(p, turn[p], tcnt));
    turn[p] = (turn[p] + 1) % 4;
  endtask

  task automatic cfg(input int p, input logic [1:0] a, input logic [15:0] v);
    @(negedge clk);
    cfg_we = '0;
    cfg_we[p] = 1'b1;
    cfg_addr = a;
    cfg_wdata = v;
    @(negedge clk);
    cfg_we = '0;
  endtask

  // End of Column emulation: freeze, read until DVAL is released, and repeat
  // while any pixel still holds data (one word per pixel per snapshot)
  task automatic readout();
    int guard = 0;
    int scans = 0;
    do begin
      @(negedge clk) freeze = 1'b1;
      @(negedge clk) freeze = 1'b0; rd_en = 1'b1;
      #1;
      while (dval[1] && guard < 40) begin
        if (!wr_n[1]) begin
          got_q.push_back(data[1]);
          got_pix.push_back(data[1][28:26] == 3'd5 ? 1 : 0);
        end
        @(negedge clk);
        #1;
        guard++;
      end
      rd_en = 1'b0;
      scans++;
    end while (busy[1] && scans < 8);
  endtask

  task automatic compare(input string what);
    int n;
    n = got_q.size();
    for (int i = 0; i < n; i++) begin
      int p;
      p = got_pix[i];
      checks++;
      if (exp_q[p].size() == 0 || exp_q[p][0] != got_q[i]) begin
        failures++;
        $display("FAIL: %s word %0d got %h expected %h", what, i, got_q[i],
                 exp_q[p].size() ? exp_q[p][0] : 30'h0);
      end
      if (exp_q[p].size()) void'(exp_q[p].pop_front());
    end
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, {what, ": all expected words read"});
    got_q.delete();
    got_pix.delete();
    exp_q[0].delete();
    exp_q[1].delete();
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; frame_clr = 1'b0; freeze = 1'b0; rd_en = 1'b0; stat_clr = 1'b0;
    disc1 = '0; disc2 = '0; shutter = '0; cfg_we = '0; cfg_addr = '0; cfg_wdata = '0;
    turn[0] = 0; turn[1] = 0;
    for (int p = 0; p < 2; p++) for (int t = 0; t < 4; t++) dur[p][t] = 9'(3 + 2 * t + 5 * p);
    #22 rst_n = 1'b1;
    idle(3);

    // ---- LE mode: 6 hits on pixel 0, 3 on pixel 5 ----
    cfg(0, 2'd0, 16'h0000);
    cfg(1, 2'd0, 16'h0000);
    check(cfg_q[0][0] == 16'h0 && cfg_q[1][0] == 16'h0, "configuration written");
    for (int i = 0; i < 3; i++) begin
      @(negedge clk) disc1 = 2'b11; expect_edge(0, 0); expect_edge(1, 0);
      @(negedge clk) disc1 = 2'b00;
      idle(25);
      readout();
    end
    compare("LE");
    // top pixel first: hits in both, read in one snapshot
    @(negedge clk) disc1 = 2'b11; expect_edge(0, 0); expect_edge(1, 0);
    @(negedge clk) disc1 = 2'b00;
    idle(30);
    readout();
    check(got_pix.size() == 2 && got_pix[0] == 0 && got_pix[1] == 1, "top pixel read first");
    compare("bus order");

    // ---- TOT mode on pixel 0 ----
    cfg(0, 2'd0, {14'h0, MODE_TOT});
    @(negedge clk) disc1[0] = 1'b1; expect_edge(0, 0);
    idle(10);
    @(negedge clk) disc1[0] = 1'b0; expect_edge(0, 0);
    idle(30);
    readout();
    check(got_q.size() == 2, "TOT: 2 words per hit");
    compare("TOT");

    // ---- TOT2 mode: disc1 rise, disc2 fall ----
    cfg(0, 2'd0, {14'h0, MODE_TOT2});
    @(negedge clk) disc1[0] = 1'b1; disc2[0] = 1'b1; expect_edge(0, 0);
    idle(4);
    @(negedge clk) disc1[0] = 1'b0;
    idle(8);
    @(negedge clk) disc2[0] = 1'b0; expect_edge(0, 0);
    idle(30);
    readout();
    compare("TOT2");

    // ---- SR mode: disc1 rise, disc2 rise ----
    cfg(0, 2'd0, {14'h0, MODE_SR});
    @(negedge clk) disc1[0] = 1'b1; expect_edge(0, 0);
    idle(6);
    @(negedge clk) disc2[0] = 1'b1; expect_edge(0, 0);
    idle(3);
    @(negedge clk) disc1[0] = 1'b0; disc2[0] = 1'b0;
    idle(30);
    readout();
    compare("SR");

    // ---- hit lost on a busy TDC (LE, long conversions) ----
    cfg(0, 2'd0, {14'h0, MODE_LE});
    @(negedge clk) stat_clr = 1'b1;
    @(negedge clk) stat_clr = 1'b0;
    for (int t = 0; t < 4; t++) dur[0][t] = 9'd60;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk) disc1[0] = 1'b1; expect_edge(0, i == 4);
      @(negedge clk) disc1[0] = 1'b0;
    end
    begin
      logic [3:0] lt [4];
      int li;
      lt = '{status[0].lost_tdc1, status[0].lost_tdc2, status[0].lost_tdc3, status[0].lost_tdc4};
      li = (turn[0] + 3) % 4;   // the TDC whose turn it was for the fifth hit
      check(lt[li] == 4'd1 && lt[0] + lt[1] + lt[2] + lt[3] == 4'd1, "lost hit counted on the busy TDC only");
    end
    idle(80);
    readout();
    compare("busy TDC");

    // ---- output buffer full: 6 conversions, no readout ----
    for (int t = 0; t < 4; t++) dur[0][t] = 9'd2;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk) disc1[0] = 1'b1; expect_edge(0, i >= 4);
      @(negedge clk) disc1[0] = 1'b0;
      idle(8);
    end
    check(status[0].lost_ev == 6'd2, "two words lost on a full buffer");
    readout();
    check(got_q.size() == 4, "buffer depth 4");
    compare("buffer full");

    // ---- shutter ----
    cfg(0, 2'd0, 16'h0004);   // LE, shutter enabled
    @(negedge clk) disc1[0] = 1'b1;      // outside the window: ignored
    @(negedge clk) disc1[0] = 1'b0;
    idle(3);
    @(negedge clk) shutter[0] = 1'b1; disc1[0] = 1'b1; expect_edge(0, 0);
    @(negedge clk) disc1[0] = 1'b0; shutter[0] = 1'b0;
    idle(20);
    readout();
    compare("shutter");

    // ---- frame parity after frame_clr ----
    @(negedge clk) frame_clr = 1'b1;
    @(negedge clk) frame_clr = 1'b0;
    check(coarse_q[0] == 15'd0 && coarse_q[1] == 15'd0, "coarse counters cleared");
    @(negedge clk) shutter[0] = 1'b1; disc1[0] = 1'b1; expect_edge(0, 0);
    @(negedge clk) disc1[0] = 1'b0; shutter[0] = 1'b0;
    idle(20);
    readout();
    check(got_q.size() == 1 && got_q[0][29] == 1'b1, "parity bit set in the new frame");
    compare("parity");

    // ---- freeze snapshot: a word written after freeze waits for the next scan ----
    cfg(0, 2'd0, 16'h0000);
    @(negedge clk) disc1[1] = 1'b1; expect_edge(1, 0);
    @(negedge clk) disc1[1] = 1'b0;
    idle(20);
    @(negedge clk) freeze = 1'b1; disc1[0] = 1'b1;
    @(negedge clk) freeze = 1'b0; disc1[0] = 1'b0;
    check(dval[1] && busy[1], "pixel 5 valid after freeze");
    rd_en = 1'b1;
    #1;
    check(!wr_n[1] && data[1][28:26] == 3'd5, "pixel 5 word on the bus");
    @(negedge clk);
    check(!dval[1], "DVAL released after the snapshot");
    rd_en = 1'b0;
    void'(exp_q[1].pop_front());
    expect_edge(0, 1);
    idle(20);
    check(busy[1], "pixel 0 still holds its later word");
    got_q.delete(); got_pix.delete();
    readout();
    check(got_q.size() == 1 && got_pix[0] == 0, "later word read in the next scan");
    got_q.delete(); got_pix.delete(); exp_q[0].delete();

    // ---- Hamming upset on the hit FSM and status clear ----
    @(negedge clk) stat_clr = 1'b1;
    @(negedge clk) stat_clr = 1'b0;
    check(status[0] == '0, "status cleared");
    upset = p0.u_hit.cw_q ^ 3'b010;
    p0.u_hit.cw_q = upset;     // one flipped bit, rewritten at the next clock
    @(negedge clk);
    @(negedge clk);
    check(status[0].seu_cnt == 4'd1, "upset counted");
    check(!p0.u_hit.seu, "hit FSM corrected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
