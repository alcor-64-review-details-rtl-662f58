// tb_alcor_top -- chip-level testbench of the ALCOR-64 digital core, run with
// every parameter at its default (64-word input FIFOs, 128-word output FIFOs,
// 1024-clock frame timeout, 12-clock reset decoding latency).
//
// Around the chip: 256 TDC models with a known conversion length each, one
// hit generator per pixel, a test-pulse generator for the shutter, an SPI
// master, the reset line, and one link monitor per column that decodes the
// serial output and checks every frame (format, CRC, frame numbering, event
// column and fine time).
//
// Sequence: hard reset through the reset line (a written register must read
// back 0), configuration of all 272 registers with auto increment, align
// commas, Start, low-rate hits in the four pixel modes (columns 0..4), hits
// inside and outside the shutter window (column 7), a flood with busy TDCs
// (column 5) and full pixel buffers (column 6) across a New Orbit, a frame
// ended by coarse-counter rollover, drain, status register reads and an upset
// in an End of Column state register. Every word the low-rate columns must
// produce is counted here and compared with what their links delivered. Each
// mechanism is counted; one that never happened is a failure.
module tb_alcor_top;
  import alcor_pkg::*;
  import tb_alcor_stim_pkg::*;

  logic clk = 1'b0;
  logic por_n, rst_line, tp_in, sck, cs_n, mosi, miso;
  logic [7:0][7:0]      disc1, disc2;
  logic [7:0][7:0][3:0] tdc_start, tdc_busy;
  logic [7:0]           ddr_out;
  int checks = 0, failures = 0;

  alcor_top dut (
    .clk(clk), .por_n(por_n), .rst_line(rst_line), .tp_in(tp_in),
    .disc1(disc1), .disc2(disc2), .tdc_start(tdc_start), .tdc_busy(tdc_busy),
    .spi_sck(sck), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso), .ddr_out(ddr_out));

  always #5 clk = ~clk;

  for (genvar c = 0; c < 8; c++) begin : g_c
    for (genvar p = 0; p < 8; p++) begin : g_p
      for (genvar t = 0; t < 4; t++) begin : g_t
        alcor_tdc_model u_tdc (.clk(clk), .start(tdc_start[c][p][t]), .dur(tdc_dur(c, p, t)),
                               .busy(tdc_busy[c][p][t]));
      end
    end
  end

  // ---------------- link monitors ----------------
  int m_checks[8], m_fail[8], m_frames[8], m_events[8], m_idle[8], m_align[8], m_roll[8];
  int m_zero[8], m_stat[8], m_inl[8], m_outl[8], m_ltdc[8], m_lev[8];
  for (genvar c = 0; c < 8; c++) begin : g_mon
    alcor_link_monitor #(.COL(c)) u_mon (
      .clk(clk), .rst_n(dut.core_rst_n), .enable(dut.ecfg0.run), .din(ddr_out[c]),
      .checks(m_checks[c]), .failures(m_fail[c]), .frames(m_frames[c]), .events(m_events[c]),
      .idle_words(m_idle[c]), .align_words(m_align[c]), .rollover_frames(m_roll[c]),
      .zero_frames(m_zero[c]), .stat_blocks(m_stat[c]), .in_loss(m_inl[c]),
      .out_loss(m_outl[c]), .lost_tdc(m_ltdc[c]), .lost_ev(m_lev[c]));
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  task automatic finish();
    for (int c = 0; c < 8; c++) begin
      checks   += m_checks[c];
      failures += m_fail[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    finish();
  end

  // ---------------- SPI master (mode 0, 20 MHz-like: 5 clocks per bit) ----------------
  task automatic xfer(input logic [3:0] cmd, input logic [15:0] payload, output logic [15:0] rd);
    logic [23:0] w;
    w = {cmd, 4'h0, payload};
    rd = '0;
    cs_n = 1'b0;
    #25;
    for (int i = 23; i >= 0; i--) begin
      mosi = w[i];
      #25 sck = 1'b1;
      if (i < 16) rd[i] = miso;
      #25 sck = 1'b0;
    end
    #25 cs_n = 1'b1;
    #50;
  endtask

  logic [15:0] r;

  task automatic reg_write(input int a, input logic [15:0] v);
    xfer(4'b0000, 16'(a), r);
    xfer(4'b0001, v, r);
  endtask

  task automatic reg_read(input int a, output logic [15:0] v);
    xfer(4'b0000, 16'(a), r);
    xfer(4'b1001, 16'h0, v);
  endtask

  // ---------------- reset line ----------------
  int n_hard = 0, n_start = 0, n_orbit = 0;
  task automatic rst_pulse(input int clocks);
    @(negedge clk) rst_line = 1'b1;
    repeat (clocks) @(negedge clk);
    rst_line = 1'b0;
    repeat (20) @(negedge clk);
  endtask
  logic hard_prev = 1'b0;
  always @(posedge clk) begin
    if (dut.hard_rst && !hard_prev) n_hard++;
    hard_prev <= dut.hard_rst;
    if (dut.start_p) n_start++;
    if (dut.orbit_p) n_orbit++;
  end

  // ---------------- test pulse: 60 clocks high every 200 ----------------
  int tph = 0;
  always @(negedge clk) begin
    tph   <= (tph == 199) ? 0 : tph + 1;
    tp_in <= (tph < 60);
  end

  // ---------------- hit generators ----------------
  bit gen_low = 0, flood = 0;
  int wt[8][8], ph[8][8], len[8][8];
  int exp_words[8];
  int hits_in = 0, hits_out = 0;
  int mode_hits[4];

  function automatic logic [1:0] pattern(input int c, input int k, input int l);
    case (col_mode(c))
      2'd1:    return {1'b0, k < l};                 // TOT: disc1 for l clocks
      2'd2:    return {k < 7, k < 3};                // TOT2: disc2 outlasts disc1
      2'd3:    return {k >= 3 && k < 8, k < 8};      // SR: disc2 rises 3 clocks later
      default: return {1'b0, k < 3};                 // LE
    endcase
  endfunction

  always @(negedge clk) begin
    for (int c = 0; c < 8; c++) begin
      for (int p = 0; p < 8; p++) begin
        logic [1:0] d;
        bit fl;
        fl = (c == 5 || c == 6);
        if (ph[c][p] >= 0) begin
          d = pattern(c, ph[c][p], len[c][p]);
          disc1[c][p] <= d[0];
          disc2[c][p] <= d[1];
          ph[c][p] = (ph[c][p] + 1 > len[c][p]) ? -1 : ph[c][p] + 1;
        end else if (wt[c][p] > 0) begin
          wt[c][p]--;
        end else if ((fl && flood) || (!fl && gen_low)) begin
          bit start_ok;
          start_ok = 1;
          if (c == 7) start_ok = (tph >= 5 && tph < 50) || (tph >= 70 && tph < 190);
          if (start_ok) begin
            ph[c][p]  = 0;
            len[c][p] = (col_mode(c) == 2'd1) ? $urandom_range(4, 10) :
                        (col_mode(c) == 2'd0) ? 3 : 8;
            if (fl) wt[c][p] = $urandom_range(1, 3);
            else if (c == 7) wt[c][p] = $urandom_range(100, 300);
            else wt[c][p] = $urandom_range(400, 800);
            if (!fl) begin
              mode_hits[col_mode(c)]++;
              if (c == 7) begin
                if (tph < 60) begin
                  hits_in++;
                  exp_words[c]++;
                end else begin
                  hits_out++;
                end
              end else begin
                exp_words[c] += (col_mode(c) == 2'd0) ? 1 : 2;
              end
            end
          end
        end
      end
    end
  end

  // ---------------- main sequence ----------------
  initial begin
    logic [15:0] v;
    int sum_in, sum_out, sum_roll;
    por_n = 1'b0; rst_line = 1'b0; sck = 1'b0; cs_n = 1'b1; mosi = 1'b0;
    disc1 = '0; disc2 = '0;
    for (int c = 0; c < 8; c++) begin
      exp_words[c] = 0;
      for (int p = 0; p < 8; p++) begin
        wt[c][p] = $urandom_range(0, 300);
        ph[c][p] = -1;
        len[c][p] = 3;
      end
    end
    for (int m = 0; m < 4; m++) mode_hits[m] = 0;
    #53 por_n = 1'b1;
    repeat (10) @(negedge clk);

    // hard reset clears the configuration
    reg_write(5, 16'h1234);
    reg_read(5, v);
    check(v == 16'h1234, "register written before hard reset");
    rst_pulse(28);
    reg_read(5, v);
    check(v == 16'h0000, "hard reset cleared the register");

    // all 256 pixel registers with auto increment: register 0 holds the mode
    // (and shutter enable and delay in column 7), registers 1..3 a pattern
    xfer(4'b0000, 16'h8000, r);
    for (int a = 0; a < 256; a++) begin
      int c, p, k;
      c = a / 32; p = (a / 4) % 8; k = a % 4;
      if (k == 0) xfer(4'b0001, (c == 7) ? 16'({4'(p * 2), 1'b1, 2'b00}) : 16'(col_mode(c)), r);
      else        xfer(4'b0001, 16'(a * 257) ^ 16'h5A00, r);
    end
    // EoC registers: en_code, force_align, stat_en, run; column shutter delays
    xfer(4'b0000, 16'h8100, r);
    xfer(4'b0001, 16'h000F, r);
    xfer(4'b0001, 16'h4321, r);
    xfer(4'b0001, 16'h8765, r);
    reg_read((3 * 8 + 2) * 4 + 1, v);
    check(v == (16'(((3 * 8 + 2) * 4 + 1) * 257) ^ 16'h5A00), "pixel register read back");
    reg_read((7 * 8 + 3) * 4, v);
    check(v == 16'h0034, "column 7 shutter configuration read back");
    reg_read(257, v);
    check(v == 16'h4321, "EoC register read back");
    repeat (300) @(negedge clk);
    reg_write(256, 16'h000B);      // align commas off
    repeat (300) @(negedge clk);

    // Start, then low-rate hits
    rst_pulse(18);
    gen_low = 1;
    repeat (4000) @(negedge clk);
    rst_pulse(10);                 // New Orbit
    repeat (1000) @(negedge clk);
    flood = 1;
    repeat (3000) @(negedge clk);
    rst_pulse(10);
    repeat (2000) @(negedge clk);
    flood = 0;
    repeat (33500) @(negedge clk); // the coarse counter rolls over in this frame
    rst_pulse(10);
    gen_low = 0;
    repeat (2000) @(negedge clk);
    rst_pulse(10);
    repeat (3000) @(negedge clk);
    rst_pulse(10);
    repeat (3000) @(negedge clk);

    // status registers
    xfer(4'b1111, 16'h0, v);
    check(v[13] && v[14], "EoC status: OUT FIFO loss flagged in columns 5 and 6");
    check(v[5] || v[6], "EoC status: IN FIFO loss flagged");
    check(v[4:0] == 5'h0 && v[7] == 1'b0 && v[12:8] == 5'h0 && v[15] == 1'b0,
          "EoC status: no loss in the low-rate columns");
    xfer(4'b1110, 16'h0, v);
    check(v == 16'h0, "no upsets before injection");
    @(negedge clk);
    dut.g_col[0].u_eoc.u_f1.cw_q[1] = ~dut.g_col[0].u_eoc.u_f1.cw_q[1];
    repeat (5) @(negedge clk);
    xfer(4'b1110, 16'h0, v);
    check(v == 16'h1, "upset counted in the Rad error register");

    // ---------------- verdict ----------------
    sum_in = 0; sum_out = 0; sum_roll = 0;
    for (int c = 0; c < 8; c++) begin
      sum_in += m_inl[c];
      sum_out += m_outl[c];
      if (m_roll[c] > 0) sum_roll++;
      check(m_frames[c] >= 6, $sformatf("column %0d: frames received", c));
      check(m_idle[c] > 0, $sformatf("column %0d: idle commas", c));
      check(m_align[c] > 0, $sformatf("column %0d: align commas", c));
      check(m_zero[c] > 0, $sformatf("column %0d: frame 0 after Start", c));
      check(m_stat[c] == m_frames[c], $sformatf("column %0d: status words in every frame", c));
      if (c != 5 && c != 6) begin
        check(m_events[c] == exp_words[c],
              $sformatf("column %0d: %0d words received, %0d expected", c, m_events[c], exp_words[c]));
        check(m_inl[c] == 0 && m_outl[c] == 0 && m_ltdc[c] == 0 && m_lev[c] == 0,
              $sformatf("column %0d: nothing lost", c));
      end
    end
    $display("mechanisms: hard=%0d start=%0d orbit=%0d rollover_cols=%0d", n_hard, n_start, n_orbit, sum_roll);
    $display("hits per mode LE/TOT/TOT2/SR: %0d %0d %0d %0d; shutter in/out %0d/%0d",
             mode_hits[0], mode_hits[1], mode_hits[2], mode_hits[3], hits_in, hits_out);
    $display("col5 lost_tdc=%0d col6 lost_ev=%0d in_loss=%0d out_loss=%0d",
             m_ltdc[5], m_lev[6], sum_in, sum_out);
    for (int c = 0; c < 8; c++)
      $display("col %0d: frames=%0d events=%0d expected=%0d", c, m_frames[c], m_events[c], exp_words[c]);
    check(n_hard == 1, "hard reset happened once");
    check(n_start == 1, "Start happened once");
    check(n_orbit == 5, "five New Orbits");
    check(sum_roll == 8, "a frame ended by rollover in every column");
    for (int m = 0; m < 4; m++) check(mode_hits[m] > 0, $sformatf("hits in mode %0d", m));
    check(hits_in > 0 && hits_out > 0, "hits inside and outside the shutter window");
    check(m_ltdc[5] > 0, "hits lost on busy TDCs");
    check(m_lev[6] > 0, "words lost on full pixel buffers");
    check(sum_in > 0, "IN FIFO loss");
    check(sum_out > 0, "OUT FIFO loss");
    finish();
  end
endmodule
