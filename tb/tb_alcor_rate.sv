// tb_alcor_rate -- data-rate testbench of the ALCOR-64 digital core: all 64
// pixels in leading-edge mode, each hit at an average of 2 MHz, so every
// column carries 16 million hits per second. The frames hold headers and no
// pixel status words. New Orbits come every 5044 clocks (12.8 us at 394.1
// MHz, one EIC orbit). At this load the design must lose nothing.
//
// The chip runs with every parameter at its default. Time is counted in
// clocks, so the period used here does not matter: a rate in MHz is
// hits / clocks * 394.1. Each pixel waits a random 0..384 clocks between its
// 5-clock hits (197 clocks on average, or 2.0 MHz). The measured rate of each
// column is checked to lie between 15.5 and 16.5 MHz.
//
// Checks:
// - The link monitors check the frame format, CRC, frame numbering, column
//   and fine time of every frame, one monitor per column.
// - The words each column delivers equal the hits generated there.
// - No loss is reported in any EoC status word.
// - The EoC status register shows no loss flag.
module tb_alcor_rate;
  import alcor_pkg::*;
  import tb_alcor_stim_pkg::*;

  localparam int ORBIT  = 5044;   // clocks per EIC orbit
  localparam int ORBITS = 16;

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
        alcor_tdc_model u_tdc (.clk(clk), .start(tdc_start[c][p][t]),
                               .dur(tdc_dur(c, p, t, 1'b1)), .busy(tdc_busy[c][p][t]));
      end
    end
  end

  // ---------------- link monitors ----------------
  int m_checks[8], m_fail[8], m_frames[8], m_events[8], m_idle[8], m_align[8], m_roll[8];
  int m_zero[8], m_stat[8], m_inl[8], m_outl[8], m_ltdc[8], m_lev[8];
  for (genvar c = 0; c < 8; c++) begin : g_mon
    alcor_link_monitor #(.COL(c), .FAST(1'b1)) u_mon (
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
    #3_000_000;
    failures++;
    $display("watchdog expired");
    finish();
  end

  // ---------------- SPI master (mode 0, 5 clocks per bit) ----------------
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

  task automatic rst_pulse(input int clocks);
    @(negedge clk) rst_line = 1'b1;
    repeat (clocks) @(negedge clk);
    rst_line = 1'b0;
  endtask

  // ---------------- hit generators ----------------
  bit  gen = 0;
  int  wt[8][8], ph[8][8];
  int  hits[8];
  longint gen_clocks = 0;

  always @(negedge clk) begin
    if (gen) gen_clocks++;
    for (int c = 0; c < 8; c++) begin
      for (int p = 0; p < 8; p++) begin
        if (ph[c][p] >= 0) begin
          disc1[c][p] <= (ph[c][p] < 3);
          ph[c][p] = (ph[c][p] + 1 > 3) ? -1 : ph[c][p] + 1;
        end else if (wt[c][p] > 0) begin
          wt[c][p]--;
        end else if (gen) begin
          ph[c][p] = 0;
          wt[c][p] = $urandom_range(0, 384);
          hits[c]++;
        end
      end
    end
  end

  // ---------------- sequence ----------------
  initial begin
    logic [15:0] v;
    por_n = 1'b0; rst_line = 1'b0; sck = 1'b0; cs_n = 1'b1; mosi = 1'b0; tp_in = 1'b0;
    disc1 = '0; disc2 = '0;
    for (int c = 0; c < 8; c++) begin
      hits[c] = 0;
      for (int p = 0; p < 8; p++) begin
        wt[c][p] = $urandom_range(0, 384);
        ph[c][p] = -1;
      end
    end
    #53 por_n = 1'b1;
    repeat (10) @(negedge clk);

    // pixel registers stay at their reset value 0: LE mode, shutter off.
    // EoC: encoding on, align commas, no status words, run
    xfer(4'b0000, 16'd256, r);
    xfer(4'b0001, 16'h000D, r);
    repeat (300) @(negedge clk);
    xfer(4'b0001, 16'h0009, r);
    repeat (300) @(negedge clk);

    rst_pulse(18);                          // Start
    gen = 1;
    for (int o = 0; o < ORBITS; o++) begin
      repeat (ORBIT - 10) @(negedge clk);
      rst_pulse(10);                        // New Orbit
    end
    gen = 0;
    repeat (400) @(negedge clk);
    rst_pulse(10);                          // closes the frame holding the last hits
    repeat (6000) @(negedge clk);

    xfer(4'b1111, 16'h0, v);
    check(v == 16'h0, "EoC status register: no loss flag");
    for (int c = 0; c < 8; c++) begin
      real mhz;
      mhz = real'(hits[c]) / real'(gen_clocks) * 394.1;
      $display("column %0d: %0d hits, %0.2f MHz, %0d words received, %0d frames",
               c, hits[c], mhz, m_events[c], m_frames[c]);
      check(mhz > 15.5 && mhz < 16.5, $sformatf("column %0d: rate %0.2f MHz", c, mhz));
      check(m_events[c] == hits[c], $sformatf("column %0d: every hit received", c));
      check(m_inl[c] == 0 && m_outl[c] == 0, $sformatf("column %0d: no FIFO loss", c));
      check(m_frames[c] >= ORBITS + 1, $sformatf("column %0d: one frame per orbit", c));
      check(m_stat[c] == 0, $sformatf("column %0d: no status words", c));
    end
    finish();
  end
endmodule
