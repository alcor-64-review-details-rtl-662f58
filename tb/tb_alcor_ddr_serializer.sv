// tb_alcor_ddr_serializer -- self-checking testbench of the DDR serializer.
// A queue stands in for the output FIFO. The serial line is sampled in both
// clock phases, aligned on the first K28.5 comma, decoded with a reference
// 8b/10b decoder and regrouped into 33-bit words (byte 0 first). Checks: idle
// commas while the FIFO is empty, every pushed word received in order with its
// K flag, one FIFO read every 20 clocks, K28.1 align words while force_align is
// set and no FIFO read during that time.
module tb_alcor_ddr_serializer;
  import tb_8b10b_pkg::*;
  logic clk = 1'b0;
  logic rst_n, enable, en_code, force_align, fifo_rd, dout;
  logic [32:0] fifo_data;
  logic [32:0] q[$];
  logic [32:0] expect_q[$];
  int checks = 0, failures = 0;

  alcor_ddr_serializer dut (.clk(clk), .rst_n(rst_n), .enable(enable), .en_code(en_code),
    .force_align(force_align), .fifo_empty(q.size() == 0), .fifo_data(fifo_data),
    .fifo_rd(fifo_rd), .dout(dout));

  assign fifo_data = (q.size() != 0) ? q[0] : 33'h0;

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

  // FIFO pops and read spacing
  longint cyc = 0, last_rd = -1;
  int     rd_count = 0, align_reads = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fifo_rd) begin
      if (force_align) align_reads++;
      if (last_rd >= 0) begin
        checks++;
        if ((cyc - last_rd) % 20 != 0) begin
          failures++;
          $display("FAIL: FIFO read spacing %0d", cyc - last_rd);
        end
      end
      last_rd = cyc;
      rd_count++;
      #1 void'(q.pop_front());   // after the DUT has sampled the head word
    end
  end

  // serial capture: high phase after the rising edge, low phase after the falling edge
  logic [9:0] win = '0;
  int  nbits = 0;
  bit  aligned = 0;
  int  phase = 0;
  logic [31:0] wacc;
  logic [3:0]  kacc;
  int  nbyte = 0;
  int  idle_words = 0, align_words = 0, data_seen = 0;

  task automatic take_bit(input logic b);
    logic [9:0] d;
    win = {win[8:0], b};
    nbits++;
    if (!aligned) begin
      if (win == 10'b0011111010 || win == 10'b1100000101) begin
        aligned = 1;
        phase = 0;
        wacc = 32'hBC00_0000;   // the comma just seen is byte 0 of an idle word
        kacc = 4'b1000;
        nbyte = 1;
      end
      return;
    end
    phase++;
    if (phase == 10) begin
      phase = 0;
      d = decode(win);
      checks++;
      if (!d[9]) begin
        failures++;
        $display("FAIL: invalid symbol %b", win);
      end
      wacc = {d[7:0], wacc[31:8]};
      kacc = {d[8], kacc[3:1]};
      nbyte++;
      if (nbyte == 4) begin
        nbyte = 0;
        checks++;
        if (!(kacc == 4'b0000 || kacc == 4'b1111)) begin
          failures++;
          $display("FAIL: mixed K flags in a word");
        end
        if (kacc == 4'b1111 && wacc == 32'hBCBCBCBC) idle_words++;
        else if (kacc == 4'b1111 && wacc == 32'h3C3C3C3C) align_words++;
        else begin
          data_seen++;
          checks++;
          if (expect_q.size() == 0 || expect_q[0] != {kacc[0], wacc}) begin
            failures++;
            $display("FAIL: received %b %h, expected %h", kacc[0], wacc,
                     expect_q.size() ? expect_q[0] : 33'h0);
          end
          if (expect_q.size() != 0) void'(expect_q.pop_front());
        end
      end
    end
  endtask

  always @(posedge clk) begin
    #2 if (rst_n && enable) take_bit(dout);
  end
  always @(negedge clk) begin
    #2 if (rst_n && enable) take_bit(dout);
  end

  initial begin
    logic [32:0] w;
    rst_n = 1'b0; enable = 1'b0; en_code = 1'b1; force_align = 1'b0;
    #22 rst_n = 1'b1;
    @(negedge clk) enable = 1'b1;
    repeat (200) @(negedge clk);
    check(aligned, "aligned on idle comma");
    check(idle_words > 5, "idle words while FIFO empty");
    check(data_seen == 0, "no data while FIFO empty");
    for (int i = 0; i < 30; i++) begin
      if (i % 7 == 3) w = {1'b1, {4{8'h1C}}};
      else            w = {1'b0, 32'($urandom)};
      q.push_back(w);
      expect_q.push_back(w);
    end
    repeat (30 * 20 + 100) @(negedge clk);
    check(q.size() == 0, "FIFO drained");
    check(expect_q.size() == 0, "all words received");
    check(data_seen == 30, "30 data words");
    check(rd_count == 30, "30 FIFO reads");
    // align commas
    force_align = 1'b1;
    q.push_back({1'b0, 32'h1234_5678});
    expect_q.push_back({1'b0, 32'h1234_5678});
    repeat (200) @(negedge clk);
    check(align_words > 5, "K28.1 align words while forced");
    check(align_reads == 0 && q.size() == 1, "FIFO not read while forced");
    force_align = 1'b0;
    repeat (100) @(negedge clk);
    check(expect_q.size() == 0, "word sent after align");
    $display("idle=%0d align=%0d data=%0d", idle_words, align_words, data_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
