// tb_enc_8b10b -- self-checking testbench of enc_8b10b. Checks known symbols
// (K28.5 in both disparities, D21.5, D0.0), then encodes random data bytes and
// all K28.y codes and checks each symbol decodes back, has 4, 5 or 6 ones, keeps
// the running disparity legal, never makes a run of more than 5 equal bits and
// never forms a comma sequence across data symbols (the reason for D.x.A7).
// Also checks the bypass mode.
module tb_enc_8b10b;
  import tb_8b10b_pkg::*;
  logic clk = 1'b0;
  logic rst_n, en, en_encoding, k, rd_pos;
  logic [7:0] din;
  logic [9:0] dout;
  int checks = 0, failures = 0;

  enc_8b10b dut (.clk(clk), .rst_n(rst_n), .en(en), .en_encoding(en_encoding), .k(k),
                 .din(din), .dout(dout), .rd_pos(rd_pos));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (din=%h k=%b dout=%b)", what, din, k, dout);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic kk, input logic [7:0] b);
    @(negedge clk); en = 1'b1; k = kk; din = b;
    @(negedge clk); en = 1'b0;
  endtask

  int rd;        // running disparity, -1 or +1
  int run_len;
  logic last_bit;
  logic [19:0] hist = '0;   // last two symbols, first-sent bit highest
  bit prev_k = 1'b1;

  task automatic stream_check(input logic kk, input logic [7:0] b);
    int ones;
    logic [9:0] dec;
    send(kk, b);
    ones = $countones(dout);
    dec  = decode(dout);
    check(dec[9] && dec[8] == kk && dec[7:0] == b, "decodes back");
    check(ones >= 4 && ones <= 6, "4..6 ones");
    if (ones == 6) begin check(rd == -1, "+2 symbol only from RD-"); rd = 1; end
    if (ones == 4) begin check(rd == 1, "-2 symbol only from RD+"); rd = -1; end
    check((rd == 1) == rd_pos, "running disparity output");
    for (int i = 9; i >= 0; i--) begin
      if (dout[i] == last_bit) run_len++;
      else run_len = 1;
      last_bit = dout[i];
      check(run_len <= 5, "run length <= 5");
    end
    // no comma (0011111 / 1100000) may start or end inside data symbols
    hist = {hist[9:0], dout};
    if (!kk && !prev_k) begin
      for (int j = 0; j < 10; j++) begin
        check(hist[j +: 7] != 7'b0011111 && hist[j +: 7] != 7'b1100000, "no comma in data");
      end
    end
    prev_k = kk;
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; en_encoding = 1'b1; k = 1'b0; din = '0;
    #12 rst_n = 1'b1;
    send(1'b1, 8'hBC);
    check(dout == 10'b0011111010, "K28.5 RD-");
    send(1'b1, 8'hBC);
    check(dout == 10'b1100000101, "K28.5 RD+");
    send(1'b0, 8'hB5);
    check(dout == 10'b1010101010, "D21.5");
    send(1'b0, 8'h00);
    check(dout == 10'b1001110100, "D0.0 RD-, disparity kept");
    send(1'b0, 8'h00);
    check(dout == 10'b1001110100, "D0.0 RD-");
    rd = rd_pos ? 1 : -1;
    run_len = 0;
    last_bit = 1'b0;
    for (int y = 0; y < 8; y++) stream_check(1'b1, {3'(y), 5'd28});
    for (int i = 0; i < 3000; i++) stream_check(1'b0, 8'($urandom));
    for (int i = 0; i < 256; i++) stream_check(1'b0, 8'(i));
    // bypass
    en_encoding = 1'b0;
    send(1'b0, 8'h5A);
    check(dout == 10'h05A, "bypass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
