// tb_tmr_reg -- self-checking testbench of tmr_reg: loads values, upsets one
// copy at a time and checks that the voted output holds, that seu flags the
// disagreement and that the copy is repaired on the next clock.
module tb_tmr_reg;
  logic clk = 1'b0;
  logic rst_n, we, seu;
  logic [15:0] d, q;
  int checks = 0, failures = 0;

  tmr_reg #(.W(16), .RESET_VAL(16'h1234)) dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q), .seu(seu));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (q=%h seu=%b)", what, q, seu);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    rst_n = 1'b0; we = 1'b0; d = '0;
    #12;
    check(q == 16'h1234, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      v = 16'($urandom);
      @(negedge clk); we = 1'b1; d = v;
      @(negedge clk); we = 1'b0; d = ~v;
      check(q == v && !seu, "load");
      // upset one copy
      case (i % 3)
        0: force dut.r0 = ~v;
        1: force dut.r1 = v ^ 16'h0101;
        default: force dut.r2 = 16'h0;
      endcase
      #1;
      check(q == v, "voted value with one upset copy");
      check(seu == (v != 16'h0 || i % 3 != 2), "seu flag");
      case (i % 3)
        0: release dut.r0;
        1: release dut.r1;
        default: release dut.r2;
      endcase
      @(negedge clk);
      check(q == v && !seu, "copy repaired");
      check(dut.r0 == v && dut.r1 == v && dut.r2 == v, "all copies equal");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
