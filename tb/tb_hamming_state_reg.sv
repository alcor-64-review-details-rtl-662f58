// tb_hamming_state_reg -- self-checking testbench of hamming_state_reg: stores
// every 4-bit state, flips each codeword bit in turn and checks that the output
// stays correct, that seu is raised and that the stored word is clean again
// after one clock.
module tb_hamming_state_reg;
  logic clk = 1'b0;
  logic rst_n, seu;
  logic [3:0] d, q;
  logic [7:1] saved;
  int checks = 0, failures = 0;

  hamming_state_reg #(.W(4), .RESET_VAL(4'h5)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .seu(seu));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (q=%h seu=%b)", what, q, seu);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; d = 4'h5;
    #12;
    check(q == 4'h5 && !seu, "reset state");
    rst_n = 1'b1;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk); d = 4'(v);
      @(negedge clk);
      check(q == 4'(v) && !seu, "state stored");
      for (int b = 1; b <= 7; b++) begin
        saved = dut.cw_q;
        force dut.cw_q = saved ^ (7'b1 << (b - 1));
        #1;
        check(q == 4'(v), "corrected with one flipped bit");
        check(seu, "seu raised");
        release dut.cw_q;
        @(negedge clk);
        check(q == 4'(v) && !seu, "clean after one clock");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
