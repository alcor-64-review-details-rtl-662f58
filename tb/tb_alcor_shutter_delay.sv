// tb_alcor_shutter_delay -- self-checking testbench of the shutter delay
// model. Two instances (350 ps and 100 ps steps) get a rising and a falling
// edge for every setting 0..15; the time from input edge to output edge must
// be sel x step within 1 ps, and a pulse longer than the delay must keep its
// width.
module tb_alcor_shutter_delay;
  logic       din = 1'b0;
  logic [3:0] sel = '0;
  logic       d350, d100;
  int checks = 0, failures = 0;

  alcor_shutter_delay #(.STEP_PS(350)) u350 (.din(din), .sel(sel), .dout(d350));
  alcor_shutter_delay #(.STEP_PS(100)) u100 (.din(din), .sel(sel), .dout(d100));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (sel=%0d) at %0t", what, sel, $realtime);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t350, t100, t0;
  always @(posedge d350 or negedge d350) t350 = $realtime;
  always @(posedge d100 or negedge d100) t100 = $realtime;

  initial begin
    #10;
    for (int s = 0; s < 16; s++) begin
      sel = 4'(s);
      for (int e = 0; e < 2; e++) begin
        #10;
        t0 = $realtime;
        din = ~din;
        #7;
        check(d350 == din && d100 == din, "output follows input");
        check(t350 - t0 > s * 0.350 - 0.001 && t350 - t0 < s * 0.350 + 0.001, "350 ps steps");
        check(t100 - t0 > s * 0.100 - 0.001 && t100 - t0 < s * 0.100 + 0.001, "100 ps steps");
      end
    end
    // a 10 ns pulse through the 5.25 ns delay keeps its width
    sel = 4'd15;
    #10;
    t0 = $realtime;
    din = 1'b1;
    #10 din = 1'b0;
    #4;
    check(d350 == 1'b1 && t350 - t0 > 5.249 && t350 - t0 < 5.251, "pulse start delayed");
    #3;
    check(d350 == 1'b0 && t350 - t0 > 15.249 && t350 - t0 < 15.251, "pulse width kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
