// tb_alcor_frame_ctrl -- self-checking testbench of the reset-line decoder and
// frame timing. Sends reset pulses of many widths and checks the decoded
// command (New Orbit 8..15, Start 16..23, Hard reset 24..31, others ignored),
// that the coarse counter is cleared exactly 12 clocks after the line falls,
// the frame number, parity and status-word fields, a rollover after 2^15
// clocks, and that an upset in one TMR copy of the width counter changes
// nothing.
module tb_alcor_frame_ctrl;
  logic clk = 1'b0;
  logic rst_n, rst_line, hard_rst, start_p, orbit_p, frame_par, end_rollover, seu;
  logic [14:0] coarse, last_coarse;
  logic [15:0] frame_num;
  int checks = 0, failures = 0;
  int n_orbit = 0, n_start = 0, n_hard = 0;

  alcor_frame_ctrl dut (.clk(clk), .rst_n(rst_n), .rst_line(rst_line), .hard_rst(hard_rst),
    .start_p(start_p), .orbit_p(orbit_p), .coarse(coarse), .frame_num(frame_num),
    .frame_par(frame_par), .end_rollover(end_rollover), .last_coarse(last_coarse), .seu(seu));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (start_p) n_start++;
    if (orbit_p) n_orbit++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t (coarse=%h frame=%0d)", what, $time, coarse, frame_num);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind: 0 none, 1 orbit, 2 start, 3 hard
  task automatic pulse(input int width, input bit upset);
    int kind;
    logic [15:0] f0;
    logic        p0;
    logic [14:0] c_before;
    bit          saw_hard;
    kind = (width >= 8 && width <= 15) ? 1 : (width >= 16 && width <= 23) ? 2 :
           (width >= 24 && width <= 31) ? 3 : 0;
    repeat (50) @(negedge clk);
    f0 = frame_num;
    p0 = frame_par;
    rst_line = 1'b1;
    repeat (width) @(negedge clk);
    if (upset) begin
      force dut.u_w.r1 = 6'd0;
      #1 check(seu, "seu flagged");
      release dut.u_w.r1;
    end
    rst_line = 1'b0;
    // edge 0 is the next rising edge; check just after edges 11 and 12
    saw_hard = 0;
    for (int e = 0; e <= 11; e++) begin
      @(posedge clk); #1;
      if (hard_rst) saw_hard = 1;
    end
    c_before = coarse;
    if (kind == 1 || kind == 2) check(coarse != 15'd0, "coarse not yet cleared at edge 11");
    @(posedge clk); #1;
    if (hard_rst) saw_hard = 1;
    case (kind)
      1: begin
        check(coarse == 15'd0, "orbit: coarse cleared at edge 12");
        check(frame_num == f0 + 16'd1, "orbit: frame + 1");
        check(frame_par == ~p0, "orbit: parity toggles");
        check(!end_rollover && last_coarse == c_before, "orbit: last coarse kept");
      end
      2: begin
        check(coarse == 15'd0, "start: coarse cleared at edge 12");
        check(frame_num == 16'd0, "start: frame = 0");
        check(frame_par == ~p0, "start: parity toggles");
        check(!end_rollover && last_coarse == c_before, "start: last coarse kept");
      end
      3: begin
        repeat (3) begin @(posedge clk); #1; if (hard_rst) saw_hard = 1; end
        check(saw_hard, "hard reset asserted");
        check(frame_num == 16'd0, "hard: frame = 0");
      end
      default: begin
        check(coarse == c_before + 15'd1, "ignored width: coarse keeps counting");
        check(frame_num == f0 && frame_par == p0, "ignored width: frame unchanged");
        check(!hard_rst, "ignored width: no hard reset");
      end
    endcase
    if (kind != 3) check(!saw_hard, "no hard reset");
  endtask

  initial begin
    int s0, o0;
    logic [15:0] f0;
    logic        p0;
    rst_n = 1'b0; rst_line = 1'b0;
    #22 rst_n = 1'b1;
    pulse(4, 0);
    pulse(8, 0);
    pulse(15, 1);
    pulse(12, 0);
    pulse(16, 0);
    pulse(23, 0);
    pulse(20, 1);
    pulse(24, 0);
    pulse(31, 0);
    pulse(7, 0);
    pulse(40, 0);
    pulse(10, 0);
    check(n_orbit == 4 && n_start == 3, "number of decoded commands");
    // rollover
    @(negedge clk);
    while (coarse != 15'h7FFF) @(negedge clk);
    f0 = frame_num;
    p0 = frame_par;
    @(negedge clk);
    check(coarse == 15'd0, "rollover to 0");
    check(frame_num == f0 + 16'd1 && frame_par == ~p0 && end_rollover, "rollover opens a frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
