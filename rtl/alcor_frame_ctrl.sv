// alcor_frame_ctrl -- reset-line decoder and frame timing of the End of Column.
//
// The chip has one reset input whose meaning depends on how long it is held
// high, counted in clock cycles:
//    8..15 cycles  New Orbit   frame counter + 1, coarse counter = 0
//   16..23 cycles  Start       frame counter = 0, coarse counter = 0
//   24..31 cycles  Hard reset  (hard_rst pulse, 4 clocks long)
// Other widths are ignored. The width is measured by a small FSM whose state
// and width counter are triple-modular-redundant (tmr_reg); the command is
// decoded when the line falls. The decoded command then travels through a
// delay line that stands for the synchronisers of the EoC and pixel reset
// distribution, so that the coarse counters are cleared LATENCY = 12 clocks
// after the line is de-asserted: the first clock edge that samples the line
// low is edge 0, and at edge 12 every coarse counter loads 0.
//
// The block also keeps the End of Column copy of the time base: the 15-bit
// coarse counter (rollover every 2^15 clocks), the 16-bit frame number and
// the frame parity bit that separates frames. The parity toggles at every
// rollover, Start and New Orbit, exactly when the pixels toggle theirs. The
// frame number is cleared by Start and incremented by New Orbit and, in this
// design, also by a rollover (each rollover opens a new frame). For the End of
// Column status word it remembers whether the last frame ended by rollover
// (end_rollover = 1) or by Start/New Orbit, and in that case the last coarse
// counter value.
//
// Decode widths, latency, counter widths and TMR protection follow the
// published description; the two-flop input synchroniser and the 4-clock hard
// reset pulse are this design's choices.
module alcor_frame_ctrl
  import alcor_pkg::*;
#(
  parameter int unsigned LATENCY = 12   // clocks from de-assertion to coarse counter reset
) (
  input  logic                clk,
  input  logic                rst_n,        // power-on reset, asynchronous
  input  logic                rst_line,     // external reset line (active high)
  output logic                hard_rst,     // hard reset request (4 clocks)
  output logic                start_p,      // Start: one clock, coarse counters load 0 on this edge
  output logic                orbit_p,      // New Orbit: idem
  output logic [COARSE_W-1:0] coarse,
  output logic [15:0]         frame_num,
  output logic                frame_par,
  output logic                end_rollover, // last frame ended by rollover
  output logic [COARSE_W-1:0] last_coarse,  // coarse value at the last Start/New Orbit
  output logic                seu
);
  localparam int unsigned PIPE = LATENCY - 2;

  logic       s1, s2;        // input synchroniser
  logic [1:0] st_d, st_q;    // {measuring, unused}
  logic [5:0] w_d, w_q;      // width counter
  logic       seu_st, seu_w;
  logic       dec_start, dec_orbit, dec_hard;
  logic [PIPE-1:0] p_start, p_orbit, p_hard;
  logic [2:0] hard_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else begin
      s1 <= rst_line;
      s2 <= s1;
    end
  end

  // width measuring FSM: IDLE (st=0) / MEASURE (st=1)
  always_comb begin
    st_d      = st_q;
    w_d       = w_q;
    dec_start = 1'b0;
    dec_orbit = 1'b0;
    dec_hard  = 1'b0;
    if (st_q[0] == 1'b0) begin
      if (s2) begin
        st_d = 2'b01;
        w_d  = 6'd1;
      end
    end else begin
      if (s2) begin
        if (w_q != 6'd63) w_d = w_q + 6'd1;
      end else begin
        st_d = 2'b00;
        w_d  = '0;
        if (w_q >= 6'd8  && w_q <= 6'd15) dec_orbit = 1'b1;
        if (w_q >= 6'd16 && w_q <= 6'd23) dec_start = 1'b1;
        if (w_q >= 6'd24 && w_q <= 6'd31) dec_hard  = 1'b1;
      end
    end
  end

  tmr_reg #(.W(2)) u_st (.clk(clk), .rst_n(rst_n), .we(1'b1), .d(st_d), .q(st_q), .seu(seu_st));
  tmr_reg #(.W(6)) u_w  (.clk(clk), .rst_n(rst_n), .we(1'b1), .d(w_d),  .q(w_q),  .seu(seu_w));
  assign seu = seu_st | seu_w;

  // reset distribution latency
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_start <= '0;
      p_orbit <= '0;
      p_hard  <= '0;
    end else begin
      p_start <= {p_start[PIPE-2:0], dec_start};
      p_orbit <= {p_orbit[PIPE-2:0], dec_orbit};
      p_hard  <= {p_hard[PIPE-2:0],  dec_hard};
    end
  end

  assign start_p = p_start[PIPE-1];
  assign orbit_p = p_orbit[PIPE-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 hard_cnt <= '0;
    else if (p_hard[PIPE-1])    hard_cnt <= 3'd4;
    else if (hard_cnt != 3'd0)  hard_cnt <= hard_cnt - 3'd1;
  end
  assign hard_rst = (hard_cnt != 3'd0);

  // End of Column time base
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coarse       <= '0;
      frame_num    <= '0;
      frame_par    <= 1'b0;
      end_rollover <= 1'b1;
      last_coarse  <= '0;
    end else if (hard_rst) begin
      coarse       <= '0;
      frame_num    <= '0;
      frame_par    <= 1'b0;
      end_rollover <= 1'b1;
      last_coarse  <= '0;
    end else if (start_p || orbit_p) begin
      coarse       <= '0;
      frame_num    <= start_p ? 16'd0 : frame_num + 16'd1;
      frame_par    <= ~frame_par;
      end_rollover <= 1'b0;
      last_coarse  <= coarse;
    end else begin
      coarse <= coarse + 1'b1;
      if (coarse == '1) begin
        frame_num    <= frame_num + 16'd1;
        frame_par    <= ~frame_par;
        end_rollover <= 1'b1;
      end
    end
  end
endmodule
