// alcor_ddr_serializer -- per-column DDR output register with 8b/10b encoding.
//
// One 32-bit word (plus its K flag) is taken from the End of Column output
// FIFO every 20 clocks. A byte-select FSM sends bytes 0..3 (byte 0 = bits 7:0)
// to the 8b/10b encoder, one byte every 5 clocks. Each 10-bit symbol is split
// by bit position: the odd bits (9,7,5,3,1) go to a shift register clocked on
// the rising edge, the even bits (8,6,4,2,0) to one clocked on the falling
// edge. The clock itself selects which register drives the output: the
// odd-bit register while clk is high, the even-bit register while it is low.
// So the symbol leaves MSB (bit 9, 8b/10b bit "a") first, two bits per clock,
// which at 394 MHz is 788 Mb/s per column, 630 Mb/s of payload.
//
// When the FIFO is empty an idle word of four K28.5 commas is sent; while
// force_align is set (SPI configuration) K28.1 align commas are sent instead
// and the FIFO is not read. With enable low the counters and shift registers
// are held at zero and the line stays low.
//
// The block structure (data register, byte FSM with 4:1 mux, encoder, odd/even
// shift registers on opposite clock edges, clock-selected output mux) follows
// the published schematic. That schematic uses separate byte and word clocks;
// here they are clock enables derived from one counter, which is this design's
// choice. The output mux uses the clock as a select on purpose (it is the DDR
// multiplexer of the original), so lint tools may report clock used as data.
module alcor_ddr_serializer
  import alcor_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        en_code,      // 8b10b on
  input  logic        force_align,  // send K28.1 words
  input  logic        fifo_empty,
  input  logic [32:0] fifo_data,    // {K flag, word}
  output logic        fifo_rd,
  output logic        dout          // DDR serial output
);
  logic [2:0]  cnt5;      // clock within the current symbol (0..4)
  logic [1:0]  byte_sel;  // next byte to encode
  logic [31:0] word_q;
  logic        k_q;
  logic        fetch, enc_en;
  logic [7:0]  byte_mux;
  logic [9:0]  sym;
  logic        rd_pos;
  logic [4:0]  odd_sr, even_sr;

  assign fetch   = enable && (cnt5 == 3'd3) && (byte_sel == 2'd0);
  assign fifo_rd = fetch && !fifo_empty && !force_align;
  assign enc_en  = enable && (cnt5 == 3'd4);

  always_comb begin
    case (byte_sel)
      2'd0:    byte_mux = word_q[7:0];
      2'd1:    byte_mux = word_q[15:8];
      2'd2:    byte_mux = word_q[23:16];
      default: byte_mux = word_q[31:24];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt5     <= '0;
      byte_sel <= '0;
      word_q   <= kword(K28_5);
      k_q      <= 1'b1;
    end else if (!enable) begin
      cnt5     <= '0;
      byte_sel <= '0;
    end else begin
      cnt5 <= (cnt5 == 3'd4) ? 3'd0 : cnt5 + 3'd1;
      if (enc_en) byte_sel <= byte_sel + 2'd1;
      if (fetch) begin
        if (force_align) begin
          word_q <= kword(K28_1);
          k_q    <= 1'b1;
        end else if (fifo_empty) begin
          word_q <= kword(K28_5);
          k_q    <= 1'b1;
        end else begin
          word_q <= fifo_data[31:0];
          k_q    <= fifo_data[32];
        end
      end
    end
  end

  enc_8b10b u_enc (
    .clk         (clk),
    .rst_n       (rst_n),
    .en          (enc_en),
    .en_encoding (en_code),
    .k           (k_q),
    .din         (byte_mux),
    .dout        (sym),
    .rd_pos      (rd_pos)
  );

  // odd-bit shift register, rising edge; loads one clock after the encoder
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             odd_sr <= '0;
    else if (!enable)       odd_sr <= '0;
    else if (cnt5 == 3'd0)  odd_sr <= {sym[9], sym[7], sym[5], sym[3], sym[1]};
    else                    odd_sr <= {odd_sr[3:0], 1'b0};
  end

  // even-bit shift register, falling edge, half a clock behind
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)             even_sr <= '0;
    else if (!enable)       even_sr <= '0;
    else if (cnt5 == 3'd1)  even_sr <= {sym[8], sym[6], sym[4], sym[2], sym[0]};
    else                    even_sr <= {even_sr[3:0], 1'b0};
  end

  assign dout = clk ? odd_sr[4] : even_sr[4];

endmodule
