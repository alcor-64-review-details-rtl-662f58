// enc_8b10b -- 8b/10b encoder (Widmer-Franaszek code) with running disparity.
//
// Encodes one byte per `en` pulse into a 10-bit symbol {a,b,c,d,e,i,f,g,h,j}
// (dout[9] = a is sent first). Data bytes use the standard 5b/6b and 3b/4b
// tables, including the alternate D.x.A7 code that avoids runs of five equal
// bits. With k = 1 the byte must be one of the K28.y control symbols, the only
// control symbols the ALCOR data stream uses (K28.0 frame header, K28.1 align
// comma, K28.2 end of frame, K28.3 status header, K28.4 CRC header, K28.5 idle
// comma); other K bytes are coded as K28.y with y = din[7:5]. The running
// disparity starts negative after reset and flips after every symbol that is
// not balanced. With en_encoding low the byte passes unencoded as {2'b00, din}
// and the running disparity is held; this bypass is this design's choice.
//
// Timing: dout and the running disparity update on the clock edge where en is
// high, so dout is registered (one clock latency).
module enc_8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,           // encode din on this clock edge
  input  logic       en_encoding,  // 1: 8b10b, 0: bypass
  input  logic       k,            // control symbol
  input  logic [7:0] din,
  output logic [9:0] dout,
  output logic       rd_pos        // running disparity after dout (1 = positive)
);
  // 5b/6b codes, RD- column, bits a..i from left to right
  function automatic logic [5:0] code6(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b codes, RD- column, bits f..j (y = 7 gives the primary P7 code)
  function automatic logic [3:0] code4(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  // K28.y, RD- column (RD+ is the complement)
  function automatic logic [3:0] k28_code4(input logic [2:0] y);
    case (y)
      3'd0: return 4'b0100;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b0011;
      3'd4: return 4'b0010;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1000;
    endcase
  endfunction

  function automatic logic [9:0] encode(input logic [7:0] b, input logic kc, input logic rd);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd6;
    x = b[4:0];
    y = b[7:5];
    if (kc) begin
      return rd ? ~{6'b001111, k28_code4(y)} : {6'b001111, k28_code4(y)};
    end
    c6 = code6(x);
    if (rd && ($countones(c6) != 3 || x == 5'd7)) c6 = ~c6;
    rd6 = ($countones(c6) == 3) ? rd : ~rd;
    if (y == 3'd7 && ((!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                      ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14))))
      c4 = 4'b0111;  // A7
    else
      c4 = code4(y);
    if (rd6 && (y == 3'd0 || y == 3'd3 || y == 3'd4 || y == 3'd7)) c4 = ~c4;
    return {c6, c4};
  endfunction

  logic [9:0] sym;
  assign sym = encode(din, k, rd_pos);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout   <= 10'b0;
      rd_pos <= 1'b0;
    end else if (en) begin
      if (en_encoding) begin
        dout   <= sym;
        rd_pos <= ($countones(sym) == 5) ? rd_pos : ~rd_pos;
      end else begin
        dout   <= {2'b00, din};
      end
    end
  end
endmodule
