// tb_8b10b_pkg -- reference 8b/10b decoder used by the testbenches to read
// back serializer output. decode() returns {valid, k, byte} for a symbol
// {a,b,c,d,e,i,f,g,h,j}; only data symbols and K28.y are recognised.
package tb_8b10b_pkg;

  // 6b codes (RD-) for the 5b values, as in the published 8b/10b tables
  localparam logic [5:0] T6 [32] = '{
    6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001, 6'b011001, 6'b111000,
    6'b111001, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100, 6'b011100, 6'b010111,
    6'b011011, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010, 6'b011010, 6'b111010,
    6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110, 6'b011110, 6'b101011};
  localparam logic [3:0] T4 [8] = '{
    4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110};
  localparam logic [3:0] TK [8] = '{
    4'b0100, 4'b1001, 4'b0101, 4'b0011, 4'b0010, 4'b1010, 4'b0110, 4'b1000};

  function automatic logic [9:0] decode(input logic [9:0] s);
    logic [5:0] c6;
    logic [3:0] c4;
    c6 = s[9:4];
    c4 = s[3:0];
    if (c6 == 6'b001111 || c6 == 6'b110000) begin
      for (int y = 0; y < 8; y++)
        if ((c6 == 6'b001111 && c4 == TK[y]) || (c6 == 6'b110000 && c4 == ~TK[y]))
          return {1'b1, 1'b1, 3'(y), 5'd28};
      return '0;
    end
    for (int x = 0; x < 32; x++) begin
      if (c6 == T6[x] || ((x == 7 || $countones(T6[x]) != 3) && c6 == ~T6[x])) begin
        for (int y = 0; y < 8; y++)
          if (c4 == T4[y] || ((y == 0 || y == 3 || y == 4 || y == 7) && c4 == ~T4[y])) return {1'b1, 1'b0, 3'(y), 5'(x)};
        if (c4 == 4'b0111 || c4 == 4'b1000) return {1'b1, 1'b0, 3'd7, 5'(x)};
        return '0;
      end
    end
    return '0;
  endfunction
endpackage
