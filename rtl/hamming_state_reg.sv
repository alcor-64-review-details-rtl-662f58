// hamming_state_reg -- FSM state register protected by a Hamming
// single-error-correcting code.
//
// The W-bit state is stored as a Hamming codeword of W+P bits (P parity bits at
// the power-of-two positions, the smallest P with 2^P >= W+P+1). The stored
// codeword is decoded and corrected combinationally: q is always the corrected
// state. The FSM computes its next state from q and presents it on d, so the
// register is rewritten every clock with a clean codeword and a single upset
// bit disappears on the next edge. `seu` is high while the stored codeword has a
// non-zero syndrome. ALCOR uses this protection for the pixel and EoC readout
// FSMs; the code construction (standard Hamming) is this design's choice.
//
// Timing: q = d of the previous clock. Asynchronous active-low reset.
module hamming_state_reg #(
  parameter int unsigned W         = 4,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         seu
);
  function automatic int unsigned parity_bits(input int unsigned w);
    int unsigned p;
    p = 1;
    while ((1 << p) < w + p + 1) p++;
    return p;
  endfunction

  localparam int unsigned P = parity_bits(W);
  localparam int unsigned N = W + P;

  function automatic logic [N:1] encode(input logic [W-1:0] data);
    logic [N:1] cw;
    int unsigned k;
    cw = '0;
    k  = 0;
    for (int unsigned pos = 1; pos <= N; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        cw[pos] = data[k];
        k++;
      end
    end
    for (int unsigned i = 0; i < P; i++) begin
      for (int unsigned pos = 1; pos <= N; pos++) begin
        if (((pos >> i) & 1) == 1 && pos != (1 << i)) cw[1 << i] = cw[1 << i] ^ cw[pos];
      end
    end
    return cw;
  endfunction

  function automatic int unsigned syndrome(input logic [N:1] cw);
    int unsigned s;
    s = 0;
    for (int unsigned pos = 1; pos <= N; pos++) if (cw[pos]) s = s ^ pos;
    return s;
  endfunction

  function automatic logic [W-1:0] extract(input logic [N:1] cw);
    logic [W-1:0] data;
    int unsigned k;
    k = 0;
    data = '0;
    for (int unsigned pos = 1; pos <= N; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        data[k] = cw[pos];
        k++;
      end
    end
    return data;
  endfunction

  logic [N:1]  cw_q;
  logic [N:1]  cw_fix;
  int unsigned syn;

  always_comb begin
    syn    = syndrome(cw_q);
    cw_fix = cw_q;
    if (syn != 0 && syn <= N) cw_fix[syn] = ~cw_q[syn];
  end

  assign q   = extract(cw_fix);
  assign seu = (syn != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cw_q <= encode(RESET_VAL);
    else        cw_q <= encode(d);
  end
endmodule
