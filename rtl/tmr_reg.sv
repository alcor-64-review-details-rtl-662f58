// tmr_reg -- triple-modular-redundant register with voting and self-correction.
//
// Three copies of the register hold the same value. The output is the bitwise
// majority of the three. Every clock each copy is reloaded, with the new data
// when `we` is high and otherwise with the voted value, so a single upset copy
// is repaired on the next edge. `seu` is high in any cycle in which the copies
// disagree; it is meant for an upset counter. This is the protection the ALCOR
// configuration registers, reset FSM and SPI registers use; the exact cell-level
// arrangement (separate clocks, spacing of copies) is not modelled.
//
// Timing: q follows d one clock after we. Asynchronous active-low reset.
module tmr_reg #(
  parameter int unsigned W         = 16,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         seu
);
  logic [W-1:0] r0, r1, r2;

  assign q   = (r0 & r1) | (r0 & r2) | (r1 & r2);
  assign seu = (r0 != r1) || (r0 != r2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= RESET_VAL;
      r1 <= RESET_VAL;
      r2 <= RESET_VAL;
    end else begin
      r0 <= we ? d : q;
      r1 <= we ? d : q;
      r2 <= we ? d : q;
    end
  end
endmodule
