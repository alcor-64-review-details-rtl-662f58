// alcor_tdc_model -- behavioural stand-in for one analogue TDC interpolator,
// for testbenches. When it sees `start` on a rising clock edge it raises
// `busy` for `dur` clock cycles (its conversion), then drops it. The real
// interpolator's analogue behaviour is not modelled, only the handshake the
// digital TDC control logic sees.
module alcor_tdc_model (
  input  logic       clk,
  input  logic       start,
  input  logic [8:0] dur,
  output logic       busy
);
  int unsigned left = 0;
  initial busy = 1'b0;
  always @(posedge clk) begin
    if (left == 0 && start && !busy) begin
      busy <= 1'b1;
      left <= (dur == 0) ? 1 : int'(dur);
    end else if (left > 1) begin
      left <= left - 1;
    end else if (left == 1) begin
      left <= 0;
      busy <= 1'b0;
    end
  end
endmodule
