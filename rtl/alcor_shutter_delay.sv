// alcor_shutter_delay -- behavioural model of a programmable shutter delay
// chain (not synthesizable logic: in silicon it is a chain of delay cells).
//
// The test pulse that opens the digital shutter window is delayed by sel
// steps of STEP_PS picoseconds (sel = 0..15). Each pixel has one with steps of
// about 350 ps; the End of Column has one per column with steps of about 100 ps
// to adjust the skew between columns. The model is a transport delay: every
// edge of din reappears on dout sel*STEP_PS later (edges closer together than
// the delay are outside the model). The step sizes follow the
// published typical-corner values; buffer delays of the real distribution
// (about 2 ns along a column) are not modelled.
module alcor_shutter_delay #(
  parameter int unsigned STEP_PS = 350
) (
  input  logic       din,
  input  logic [3:0] sel,
  output logic       dout
);
  always @(din) begin
    dout <= #(1ps * (STEP_PS * sel)) din;
  end
endmodule
