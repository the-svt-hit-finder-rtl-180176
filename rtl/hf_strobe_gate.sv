// Data Strobe gate of the front panel (behavioural model of discrete parts, not synthesizable
// logic): a 10 ns delay line followed by a 74AS00 NAND gate.
//
// The output processor sends a free-running clock and a Valid signal that runs half a clock
// ahead of the data. Valid is delayed by 10 ns and NANDed with the clock, so the active-low
// strobe ds_n goes low only in the high half of a clock cycle whose word is valid; its rising
// edge, which the receiver uses, falls in the middle of the data word. The gate delay is given
// as between 1 and 5 ns; this model uses 3 ns. The quiescent state of ds_n is high.
module hf_strobe_gate #(
  parameter realtime LINE_DELAY = 10.0ns,
  parameter realtime GATE_DELAY = 3.0ns
) (
  input  logic clk,
  input  logic valid,
  output logic ds_n
);
  timeunit 1ns;
  timeprecision 1ps;

  logic delayed;

  always @(valid) delayed <= #(LINE_DELAY) valid;
  always @(delayed or clk) ds_n <= #(GATE_DELAY) !(delayed && clk);

endmodule
