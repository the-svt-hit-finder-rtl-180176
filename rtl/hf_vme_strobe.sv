// Internal VME strobe sequencer of the Boot chip.
//
// When the derived VME data strobe vme_data_str_n falls, the sequencer raises the board's
// address strobe hf_vme_as after 80 ns and its data strobe hf_vme_ds after 160 ns. On a write
// cycle the data strobe falls again at 240 ns; on a read cycle it stays high. The acknowledge
// to the VME master (ack) rises at 280 ns. When vme_data_str_n rises again, address strobe,
// read data strobe and acknowledge all fall. The timing comes from a tapped delay line with
// 40 ns per tap; here clk is a 25 MHz tap clock and the events happen at taps 2, 4, 6 and 7.
// The strobe is sampled through two flip-flops, which adds a fixed offset of up to two taps to
// all the times above.
module hf_vme_strobe #(
  parameter int unsigned TAP_AS     = 2,
  parameter int unsigned TAP_DS     = 4,
  parameter int unsigned TAP_WR_END = 6,
  parameter int unsigned TAP_ACK    = 7
) (
  input  logic clk,
  input  logic rst,
  input  logic vme_data_str_n,
  input  logic vme_write,
  output logic hf_vme_as,
  output logic hf_vme_ds,
  output logic ack
);

  logic [1:0] sync_q;
  logic [3:0] tap_q;
  logic       active;

  always_ff @(posedge clk) begin
    if (rst) sync_q <= 2'b11;
    else     sync_q <= {sync_q[0], vme_data_str_n};
  end
  assign active = !sync_q[1];

  always_ff @(posedge clk) begin
    if (rst || !active) tap_q <= '0;
    else if (tap_q != 4'hf) tap_q <= tap_q + 4'd1;
  end

  always_ff @(posedge clk) begin
    if (rst || !active) begin
      hf_vme_as <= 1'b0;
      hf_vme_ds <= 1'b0;
      ack       <= 1'b0;
    end else begin
      if (tap_q == 4'(TAP_AS - 1))  hf_vme_as <= 1'b1;
      if (tap_q == 4'(TAP_DS - 1))  hf_vme_ds <= 1'b1;
      if (vme_write && tap_q == 4'(TAP_WR_END - 1)) hf_vme_ds <= 1'b0;
      if (tap_q == 4'(TAP_ACK - 1)) ack <= 1'b1;
    end
  end

endmodule
