// Test-clock step synchroniser.
//
// The Boot chip's test clock runs in the 30 MHz domain and is seen here as a level that
// toggles once per test-clock pulse. The level passes through two flip-flops into the local
// clock domain; each change becomes a pending step that is released, as a one-cycle step_o,
// in the next cycle in which the local clock enable ce is high. Used to pace the Input SPY
// replay of the clustering engines. This module is this design's own glue.
module hf_step_sync (
  input  logic clk,
  input  logic rst,
  input  logic ce,
  input  logic tgl_i,
  output logic step_o
);

  logic [2:0] sync_q;
  logic       pend_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q <= '0;
      pend_q <= 1'b0;
    end else begin
      sync_q <= {sync_q[1:0], tgl_i};
      if (sync_q[2] != sync_q[1]) pend_q <= 1'b1;
      else if (ce)                pend_q <= 1'b0;
    end
  end

  assign step_o = ce && (pend_q || (sync_q[2] != sync_q[1]));

endmodule
