// Clustering-engine output FIFO (4K x 18, separate write and read clocks).
//
// Each clustering engine writes its cluster words and end-of-event words into this FIFO on
// the front-end clock; the Merger reads it on the 30 MHz back-end clock. Words are written
// when wen is high at a write-clock edge and the FIFO is not full; a read with ren high and
// the FIFO not empty presents the oldest word on rdata after the read-clock edge. The
// active-low flags follow the board signals: empty_n is low when nothing can be read and is
// updated on read-clock edges, full_n is low when no word can be written. Pointers cross
// between the clock domains as Gray codes through two-stage synchronisers, so both flags are
// conservative for two cycles of the other clock. The capacity follows the part used on the
// board; the Gray-pointer structure is this design's own. wrst and rrst are the FIFO reset.
module hf_fifo #(
  parameter int unsigned W     = 18,
  parameter int unsigned DEPTH = 4096
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         wen,
  input  logic [W-1:0] wdata,
  output logic         full_n,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         ren,
  output logic [W-1:0] rdata,
  output logic         empty_n
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  logic do_w, do_r, full, empty;
  logic [AW:0] wbin_n, rbin_n;

  assign full  = (wgray_q == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign empty = (rgray_q == wgray_r2);
  assign do_w  = wen && !full;
  assign do_r  = ren && !empty;
  assign wbin_n = wbin_q + (AW+1)'(do_w);
  assign rbin_n = rbin_q + (AW+1)'(do_r);

  always_ff @(posedge wclk) begin
    if (do_w) mem[wbin_q[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin_q <= '0; wgray_q <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin_q   <= wbin_n;
      wgray_q  <= bin2gray(wbin_n);
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin_q <= '0; rgray_q <= '0; wgray_r1 <= '0; wgray_r2 <= '0; rdata <= '0;
    end else begin
      rbin_q   <= rbin_n;
      rgray_q  <= bin2gray(rbin_n);
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
      if (do_r) rdata <= mem[rbin_q[AW-1:0]];
    end
  end

  assign full_n  = !full;
  assign empty_n = !empty;

endmodule
