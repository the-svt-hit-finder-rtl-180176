// Aim: pedestal subtraction and strip threshold, a five-stage pipeline inside the HitMan.
//
// Stage 1 replaces a negative pulse height (bit 7 set, the value is 8-bit signed) by zero.
// Stage 2 reads the 7-bit pedestal of this chip+strip from the 1024-entry pedestal memory and
// the 7-bit threshold of this chip from the eight threshold registers. Stage 3 subtracts the
// pedestal, clamping negative results at zero. Stage 4 marks the word invalid when the
// corrected pulse height is below the threshold. Stage 5 registers the result for Fire.
// The pipeline advances on every 26.5 MHz clock enable, valid word or not.
// The pedestal memory is written and read through a plain address/data port driven by the
// HitMan's VME decoder; its size (one entry per 10-bit chip+strip number) is this design's
// choice, the pedestal and threshold widths follow the HitMan description.
module hm_aim
  import hf_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  input  hit_t            hit_i,
  input  logic [7:0][6:0] thresh_i,
  input  logic            ped_we_i,
  input  logic [9:0]      ped_addr_i,
  input  logic [6:0]      ped_wdata_i,
  output logic [6:0]      ped_rdata_o,
  output hit_t            hit_o
);

  logic [6:0] ped_mem [1024];

  always_ff @(posedge clk) begin
    if (ped_we_i) ped_mem[ped_addr_i] <= ped_wdata_i;
  end
  assign ped_rdata_o = ped_mem[ped_addr_i];

  hit_t s1_q, s2_q, s3_q, s4_q;
  logic [6:0] ped2_q, thr2_q, thr3_q;
  logic [7:0] diff;

  assign diff = {1'b0, s2_q.ph[6:0]} - {1'b0, ped2_q};

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_q <= '0; s2_q <= '0; s3_q <= '0; s4_q <= '0; hit_o <= '0;
      ped2_q <= '0; thr2_q <= '0; thr3_q <= '0;
    end else if (ce) begin
      // 1: negative pulse heights become zero
      s1_q       <= hit_i;
      s1_q.ph    <= hit_i.ph[7] ? 8'd0 : hit_i.ph;
      // 2: pedestal and threshold lookup
      s2_q       <= s1_q;
      ped2_q     <= ped_mem[s1_q.cs];
      thr2_q     <= thresh_i[s1_q.cs[9:7]];
      // 3: subtract, zero negative results
      s3_q       <= s2_q;
      s3_q.ph    <= diff[7] ? 8'd0 : diff;
      thr3_q     <= thr2_q;
      // 4: threshold cut
      s4_q       <= s3_q;
      s4_q.valid <= s3_q.valid && (s3_q.ph[6:0] >= thr3_q);
      // 5: output register
      hit_o      <= s4_q;
    end
  end

endmodule
