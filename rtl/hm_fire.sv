// Fire: the fourteen-stage clustering pipeline inside the HitMan.
//
// Fire receives the pedestal-corrected strips from Aim and advances only when en is high
// (Aim delivers a valid strip, or Ready is flushing at the end of an event), so chip-ID words
// and strips below threshold do not separate neighbouring strips. For every strip X it works
// out, in order:
//   stage 2    X.cs + 1;
//   stage 3    whether the next strip is adjacent (next.cs == X.cs + 1);
//   stage 4    running cluster length and charge sum; a cluster is cut after six strips, so
//              "linked to previous/next" means adjacent and in the same six-strip cluster;
//   stage 5    the 15-bit Cluster RAM (CRAM) address {ph(prev), ph(X), ph(next)} built from
//              bits 6:2 of the three pulse heights, with the outer fields forced to zero
//              where the neighbour is not linked; good-charge bit (sum above the cut);
//   stage 6    the CRAM data bits 5:0, a signed offset in sixteenths of a strip;
//   stage 7    the centroid X.cs*16 + offset;
//   stage 8    the cluster position, written for the last strip of a cluster: its own
//              centroid for one or two strips, the middle strip's centroid (one stage on) for
//              three strips, and for four to six strips the median strip, last strip minus
//              length/2, with no charge weighting and the long-cluster bit set;
//   stages 9-14 delay to the output register.
// out_valid_o is set only for the last strip of a cluster whose charge passes the cut, for
// one enable period after the pipeline step that produced it.
// The CRAM is an external asynchronous RAM: cram_addr_o is a register and cram_data_i is
// sampled one enabled cycle later. The field order inside the CRAM address, the delay stages
// used to make up fourteen, and the rule that a six-strip cut also unlinks the CRAM neighbours
// are this design's choices.
module hm_fire
  import hf_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        en,
  input  hit_t        hit_i,
  input  logic [7:0]  charge_cut_i,
  output logic [14:0] cram_addr_o,
  input  logic [7:0]  cram_data_i,
  output logic        out_valid_o,
  output logic        out_lc_o,
  output logic [13:0] out_pos_o
);

  localparam int unsigned NDELAY = 6;   // stages 9..14

  typedef struct packed {
    logic       valid;
    logic [9:0] cs;
    logic [9:0] inc;
    logic [4:0] ph5;
    logic [6:0] ph;
    logic       adj_next;
    logic       link_prev;
    logic       link_next;
    logic [2:0] len;
    logic [9:0] sum;
    logic       good;
    logic [5:0] offset;
    logic [13:0] centroid;
  } stage_t;

  typedef struct packed {
    logic        valid;
    logic        lc;
    logic [13:0] pos;
  } out_t;

  stage_t s1, s2, s3, s4, s5, s6, s7;
  out_t   s8;
  out_t   dly [NDELAY];

  logic       en_c;
  logic       link_prev_new, link_next_new;
  logic [2:0] len_new;
  logic [9:0] sum_new;
  logic       eoc7;
  out_t       out_new;
  logic [13:0] mid_q;   // centroid of the strip before the one in stage 7

  assign en_c = ce && en;

  // Stage 4 recurrences use the previous strip, which sits in stage 4 when X enters.
  always_comb begin
    link_prev_new = s3.valid && s4.valid && s4.adj_next && (s4.len != 3'd6);
    len_new       = link_prev_new ? s4.len + 3'd1 : 3'd1;
    sum_new       = (link_prev_new ? s4.sum : 10'd0) + {3'd0, s3.ph};
    link_next_new = s3.adj_next && (len_new != 3'd6);
  end

  // Stage 8: choose the cluster position for the last strip of each cluster.
  always_comb begin
    eoc7          = s7.valid && !s7.link_next;
    out_new.valid = eoc7 && s7.good;
    out_new.lc    = (s7.len > 3'd3);
    if (s7.len > 3'd3)       out_new.pos = {s7.cs - {8'd0, s7.len[2:1]}, 4'd0};
    else if (s7.len == 3'd3) out_new.pos = mid_q;
    else                     out_new.pos = s7.centroid;
  end


  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0; s2 <= '0; s3 <= '0; s4 <= '0; s5 <= '0; s6 <= '0; s7 <= '0; s8 <= '0;
      mid_q <= '0;
      cram_addr_o <= '0;
      for (int i = 0; i < NDELAY; i++) dly[i] <= '0;
    end else if (en_c) begin
      // 1: input latch
      s1       <= '0;
      s1.valid <= hit_i.valid;
      s1.cs    <= hit_i.cs;
      s1.ph    <= hit_i.ph[6:0];
      s1.ph5   <= hit_i.ph[6:2];
      // 2: increment
      s2       <= s1;
      s2.inc   <= s1.cs + 10'd1;
      // 3: adjacency of the next strip (now in stage 1)
      s3          <= s2;
      s3.adj_next <= s2.valid && s1.valid && (s1.cs == s2.inc);
      // 4: cluster length and charge
      s4           <= s3;
      s4.link_prev <= link_prev_new;
      s4.link_next <= link_next_new;
      s4.len       <= len_new;
      s4.sum       <= sum_new;
      // 5: CRAM address and charge cut
      s5      <= s4;
      s5.good <= (s4.sum > {2'd0, charge_cut_i});
      cram_addr_o <= {s4.link_prev ? s5.ph5 : 5'd0, s4.ph5, s4.link_next ? s3.ph5 : 5'd0};
      // 6: CRAM data
      s6        <= s5;
      s6.offset <= cram_data_i[5:0];
      // 7: centroid
      s7          <= s6;
      s7.centroid <= {s6.cs, 4'd0} + {{8{s6.offset[5]}}, s6.offset};
      mid_q       <= s7.centroid;
      // 8: cluster position
      s8 <= out_new;
      // 9..14
      dly[0] <= s8;
      for (int i = 1; i < NDELAY; i++) dly[i] <= dly[i-1];
    end
  end


  // The output registers hold their value while the pipeline is stalled; the valid bit is shown
  // only in the enable period right after they were loaded, so each cluster is seen once.
  logic fresh_q;
  always_ff @(posedge clk) begin
    if (rst)     fresh_q <= 1'b0;
    else if (ce) fresh_q <= en;
  end

  assign out_valid_o = dly[NDELAY-1].valid && fresh_q;
  assign out_lc_o    = dly[NDELAY-1].lc;
  assign out_pos_o   = dly[NDELAY-1].pos;

endmodule
