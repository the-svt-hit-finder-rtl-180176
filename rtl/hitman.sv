// HitMan: the clustering-engine chip of one SVX readout stream.
//
// Data path: raw 16-bit words (from the alignment stage, or from the Input SPY buffer in test
// mode) pass through Ready (parser), Aim (pedestal and threshold) and Fire (clustering). Every
// Fire cluster and the end-of-event word from Ready are written to the stream FIFO through one
// multiplexer; fifo_wen_o is high only for those words. Clusters of one event are counted: once
// the count reaches a programmable limit, further clusters are not written and Ready sets the
// truncated-data flag of the end-of-event word. A limit of zero means no limit.
//
// Input SPY buffer (ISPY): in normal mode each 26.5 MHz input word is stored as
// {valid, error, data} at an incrementing address while the valid bit is set, and also the
// first word after valid drops, so that event boundaries are kept. In test mode (test_i) the
// buffer is replayed instead, and the whole Ready/Aim/Fire pipeline advances one step per
// enabled cycle with test_step_i high, as if clocked by the test clock; bit 17 is
// the valid bit and bit 16 the error bit, 0x10000 halts the replay and 0x1ffff restarts it at
// address 0. The capture rule and the per-step replay pacing are this design's choices.
//
// VME: the chip answers to stream number stream_id_i, and to stream 15 for writes. Device 1
// holds the pedestal memory (subaddress below 0x1000), chip IDs (0x100N), strip thresholds
// (0x101N), cluster charge cut (0x1020), ISPY counter (0x1100, a write resets it), restore
// default chip IDs (0x1101), cluster limit (0x1102), number of expected chip IDs minus one
// (0x1103) and, as this design's addition, the disable flag (0x1104). Devices 2, 3/4 and 5 are
// the ISPY, the two halves of the CRAM and FIFO writes. Writes act on the rising edge of the
// data strobe after a two-flop synchroniser; reads are combinational from the registers and
// from the memories' last read data. Default chip IDs are 100 followed by the chip number.
//
// Clocking: everything runs on the 53 MHz clock clk, and the datapath advances when ce (the
// 26.5 MHz enable of the alignment stage) is high. rst is HF_Init.
module hitman
  import hf_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  raw_word_t   data_i,
  input  logic [3:0]  stream_id_i,
  input  logic        test_i,
  input  logic        test_step_i,
  // VME
  input  vme_bus_t    vme_i,
  output logic [17:0] vme_rdata_o,
  output logic        vme_rsel_o,
  // FIFO
  output logic        fifo_wen_o,
  output logic [17:0] fifo_wdata_o,
  // Input SPY buffer
  output logic        ispy_we_o,
  output logic [15:0] ispy_addr_o,
  output logic [17:0] ispy_wdata_o,
  input  logic [17:0] ispy_rdata_i,
  // Cluster RAM
  output logic        cram_we_o,
  output logic [16:0] cram_addr_o,
  output logic [7:0]  cram_wdata_o,
  input  logic [7:0]  cram_rdata_i,
  // status
  output logic        eoe_o,
  output logic        cluster_o
);

  // ---------------- VME registers ----------------
  logic [2:0] ds_sync_q;
  logic       vme_wr;
  logic [4:0] dev;
  logic [3:0] stream;
  logic [15:0] sub;
  logic       sel_rd, sel_wr;

  assign dev    = vme_i.addr[24:20];
  assign stream = vme_i.addr[19:16];
  assign sub    = vme_i.addr[15:0];
  assign sel_rd = vme_i.as && (stream == stream_id_i);
  assign sel_wr = vme_i.as && (stream == stream_id_i || stream == STREAM_BROADCAST);

  always_ff @(posedge clk) begin
    if (rst) ds_sync_q <= '0;
    else     ds_sync_q <= {ds_sync_q[1:0], vme_i.ds};
  end
  assign vme_wr = ds_sync_q[1] && !ds_sync_q[2] && vme_i.write && sel_wr;

  logic [7:0][7:0] chip_id_q;
  logic [7:0][6:0] thresh_q;
  logic [7:0]      charge_cut_q;
  logic [15:0]     max_clusters_q;
  logic [2:0]      n_chip_m1_q;
  logic            disable_q;
  logic [15:0]     ispy_cnt_q;

  logic hm_wr;
  assign hm_wr = vme_wr && dev == DEV_HITMAN;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) chip_id_q[i] <= {AXIAL_ID_TAG, 5'(i)};
      thresh_q       <= '0;
      charge_cut_q   <= '0;
      max_clusters_q <= '0;
      n_chip_m1_q    <= 3'd7;
      disable_q      <= 1'b0;
    end else if (hm_wr) begin
      if (sub[15:4] == 12'h100) chip_id_q[sub[2:0]] <= vme_i.wdata[7:0];
      if (sub[15:4] == 12'h101) thresh_q[sub[2:0]]  <= vme_i.wdata[6:0];
      if (sub == 16'h1020)      charge_cut_q        <= vme_i.wdata[7:0];
      if (sub == 16'h1101)
        for (int i = 0; i < 8; i++) chip_id_q[i] <= {AXIAL_ID_TAG, 5'(i)};
      if (sub == 16'h1102)      max_clusters_q      <= vme_i.wdata[15:0];
      if (sub == 16'h1103)      n_chip_m1_q         <= vme_i.wdata[2:0];
      if (sub == 16'h1104)      disable_q           <= vme_i.wdata[0];
    end
  end

  // ---------------- input selection and ISPY ----------------
  raw_word_t  in_w, spy_w;
  logic       prev_valid_q, halted_q;
  logic       ispy_vme;
  logic [17:0] spy_word;

  assign ispy_vme = vme_i.as && sel_wr && dev == DEV_ISPY;
  assign spy_word = ispy_rdata_i;

  always_comb begin
    spy_w = '{valid: spy_word[17], err: spy_word[16], data: spy_word[15:0]};
    if (!test_i) in_w = data_i;
    else if (halted_q || spy_word == 18'h10000 || spy_word == 18'h1ffff)
      in_w = '0;
    else in_w = spy_w;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ispy_cnt_q   <= '0;
      prev_valid_q <= 1'b0;
      halted_q     <= 1'b0;
    end else if (hm_wr && sub == 16'h1100) begin
      ispy_cnt_q <= '0;
      halted_q   <= 1'b0;
    end else if (ce) begin
      if (!test_i) begin
        halted_q     <= 1'b0;
        prev_valid_q <= data_i.valid;
        if (data_i.valid || prev_valid_q) ispy_cnt_q <= ispy_cnt_q + 16'd1;
      end else if (test_step_i && !halted_q) begin
        if (spy_word == 18'h1ffff)      ispy_cnt_q <= '0;
        else if (spy_word == 18'h10000) halted_q   <= 1'b1;
        else                            ispy_cnt_q <= ispy_cnt_q + 16'd1;
      end
    end
  end

  always_comb begin
    ispy_we_o    = 1'b0;
    ispy_addr_o  = ispy_cnt_q;
    ispy_wdata_o = {data_i.valid, data_i.err, data_i.data};
    if (ispy_vme) begin
      ispy_addr_o  = sub;
      ispy_wdata_o = vme_i.wdata[17:0];
      ispy_we_o    = vme_wr;
    end else if (!test_i && ce && (data_i.valid || prev_valid_q)) begin
      ispy_we_o = 1'b1;
    end
  end

  // ---------------- Ready / Aim / Fire ----------------
  // In test mode the whole pipeline advances only on test-clock steps, as if clocked by them.
  logic       dp_ce;
  assign dp_ce = ce && (!test_i || test_step_i);

  hit_t       ready_hit, aim_hit;
  logic       end_data, ready_eoe, trunc;
  logic [17:0] eoe_word;
  logic       ped_we;
  logic [6:0] ped_rdata;
  logic [14:0] fire_cram_addr;
  logic       fire_valid, fire_lc;
  logic [13:0] fire_pos;

  hm_ready u_ready (
    .clk, .rst, .ce(dp_ce),
    .in_i        (in_w),
    .chip_id_i   (chip_id_q),
    .n_chip_m1_i (n_chip_m1_q),
    .disable_i   (disable_q),
    .trunc_i     (trunc),
    .hit_o       (ready_hit),
    .end_data_o  (end_data),
    .eoe_o       (ready_eoe),
    .eoe_word_o  (eoe_word)
  );

  assign ped_we = hm_wr && sub[15:12] == 4'h0;

  hm_aim u_aim (
    .clk, .rst, .ce(dp_ce),
    .hit_i       (ready_hit),
    .thresh_i    (thresh_q),
    .ped_we_i    (ped_we),
    .ped_addr_i  (sub[9:0]),
    .ped_wdata_i (vme_i.wdata[6:0]),
    .ped_rdata_o (ped_rdata),
    .hit_o       (aim_hit)
  );

  hm_fire u_fire (
    .clk, .rst, .ce(dp_ce),
    .en           (aim_hit.valid || end_data),
    .hit_i        (aim_hit),
    .charge_cut_i (charge_cut_q),
    .cram_addr_o  (fire_cram_addr),
    .cram_data_i  (cram_rdata_i),
    .out_valid_o  (fire_valid),
    .out_lc_o     (fire_lc),
    .out_pos_o    (fire_pos)
  );

  // CRAM: VME owns it while addressing it, Fire otherwise.
  logic cram_vme;
  assign cram_vme = vme_i.as && sel_wr && (dev == DEV_CRAM0 || dev == DEV_CRAM1);
  always_comb begin
    cram_addr_o  = cram_vme ? {dev == DEV_CRAM1, sub} : {2'b00, fire_cram_addr};
    cram_we_o    = cram_vme && vme_wr;
    cram_wdata_o = vme_i.wdata[7:0];
  end

  // ---------------- cluster limit and FIFO write ----------------
  logic [15:0] nclust_q;
  logic        fire_take, limit_hit;
  // fire_valid can only change on an enabled cycle, so it is sampled with ce.
  assign limit_hit = (max_clusters_q != 16'd0) && (nclust_q >= max_clusters_q);
  assign fire_take = dp_ce && fire_valid && !limit_hit;
  assign trunc     = fire_valid && limit_hit;

  always_ff @(posedge clk) begin
    if (rst) nclust_q <= '0;
    else if (dp_ce) begin
      if (ready_eoe)      nclust_q <= '0;
      else if (fire_take) nclust_q <= nclust_q + 16'd1;
    end
  end

  logic fifo_vme_wr;
  assign fifo_vme_wr = vme_wr && dev == DEV_FIFO;

  always_comb begin
    fifo_wen_o   = fire_take || (dp_ce && ready_eoe) || fifo_vme_wr;
    if (fifo_vme_wr)    fifo_wdata_o = vme_i.wdata[17:0];
    else if (ready_eoe) fifo_wdata_o = eoe_word;
    else                fifo_wdata_o = {2'b00, 1'b0, fire_lc, fire_pos};
  end

  assign eoe_o     = dp_ce && ready_eoe;
  assign cluster_o = fire_take;

  // ---------------- VME read-back ----------------
  always_comb begin
    vme_rsel_o  = sel_rd && (dev == DEV_HITMAN || dev == DEV_ISPY ||
                             dev == DEV_CRAM0 || dev == DEV_CRAM1);
    vme_rdata_o = '0;
    unique case (dev)
      DEV_ISPY:             vme_rdata_o = ispy_rdata_i;
      DEV_CRAM0, DEV_CRAM1: vme_rdata_o = {10'd0, cram_rdata_i};
      DEV_HITMAN: begin
        if (sub[15:12] == 4'h0)       vme_rdata_o = {11'd0, ped_rdata};
        else if (sub[15:4] == 12'h100) vme_rdata_o = {10'd0, chip_id_q[sub[2:0]]};
        else if (sub[15:4] == 12'h101) vme_rdata_o = {11'd0, thresh_q[sub[2:0]]};
        else if (sub == 16'h1020)      vme_rdata_o = {10'd0, charge_cut_q};
        else if (sub == 16'h1100)      vme_rdata_o = {2'd0, ispy_cnt_q};
        else if (sub == 16'h1102)      vme_rdata_o = {2'd0, max_clusters_q};
        else if (sub == 16'h1103)      vme_rdata_o = {15'd0, n_chip_m1_q};
        else if (sub == 16'h1104)      vme_rdata_o = {17'd0, disable_q};
      end
      default: ;
    endcase
  end

endmodule
