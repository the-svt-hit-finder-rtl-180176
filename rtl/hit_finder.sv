// Hit Finder board: silicon-strip raw data in, cluster positions out.
//
// Four G-link channels (20 data bits, DAV*, ERROR and LNKRDY* each, 53 MHz) carry the SVX
// readout of two barrels of one wedge, five layers each. Two alignment chips (hf_dad) turn each
// pair of links into five 16-bit streams at 26.5 MHz. Ten clustering engines (hit_squad:
// HitMan, Input SPY buffer, Cluster RAM, FIFO) reduce each stream to cluster positions and an
// end-of-event word. The Merger, on the 30 MHz back-end clock, reads the ten FIFOs into one path
// and labels each word with its stream; the output processor (hf_mop) maps streams to layer and
// barrel, checks errors, writes one end-of-event word per event and drives the front panel and
// the Output SPY buffer. The Boot chip (hf_boot) provides HF_Init, the mode and test bits,
// test-clock pacing and the internal VME bus shared by all chips.
//
// Stream numbering follows the Merger: the first alignment chip (links 0 and 1) feeds streams
// 0, 6, 2, 8, 4 with layers 0-4, the second (links 2 and 3) streams 5, 1, 7, 3, 9, so that the
// two Merger data paths (streams 0-4 and 5-9) each carry layers of both barrels.
//
// Interface: link_* are the G-link signals, all sampled on clk53 (one clock for the four links
// is this design's simplification). clk30 is the back-end clock, tap_clk the 25 MHz timing clock
// of the VME strobes, por the power-on reset. Front panel: out_data_o with valid1_o/valid2_o
// running half a cycle ahead of the data on clk30; the external 10 ns delay and NAND that turn
// them into the data strobes are not on this module. hold1_i/hold2_i are the front-panel Hold
// inputs. P2: cdf_error_n_o, svt_error_n_o, lost_lock_n_o (active low). lights_o feeds the
// front-panel LEDs of the Boot chip; the LED one-shots are not part of this module.
module hit_finder
  import hf_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4096
) (
  input  logic             clk53,
  input  logic             clk30,
  input  logic             tap_clk,
  input  logic             por,
  input  logic             svt_init_n,
  // G-links
  input  logic [3:0][19:0] link_data,
  input  logic [3:0]       link_dav_n,
  input  logic [3:0]       link_err,
  input  logic [3:0]       link_lnkrdy_n,
  // VME (buffered)
  input  logic [31:2]      vme_addr,
  input  logic [31:0]      vme_data,
  input  logic             vme_data_str_n,
  input  logic             vme_write,
  output logic             vme_ack,
  output logic [31:0]      vme_rdata,
  // front panel
  output logic [22:0]      out_data_o,
  output logic             valid1_o,
  output logic             valid2_o,
  output logic             led1_n_o,
  output logic             led2_n_o,
  input  logic             hold1_i,
  input  logic             hold2_i,
  // P2 slow control
  output logic             cdf_error_n_o,
  output logic             svt_error_n_o,
  output logic             lost_lock_n_o,
  // front-panel lights driven by the Boot chip (active high): 0 VME ack, 1 run mode,
  // 2 SVT error, 3 CDF error, 4 boot mode, 5 load mode, 6 test mode
  output logic [6:0]       lights_o
);

  // ---------------- Boot chip ----------------
  vme_bus_t   hf_vme;
  logic       hf_init, hf_load, hf_freeze, test_step30, test_tgl, bkup_en;
  logic [2:0] hf_test;
  logic [3:0] div;
  logic [1:0] mode;
  logic [31:0] board_rdata;

  hf_boot u_boot (
    .clk(clk30), .tap_clk, .por, .svt_init_n,
    .vme_addr, .vme_data, .vme_data_str_n, .vme_write, .vme_ack,
    .vme_rdata_o  (vme_rdata),
    .board_rdata_i(board_rdata),
    .hf_vme_o     (hf_vme),
    .hf_init_o    (hf_init),
    .hf_load_o    (hf_load),
    .hf_freeze_o  (hf_freeze),
    .hf_test_o    (hf_test),
    .test_step_o  (test_step30),
    .test_tgl_o   (test_tgl),
    .div_o        (div),
    .bkup_en_o    (bkup_en),
    .mode_o       (mode)
  );

  // HF_Init into the front-end clock domain.
  logic [1:0] init53_q;
  logic       rst53;
  always_ff @(posedge clk53) init53_q <= {init53_q[0], hf_init || por};
  assign rst53 = init53_q[1];

  // ---------------- alignment ----------------
  raw_word_t [1:0][4:0] dad_out;
  logic [1:0] ce26, clk26;   // clk26 is the 26.5 MHz pin clock; the logic uses ce26

  for (genvar d = 0; d < 2; d++) begin : g_dad
    hf_dad u_dad (
      .clk       (clk53),
      .rst       (rst53),
      .link_data (link_data[2*d+1:2*d]),
      .link_dav_n(link_dav_n[2*d+1:2*d]),
      .link_err  (link_err[2*d+1:2*d]),
      .clk26_o   (clk26[d]),
      .ce26_o    (ce26[d]),
      .stream_o  (dad_out[d])
    );
  end

  // ---------------- clustering engines ----------------
  // Merger stream number of alignment chip d, layer l.
  function automatic int unsigned stream_of(input int unsigned d, input int unsigned l);
    logic [39:0] order;
    order = (d == 0) ? {4'd4, 4'd8, 4'd2, 4'd6, 4'd0, 20'd0} : {4'd9, 4'd3, 4'd7, 4'd1, 4'd5, 20'd0};
    return int'(order[20 + 4*l +: 4]);
  endfunction

  logic [9:0]       ren, empty_n, full_n, hm_eoe, hm_cluster;
  logic [9:0][17:0] fifo_q;
  logic [9:0][17:0] hm_rdata;
  logic [9:0]       hm_rsel;
  logic [1:0]       step53;

  for (genvar d = 0; d < 2; d++) begin : g_step
    hf_step_sync u_step (
      .clk(clk53), .rst(rst53), .ce(ce26[d]), .tgl_i(test_tgl), .step_o(step53[d])
    );
  end

  for (genvar d = 0; d < 2; d++) begin : g_side
    for (genvar l = 0; l < 5; l++) begin : g_layer
      localparam int unsigned S = stream_of(d, l);
      hit_squad #(.FIFO_DEPTH(FIFO_DEPTH)) u_squad (
        .clk         (clk53),
        .rst         (rst53),
        .ce          (ce26[d]),
        .data_i      (dad_out[d][l]),
        .stream_id_i (4'(S)),
        .test_i      (hf_test[0]),
        .test_step_i (step53[d]),
        .vme_i       (hf_vme),
        .vme_rdata_o (hm_rdata[S]),
        .vme_rsel_o  (hm_rsel[S]),
        .rclk        (clk30),
        .rrst        (hf_init || por),
        .rd_en_i     (ren[S]),
        .rd_data_o   (fifo_q[S]),
        .empty_n_o   (empty_n[S]),
        .full_n_o    (full_n[S]),
        .eoe_o       (hm_eoe[S]),
        .cluster_o   (hm_cluster[S])
      );
    end
  end

  // ---------------- Merger ----------------
  logic [23:0] merged;
  logic        hold;
  logic [31:0] mrg_rdata;
  logic        mrg_rsel;

  hf_merger u_merger (
    .clk(clk30), .rst(hf_init || por),
    .test_i      (hf_test[2]),
    .hold_i      (hold),
    .empty_n_i   (empty_n),
    .fifo_data_i (fifo_q),
    .ren_o       (ren),
    .merged_o    (merged),
    .vme_i       (hf_vme),
    .vme_rdata_o (mrg_rdata),
    .vme_rsel_o  (mrg_rsel)
  );

  // ---------------- MOP and OSPY ----------------
  logic        ospy_we;
  logic [15:0] ospy_addr;
  logic [35:0] ospy_wdata, ospy_rdata;
  logic        cdf_err, svt_err, llock, mop_eoe;
  logic [31:0] mop_rdata;
  logic        mop_rsel;

  hf_mop u_mop (
    .clk(clk30), .rst(hf_init || por),
    .merged_i     (merged),
    .fifo_full_n_i(full_n),
    .lost_lock_i  (link_lnkrdy_n),
    .hold1_i, .hold2_i,
    .hold_o       (hold),
    .test_i       (hf_test[1]),
    .test_step_i  (test_step30),
    .out_data_o, .valid1_o, .valid2_o, .led1_n_o, .led2_n_o,
    .cdf_error_o  (cdf_err),
    .svt_error_o  (svt_err),
    .lost_lock_o  (llock),
    .ospy_we_o    (ospy_we),
    .ospy_addr_o  (ospy_addr),
    .ospy_wdata_o (ospy_wdata),
    .ospy_rdata_i (ospy_rdata),
    .vme_i        (hf_vme),
    .vme_rdata_o  (mop_rdata),
    .vme_rsel_o   (mop_rsel),
    .eoe_o        (mop_eoe)
  );

  hf_spy_ram #(.AW(16), .W(36)) u_ospy (
    .clk(clk30), .we(ospy_we), .addr(ospy_addr), .wdata(ospy_wdata), .rdata(ospy_rdata)
  );

  // ---------------- VME read-back and P2 ----------------
  always_comb begin
    board_rdata = '0;
    for (int i = 0; i < 10; i++) if (hm_rsel[i]) board_rdata |= {14'd0, hm_rdata[i]};
    if (mrg_rsel) board_rdata |= mrg_rdata;
    if (mop_rsel) board_rdata |= mop_rdata;
  end

  assign cdf_error_n_o = !cdf_err;
  assign svt_error_n_o = !svt_err;
  assign lost_lock_n_o = !llock;

  assign lights_o = {mode == 2'd1, hf_load, mode == 2'd0, cdf_err, svt_err, mode == 2'd2, vme_ack};

endmodule
