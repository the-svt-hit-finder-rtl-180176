// MOP (Merger Output Processor): turns the merged stream into the board's output words.
//
// For each merged cluster word the six-bit stream label is decoded to a stream number and
// looked up in the ten-entry barrel/layer map; the output word is {EE=0, EP=1, layer(3),
// barrel(3), long-cluster, chip/strip/substrip(14)}. End-of-event words from the clustering
// engines are not passed on: their invalid-data and truncated-data flags are collected, and
// their bunch crossing numbers are compared with the first one of the event (lost sync).
// During the event the MOP also watches the four lost-lock inputs and the ten FIFO full*
// flags. When every enabled stream has delivered its end-of-event word the MOP writes its own:
// {EE=1, EP=1, error flags(12), parity, bunch crossing(8)}, where the parity bit is the XOR of
// bits 21:0 of all cluster words of the event. Error flags that are set in the end-of-event
// error mask are left out of the word; all event errors also accumulate in a sticky error
// register from which, through two masks, the CDF and SVT error outputs are formed. The lost
// lock output is the OR of the lost-lock inputs.
//
// Output timing: the data word is registered on the rising clock edge; its valid signal is
// registered on the falling edge half a cycle earlier, so that an external 10 ns delay and a
// NAND with the clock form the data strobe. The front-panel LED outputs (active low) are low in
// every cycle that carries a valid word. The two Hold inputs are ORed and sent to the Merger.
// Every output word is also written into the Output SPY buffer at an incrementing address; in
// OSPY test mode (test_i) the words stored there, from address 0 up to the count held when the
// mode was entered, are sent out instead, one per cycle with test_step_i high.
//
// VME (device 7, stream 0): 0x0000 stream disable mask, 0x100N barrel/layer map entry N,
// 0x1100 OSPY counter, 0x1200 clear the end-of-event error flags, 0x1201 clear the error
// register, 0x1210/0x1212/0x1213 end-of-event, CDF and SVT error masks, 0x1214 error register;
// device 8 is the OSPY memory. Only the seven named error conditions are implemented, in the
// low bits of each register. Default map: streams 0,6,2,8,4 are layers 1-5 of barrel 1 and
// streams 5,1,7,3,9 layers 1-5 of barrel 2, following the order in which the two alignment
// chips feed the streams; the on-board assignment is programmed over VME.
module hf_mop
  import hf_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [23:0] merged_i,
  input  logic [9:0]  fifo_full_n_i,
  input  logic [3:0]  lost_lock_i,
  input  logic        hold1_i,
  input  logic        hold2_i,
  output logic        hold_o,
  input  logic        test_i,
  input  logic        test_step_i,
  // front panel
  output logic [22:0] out_data_o,
  output logic        valid1_o,
  output logic        valid2_o,
  output logic        led1_n_o,
  output logic        led2_n_o,
  // P2 error lines (active high here)
  output logic        cdf_error_o,
  output logic        svt_error_o,
  output logic        lost_lock_o,
  // OSPY
  output logic        ospy_we_o,
  output logic [15:0] ospy_addr_o,
  output logic [35:0] ospy_wdata_o,
  input  logic [35:0] ospy_rdata_i,
  // VME
  input  vme_bus_t    vme_i,
  output logic [31:0] vme_rdata_o,
  output logic        vme_rsel_o,
  // status
  output logic        eoe_o
);

  // ---------------- VME registers ----------------
  logic [2:0]  ds_sync_q;
  logic        vme_wr;
  logic [4:0]  dev;
  logic [15:0] sub;
  logic [9:0]  disable_q;
  logic [9:0][5:0] map_q;   // {layer, barrel}
  logic [11:0] ee_mask_q, cdf_mask_q, svt_mask_q, err_reg_q;
  logic [15:0] ospy_cnt_q;

  assign dev = vme_i.addr[24:20];
  assign sub = vme_i.addr[15:0];

  always_ff @(posedge clk) begin
    if (rst) ds_sync_q <= '0;
    else     ds_sync_q <= {ds_sync_q[1:0], vme_i.ds};
  end
  assign vme_wr = ds_sync_q[1] && !ds_sync_q[2] && vme_i.as && vme_i.write;

  function automatic logic [5:0] default_map(input int unsigned s);
    // stream order of the two alignment chips: 0 6 2 8 4 | 5 1 7 3 9
    case (s)
      0: return {3'd1, 3'd1};  6: return {3'd2, 3'd1};  2: return {3'd3, 3'd1};
      8: return {3'd4, 3'd1};  4: return {3'd5, 3'd1};
      5: return {3'd1, 3'd2};  1: return {3'd2, 3'd2};  7: return {3'd3, 3'd2};
      3: return {3'd4, 3'd2};  default: return {3'd5, 3'd2};
    endcase
  endfunction

  // ---------------- event processing ----------------
  logic [3:0]  s;
  logic        in_valid, in_ee;
  logic [17:0] w;
  logic [9:0]  seen_q;
  logic        have_bx_q;
  logic [7:0]  bx_q;
  logic [11:0] ev_err_q, ev_err_n;
  logic        parity_q;
  logic        clr_ee, clr_err;
  logic [22:0] word_n;
  logic        word_valid_n;
  logic        last_ee;

  assign clr_ee  = vme_wr && dev == DEV_MOP && sub == 16'h1200;
  assign clr_err = vme_wr && dev == DEV_MOP && sub == 16'h1201;

  assign in_valid = merged_i[22:18] != 5'd0;
  assign s        = 4'(label_to_stream(merged_i[23:18]));
  assign w        = merged_i[17:0];
  assign in_ee    = in_valid && w[FB_EE];
  assign last_ee  = in_ee && ((seen_q | disable_q | (10'b1 << s)) == 10'h3ff);

  always_comb begin
    ev_err_n = ev_err_q;
    if (|lost_lock_i)       ev_err_n[ERR_LOSTLOCK] = 1'b1;
    if (fifo_full_n_i != 10'h3ff) ev_err_n[ERR_FIFOOVF] = 1'b1;
    if (in_ee) begin
      if (w[FB_TD]) ev_err_n[ERR_TRUNC]   = 1'b1;
      if (w[FB_ID]) ev_err_n[ERR_INVDATA] = 1'b1;
      if (have_bx_q && w[7:0] != bx_q) ev_err_n[ERR_LOSTSYNC] = 1'b1;
    end
  end

  always_comb begin
    word_valid_n = 1'b0;
    word_n       = '0;
    if (in_valid && !in_ee) begin
      word_valid_n = 1'b1;
      word_n = {1'b0, 1'b1, map_q[s], w[14:0]};
    end else if (last_ee) begin
      word_valid_n = 1'b1;
      word_n = {1'b1, 1'b1, ev_err_n & ~ee_mask_q, parity_q, bx_q};
      if (!have_bx_q) word_n[7:0] = w[7:0];
    end
  end

  // ---------------- OSPY and test mode ----------------
  logic        test_q;
  logic [15:0] replay_addr_q, replay_end_q;
  logic        replay_valid_q;
  logic        ospy_vme;

  assign ospy_vme = vme_i.as && dev == DEV_OSPY;

  always_ff @(posedge clk) begin
    if (rst) begin
      seen_q    <= '0;
      have_bx_q <= 1'b0;
      bx_q      <= '0;
      ev_err_q  <= '0;
      parity_q  <= 1'b0;
      err_reg_q <= '0;
      disable_q <= '0;
      ee_mask_q <= '0;
      cdf_mask_q <= '0;
      svt_mask_q <= '0;
      ospy_cnt_q <= '0;
      test_q     <= 1'b0;
      replay_addr_q  <= '0;
      replay_end_q   <= '0;
      replay_valid_q <= 1'b0;
      out_data_o <= '0;
      for (int i = 0; i < 10; i++) map_q[i] <= default_map(i);
    end else begin
      // event bookkeeping
      ev_err_q <= ev_err_n;
      if (in_valid && !in_ee) parity_q <= parity_q ^ (^w[14:0]) ^ (^map_q[s]) ^ 1'b1;
      if (in_ee) begin
        if (!have_bx_q) begin
          have_bx_q <= 1'b1;
          bx_q      <= w[7:0];
        end
        seen_q[s] <= 1'b1;
      end
      if (last_ee) begin
        seen_q    <= '0;
        have_bx_q <= 1'b0;
        ev_err_q  <= '0;
        parity_q  <= 1'b0;
        err_reg_q <= err_reg_q | ev_err_n;
      end
      if (clr_ee)  ev_err_q  <= '0;
      if (clr_err) err_reg_q <= '0;
      // registers
      if (vme_wr && dev == DEV_MOP) begin
        if (sub == 16'h0000)        disable_q <= vme_i.wdata[9:0];
        if (sub[15:4] == 12'h100 && sub[3:0] < 4'd10) map_q[sub[3:0]] <= vme_i.wdata[5:0];
        if (sub == 16'h1100)        ospy_cnt_q <= vme_i.wdata[15:0];
        if (sub == 16'h1210)        ee_mask_q  <= vme_i.wdata[11:0];
        if (sub == 16'h1212)        cdf_mask_q <= vme_i.wdata[11:0];
        if (sub == 16'h1213)        svt_mask_q <= vme_i.wdata[11:0];
      end
      // output word and OSPY
      test_q <= test_i;
      if (test_i && !test_q) begin
        replay_addr_q <= '0;
        replay_end_q  <= ospy_cnt_q;
      end
      replay_valid_q <= 1'b0;
      if (test_i) begin
        if (test_step_i && test_q && replay_addr_q != replay_end_q) begin
          replay_addr_q  <= replay_addr_q + 16'd1;
          replay_valid_q <= 1'b1;
        end
        if (replay_valid_q) out_data_o <= ospy_rdata_i[22:0];
      end else begin
        if (word_valid_n) begin
          out_data_o <= word_n;
          ospy_cnt_q <= ospy_cnt_q + 16'd1;
        end
      end
    end
  end

  // Valid is launched on the falling edge, half a cycle ahead of the word it belongs to.
  logic valid_next, valid_neg_q, word_out_q;
  assign valid_next = test_i ? replay_valid_q : word_valid_n;
  always_ff @(negedge clk) begin
    if (rst) valid_neg_q <= 1'b0;
    else     valid_neg_q <= valid_next;
  end
  always_ff @(posedge clk) begin
    if (rst) word_out_q <= 1'b0;
    else     word_out_q <= valid_next;
  end

  assign valid1_o = valid_neg_q;
  assign valid2_o = valid_neg_q;
  assign led1_n_o = !word_out_q;
  assign led2_n_o = !word_out_q;
  assign hold_o   = hold1_i || hold2_i;
  assign eoe_o    = last_ee && !test_i;

  assign cdf_error_o = |(err_reg_q & cdf_mask_q);
  assign svt_error_o = |(err_reg_q & svt_mask_q);
  assign lost_lock_o = |lost_lock_i;

  always_comb begin
    ospy_addr_o  = test_i ? replay_addr_q : ospy_cnt_q;
    ospy_wdata_o = {13'd0, word_n};
    ospy_we_o    = !test_i && word_valid_n;
    if (ospy_vme) begin
      ospy_addr_o  = sub;
      ospy_wdata_o = {4'd0, vme_i.wdata};
      ospy_we_o    = vme_wr;
    end
  end

  always_comb begin
    vme_rsel_o  = vme_i.as && !vme_i.write && (dev == DEV_MOP || dev == DEV_OSPY);
    vme_rdata_o = '0;
    if (dev == DEV_OSPY) vme_rdata_o = ospy_rdata_i[31:0];
    else if (sub == 16'h0000)  vme_rdata_o = {22'd0, disable_q};
    else if (sub[15:4] == 12'h100 && sub[3:0] < 4'd10) vme_rdata_o = {26'd0, map_q[sub[3:0]]};
    else if (sub == 16'h1100)  vme_rdata_o = {16'd0, ospy_cnt_q};
    else if (sub == 16'h1210)  vme_rdata_o = {20'd0, ee_mask_q};
    else if (sub == 16'h1212)  vme_rdata_o = {20'd0, cdf_mask_q};
    else if (sub == 16'h1213)  vme_rdata_o = {20'd0, svt_mask_q};
    else if (sub == 16'h1214)  vme_rdata_o = {20'd0, err_reg_q};
  end

endmodule
