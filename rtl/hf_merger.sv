// Merger: reads the ten clustering-engine FIFOs into one data path.
//
// The FIFOs form two groups of five (streams 0-4 and 5-9), each group sharing a data path.
// On even 30 MHz cycles the Merger considers streams 0-4, on odd cycles streams 5-9. It keeps
// one end-of-event flag per stream: among the streams of the current group whose flag is clear,
// whose FIFO is not empty and that are not masked off, it reads one (the lowest-numbered). The
// word arrives one cycle later and leaves as a merged word: bits 17:0 the FIFO word, bits 22:18
// the stream number modulo five as a one-hot code (zero when no word is present), bit 23 set
// for streams 5-9. A word with its end-of-event bit set sets that stream's flag; once all ten
// flags are set they are all cleared, so words of the next event are only read once every
// stream has finished the current one. Because a group is visited every second cycle, the
// empty flag and end-of-event flag of a stream are always up to date when it is next considered.
// While hold_i is high no new read is started. In deterministic mode (test_i, HF_Test2) only the
// lowest-numbered stream without its flag is eligible, so streams are read out in full, one
// after another, at most one word per two cycles.
//
// VME (address bits 24:14 only): device 6 subaddress 0x0000 is the stream disable mask
// (read/write), 0x8000 reads the ten empty* flags; a read of device 5 takes one word from the
// addressed stream's FIFO. Masked streams count as finished. The lowest-number choice and the
// treatment of masked streams are this design's own choices.
module hf_merger
  import hf_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             test_i,
  input  logic             hold_i,
  input  logic [9:0]       empty_n_i,
  input  logic [9:0][17:0] fifo_data_i,
  output logic [9:0]       ren_o,
  output logic [23:0]      merged_o,
  // VME
  input  vme_bus_t         vme_i,
  output logic [31:0]      vme_rdata_o,
  output logic             vme_rsel_o
);

  logic       odd_q;
  logic [9:0] eoe_q, mask_q;
  logic       rd_valid_q;
  logic [3:0] rd_stream_q;
  logic [9:0] eligible;
  logic [3:0] pick;
  logic       pick_ok;
  logic [17:0] word;
  logic [9:0] done;
  logic [9:0] first;

  // VME access
  logic [2:0]  ds_sync_q;
  logic        vme_strobe, vme_fifo_rd;
  logic [4:0]  dev;
  logic [3:0]  vstream;
  logic [17:0] vme_fifo_q;
  logic        vme_rd_pend_q;
  logic [3:0]  vme_rd_stream_q;

  assign dev     = vme_i.addr[24:20];
  assign vstream = vme_i.addr[19:16];

  always_ff @(posedge clk) begin
    if (rst) ds_sync_q <= '0;
    else     ds_sync_q <= {ds_sync_q[1:0], vme_i.ds};
  end
  assign vme_strobe  = ds_sync_q[1] && !ds_sync_q[2] && vme_i.as;
  assign vme_fifo_rd = vme_strobe && !vme_i.write && dev == DEV_FIFO && vstream < 4'd10;

  assign done = eoe_q | mask_q;

  always_comb begin
    eligible = '0;
    first    = '0;
    for (int s = 0; s < 10; s++)
      eligible[s] = !done[s] && empty_n_i[s] && ((s >= 5) == odd_q) &&
                    !(rd_valid_q && rd_stream_q == 4'(s));
    if (test_i) begin
      // only the first unfinished stream may be read
      for (int s = 9; s >= 0; s--)
        if (!done[s]) first = 10'b1 << s;
      eligible = eligible & first;
    end
    pick    = '0;
    pick_ok = 1'b0;
    for (int s = 9; s >= 0; s--)
      if (eligible[s]) begin
        pick    = 4'(s);
        pick_ok = 1'b1;
      end
    if (hold_i || vme_fifo_rd || vme_rd_pend_q) pick_ok = 1'b0;
  end

  always_comb begin
    ren_o = '0;
    if (pick_ok)     ren_o[pick]    = 1'b1;
    if (vme_fifo_rd) ren_o[vstream] = 1'b1;
  end

  assign word = fifo_data_i[rd_stream_q];

  always_ff @(posedge clk) begin
    if (rst) begin
      odd_q         <= 1'b0;
      eoe_q         <= '0;
      mask_q        <= '0;
      rd_valid_q    <= 1'b0;
      rd_stream_q   <= '0;
      merged_o      <= '0;
      vme_rd_pend_q <= 1'b0;
      vme_rd_stream_q <= '0;
      vme_fifo_q    <= '0;
    end else begin
      odd_q       <= !odd_q;
      rd_valid_q  <= pick_ok;
      rd_stream_q <= pick;
      merged_o    <= '0;
      if (rd_valid_q) begin
        merged_o <= {stream_label(int'(rd_stream_q)), word};
        if (word[FB_EE]) begin
          if ((done | (10'b1 << rd_stream_q)) == 10'h3ff) eoe_q <= '0;
          else eoe_q[rd_stream_q] <= 1'b1;
        end
      end else if (done == 10'h3ff && eoe_q != 10'h0) begin
        eoe_q <= '0;
      end
      vme_rd_pend_q <= vme_fifo_rd;
      if (vme_fifo_rd) vme_rd_stream_q <= vstream;
      if (vme_rd_pend_q) vme_fifo_q <= fifo_data_i[vme_rd_stream_q];
      if (vme_strobe && vme_i.write && dev == DEV_MERGER && !vme_i.addr[15])
        mask_q <= vme_i.wdata[9:0];
    end
  end

  always_comb begin
    vme_rsel_o  = vme_i.as && !vme_i.write && (dev == DEV_MERGER || dev == DEV_FIFO);
    vme_rdata_o = '0;
    if (dev == DEV_FIFO)     vme_rdata_o = {14'd0, vme_fifo_q};
    else if (vme_i.addr[15]) vme_rdata_o = {22'd0, empty_n_i};
    else                     vme_rdata_o = {22'd0, mask_q};
  end

endmodule
