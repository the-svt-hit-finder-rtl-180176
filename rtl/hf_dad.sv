// Data Alignment Device (DAD): two G-links in, five SVX readout streams out.
//
// Each G-link delivers a 20-bit word per 53 MHz cycle. The even link carries byte lanes for
// layers 0 and 1 (bits 7:0 and 15:8) and the low nibble of layer 4 (bits 19:16); the odd link
// carries layers 2 and 3 and the high nibble of layer 4. Layer 4 is therefore split across the
// two fibres and can only be assembled when both links are aligned.
//
// Valid words (DAV* low) of each link are written into a ten-word circular buffer. Once both
// buffers hold START words (or a link has already finished its event) the device starts reading
// one word from each buffer per 53 MHz cycle, which absorbs a phase difference of a few cycles
// between the links. Two consecutive bytes of a stream form one 16-bit word: the first byte goes
// to bits 15:8 (strip number or chip ID), the second to bits 7:0 (pulse height or status). Each
// 16-bit word is presented for two 53 MHz cycles, i.e. at 26.5 MHz; its valid bit is the AND of
// the valid bits of the bytes it is built from (two for layers 0-3, four for layer 4) and its
// error bit the OR of their error bits. When both DAV* are inactive and both buffers are empty the
// device returns to waiting. It performs no further error checking.
//
// Clocking: one 53 MHz clock is used for both links (the links are assumed to be frequency
// locked; a separate write clock per link is not modelled). The 26.5 MHz clock is produced as
// clk26_o, whose rising edge falls in the middle of each output word; ce26_o is the matching
// one-cycle clock enable for logic that runs on the 53 MHz clock. rst is the board HF_Init.
module hf_dad
  import hf_pkg::*;
#(
  parameter int unsigned DEPTH = 10,  // circular buffer depth per link
  parameter int unsigned START = 3    // words buffered before reading starts
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [1:0][19:0] link_data,
  input  logic [1:0]      link_dav_n,
  input  logic [1:0]      link_err,
  output logic            clk26_o,
  output logic            ce26_o,
  output raw_word_t [4:0] stream_o
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic        err;
    logic [19:0] data;
  } gword_t;

  gword_t [1:0][DEPTH-1:0] buf_q;
  logic [1:0][PW-1:0] wp_q, rp_q;
  logic [1:0][CW-1:0] cnt_q;
  logic [1:0]         ended_q;   // link has delivered data and dropped DAV* again
  logic [1:0]         seen_q;    // link has delivered at least one word this event
  logic               run_q;
  logic               ph_q;      // 0: first byte of a pair, 1: second byte

  logic [1:0] wr, rd, nonempty;
  logic       start, finish;

  always_comb begin
    for (int l = 0; l < 2; l++) begin
      wr[l]       = !link_dav_n[l];
      nonempty[l] = (cnt_q[l] != '0);
      rd[l]       = run_q && nonempty[l];
    end
  end

  // Start when each link has enough words or has already finished its event; finish at the end
  // of a byte pair once both links are idle and this cycle empties both buffers.
  assign start  = !run_q && ph_q && (nonempty != 2'b00) &&
                  ((cnt_q[0] >= CW'(START)) || ended_q[0]) &&
                  ((cnt_q[1] >= CW'(START)) || ended_q[1]);
  assign finish = run_q && ph_q && (link_dav_n == 2'b11) &&
                  (cnt_q[0] <= CW'(rd[0])) && (cnt_q[1] <= CW'(rd[1]));

  always_ff @(posedge clk) begin
    if (rst) begin
      wp_q <= '0; rp_q <= '0; cnt_q <= '0; ended_q <= '0; seen_q <= '0;
      run_q <= 1'b0; ph_q <= 1'b0;
    end else begin
      ph_q <= !ph_q;
      if (start) run_q <= 1'b1;
      else if (finish) begin
        run_q   <= 1'b0;
        ended_q <= '0;
        seen_q  <= '0;
      end
      for (int l = 0; l < 2; l++) begin
        if (wr[l]) begin
          buf_q[l][wp_q[l]] <= '{err: link_err[l], data: link_data[l]};
          wp_q[l] <= (wp_q[l] == PW'(DEPTH - 1)) ? '0 : wp_q[l] + 1'b1;
          seen_q[l] <= 1'b1;
        end else if (seen_q[l] && !finish) begin
          ended_q[l] <= 1'b1;
        end
        if (rd[l]) rp_q[l] <= (rp_q[l] == PW'(DEPTH - 1)) ? '0 : rp_q[l] + 1'b1;
        cnt_q[l] <= cnt_q[l] + CW'(wr[l]) - CW'(rd[l]);
      end
    end
  end

  // Byte lanes of the current read (invalid when a buffer has nothing to give).
  logic [4:0][7:0] byte_d;
  logic [4:0]      bval, berr;
  gword_t          g0, g1;
  always_comb begin
    g0 = buf_q[0][rp_q[0]];
    g1 = buf_q[1][rp_q[1]];
    byte_d[0] = g0.data[7:0];
    byte_d[1] = g0.data[15:8];
    byte_d[2] = g1.data[7:0];
    byte_d[3] = g1.data[15:8];
    byte_d[4] = {g1.data[19:16], g0.data[19:16]};
    bval[0] = rd[0]; bval[1] = rd[0];
    bval[2] = rd[1]; bval[3] = rd[1];
    bval[4] = rd[0] && rd[1];
    berr[0] = rd[0] && g0.err; berr[1] = rd[0] && g0.err;
    berr[2] = rd[1] && g1.err; berr[3] = rd[1] && g1.err;
    berr[4] = (rd[0] && g0.err) || (rd[1] && g1.err);
  end

  // Pair bytes into 16-bit words.
  logic [4:0][7:0] hi_q;
  logic [4:0]      hval_q, herr_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      stream_o <= '0;
      hval_q   <= '0;
      herr_q   <= '0;
    end else if (!ph_q) begin
      hi_q   <= byte_d;
      hval_q <= bval;
      herr_q <= berr;
    end else begin
      for (int s = 0; s < 5; s++)
        stream_o[s] <= '{valid: hval_q[s] && bval[s],
                         err:   herr_q[s] || berr[s],
                         data:  {hi_q[s], byte_d[s]}};
    end
  end

  assign clk26_o = ph_q;
  assign ce26_o  = ph_q;

endmodule
