// Ready: the raw-data parser at the head of a clustering engine (HitMan).
//
// One 16-bit SVX word arrives per 26.5 MHz cycle (clock enable ce). The high byte classifies
// the word: 100xxxxx is an axial chip ID, 101xxxxx a stereo chip ID, 0xxxxxxx a strip number
// with the pulse height in the low byte. The state machine
//   READY   waits for the first valid word of an event and discards it (HDI ID);
//   HEADER  latches the bunch crossing number (high byte) into the end-of-event word and clears
//           the event registers;
//   RUNDATA follows the axial chip IDs (chip count starts at the illegal value 15; each axial
//           ID must equal the next programmed chip ID, else the count becomes 15) and turns each
//           strip word into {valid, chip(3), strip(7), pulse height(8)}. A strip word is in
//           error if its chip+strip number is below the previous one, if the chip count is 15,
//           or if its ERROR bit is set: it is then marked invalid, the invalid-data flag is set
//           and the machine ends the event. A stereo chip ID also ends the event;
//   ENDDATA emits 21 invalid words to flush the Aim and Fire pipelines, then raises eoe_o for
//           one cycle together with the end-of-event word;
//   WAIT    waits for a word with the valid bit clear, then returns to READY;
//   DISABLED is entered and left only through the VME-controlled disable input.
// This design's own choices: an event that loses its valid bit in RUNDATA, or an
// end-of-readout byte (11xxxxxx), also ends the event; more axial chip IDs than programmed give
// chip count 15; the diagnostic bits 11:8 of the end-of-event word carry the final chip count.
// All outputs are registered and change only when ce is high.
module hm_ready
  import hf_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  input  raw_word_t       in_i,
  input  logic [7:0][7:0] chip_id_i,     // programmed axial chip ID bytes
  input  logic [2:0]      n_chip_m1_i,   // number of expected chip IDs minus one
  input  logic            disable_i,     // hold the machine in DISABLED
  input  logic            trunc_i,       // cluster limit exceeded in this event
  output hit_t            hit_o,
  output logic            end_data_o,    // in ENDDATA (Fire clock enable term)
  output logic            eoe_o,         // one-cycle end-of-event flag
  output logic [FW-1:0]   eoe_word_o
);

  typedef enum logic [2:0] {S_READY, S_HEADER, S_RUNDATA, S_ENDDATA, S_WAIT, S_DISABLED} state_t;

  localparam int unsigned FLUSH = 21;

  state_t     state_q;
  logic [3:0] chip_q;
  logic [9:0] last_cs_q;
  logic [7:0] bx_q;
  logic       id_err_q, td_q;
  logic [4:0] flush_q;

  logic [7:0] hi, lo;
  logic [9:0] cs;
  logic [3:0] next_idx;
  assign hi = in_i.data[15:8];
  assign lo = in_i.data[7:0];
  assign cs = {chip_q[2:0], hi[6:0]};
  assign next_idx = (chip_q == CHIP_NONE) ? 4'd0 : chip_q + 4'd1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= S_READY;
      chip_q    <= CHIP_NONE;
      last_cs_q <= '0;
      bx_q      <= '0;
      id_err_q  <= 1'b0;
      td_q      <= 1'b0;
      flush_q   <= '0;
      hit_o     <= '0;
      eoe_o     <= 1'b0;
    end else if (ce) begin
      hit_o <= '0;
      eoe_o <= 1'b0;
      if (trunc_i) td_q <= 1'b1;
      if (disable_i) begin
        state_q <= S_DISABLED;
      end else begin
        unique case (state_q)
          S_DISABLED: state_q <= S_READY;
          S_READY:    if (in_i.valid) state_q <= S_HEADER;
          S_HEADER: begin
            bx_q      <= hi;
            chip_q    <= CHIP_NONE;
            last_cs_q <= '0;
            id_err_q  <= 1'b0;
            td_q      <= 1'b0;
            state_q   <= S_RUNDATA;
          end
          S_RUNDATA: begin
            if (!in_i.valid || hi[7:6] == 2'b11 || hi[7:5] == STEREO_ID_TAG) begin
              flush_q <= '0;
              state_q <= S_ENDDATA;
            end else if (hi[7:5] == AXIAL_ID_TAG) begin
              if (chip_q != CHIP_NONE && chip_q[2:0] == n_chip_m1_i) chip_q <= CHIP_NONE;
              else if (next_idx[3] || hi != chip_id_i[next_idx[2:0]]) chip_q <= CHIP_NONE;
              else chip_q <= next_idx;
            end else if (!hi[7]) begin
              if (cs < last_cs_q || chip_q == CHIP_NONE || in_i.err) begin
                id_err_q <= 1'b1;
                flush_q  <= '0;
                state_q  <= S_ENDDATA;
              end else begin
                hit_o     <= '{valid: 1'b1, cs: cs, ph: lo};
                last_cs_q <= cs;
              end
            end
          end
          S_ENDDATA: begin
            if (flush_q == 5'(FLUSH)) begin
              eoe_o   <= 1'b1;
              state_q <= S_WAIT;
            end
            flush_q <= flush_q + 5'd1;
          end
          S_WAIT:     if (!in_i.valid) state_q <= S_READY;
          default:    state_q <= S_READY;
        endcase
      end
    end
  end

  assign end_data_o = (state_q == S_ENDDATA);
  always_comb begin
    eoe_word_o        = '0;
    eoe_word_o[FB_EE] = 1'b1;
    eoe_word_o[FB_TD] = td_q;
    eoe_word_o[FB_ID] = id_err_q;
    eoe_word_o[11:8]  = chip_q;
    eoe_word_o[7:0]   = bx_q;
  end

endmodule
