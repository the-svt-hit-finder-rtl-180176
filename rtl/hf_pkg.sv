// Shared constants and types of the Hit Finder.
//
// The Hit Finder turns silicon-strip raw data into a list of cluster positions. This package
// holds the word formats that pass between its stages:
//   * the 16-bit raw SVX word (strip/chip-ID byte in the high half, pulse height or status in
//     the low half) as delivered by the alignment stage;
//   * the 18-bit clustering-engine output word written to each FIFO
//       normal word : [17:16] spare, [15] EE=0, [14] long cluster, [13:11] chip,
//                     [10:4] strip, [3:0] sixteenths of a strip
//       end of event: [17:16] spare, [15] EE=1, [14] truncated data, [13] spare,
//                     [12] invalid data, [11:8] diagnostic, [7:0] bunch crossing number
//   * the 23-bit board output word
//       normal word : [22] EE=0, [21] end packet, [20:18] layer, [17:15] barrel, [14] long,
//                     [13:0] chip/strip/substrip
//       end of event: [22] EE=1, [21] end packet, [20:9] error flags, [8] event parity,
//                     [7:0] bunch crossing number
// The positions of bits 12 and 15 in the end-of-event words, and the order of the MOP error
// flags, are this design's reading of the format tables; everything else follows them directly.
package hf_pkg;

  // Numbers of streams and links on one board.
  localparam int unsigned N_STREAMS = 10;
  localparam int unsigned N_LINKS   = 4;
  localparam int unsigned N_DADS    = 2;

  // Clustering-engine FIFO word.
  localparam int unsigned FW = 18;
  localparam int unsigned FB_EE  = 15;
  localparam int unsigned FB_LC  = 14;   // normal word: long cluster
  localparam int unsigned FB_TD  = 14;   // end-of-event word: truncated data
  localparam int unsigned FB_ID  = 12;   // end-of-event word: invalid data

  // Board output word.
  localparam int unsigned OW = 23;
  localparam int unsigned OB_EE = 22;
  localparam int unsigned OB_EP = 21;
  localparam int unsigned OB_PA = 8;

  // MOP error flags, bit positions inside the 12-bit error field [20:9] of the output
  // end-of-event word (listed in the format table from high to low after the spare bits).
  localparam int unsigned ERR_PARITY   = 0;
  localparam int unsigned ERR_LOSTSYNC = 1;
  localparam int unsigned ERR_FIFOOVF  = 2;
  localparam int unsigned ERR_INVDATA  = 3;
  localparam int unsigned ERR_INTOVF   = 4;
  localparam int unsigned ERR_TRUNC    = 5;
  localparam int unsigned ERR_LOSTLOCK = 6;

  // Chip-ID byte classes (high byte of a raw word).
  localparam logic [2:0] AXIAL_ID_TAG  = 3'b100;
  localparam logic [2:0] STEREO_ID_TAG = 3'b101;

  // Illegal chip count used before the first axial chip ID of an event.
  localparam logic [3:0] CHIP_NONE = 4'd15;

  // Internal VME bus device numbers (address bits 24:20).
  localparam logic [4:0] DEV_BOOT   = 5'd0;
  localparam logic [4:0] DEV_HITMAN = 5'd1;
  localparam logic [4:0] DEV_ISPY   = 5'd2;
  localparam logic [4:0] DEV_CRAM0  = 5'd3;
  localparam logic [4:0] DEV_CRAM1  = 5'd4;
  localparam logic [4:0] DEV_FIFO   = 5'd5;
  localparam logic [4:0] DEV_MERGER = 5'd6;
  localparam logic [4:0] DEV_MOP    = 5'd7;
  localparam logic [4:0] DEV_OSPY   = 5'd8;
  localparam logic [3:0] STREAM_BROADCAST = 4'd15;

  // Raw word after alignment.
  typedef struct packed {
    logic        valid;
    logic        err;
    logic [15:0] data;
  } raw_word_t;

  // Word passed from Ready to Aim and from Aim to Fire.
  typedef struct packed {
    logic       valid;
    logic [9:0] cs;     // chip (3 bits) and strip (7 bits)
    logic [7:0] ph;     // pulse height
  } hit_t;

  // Board-internal VME bus as seen by one chip (address, data, strobes).
  typedef struct packed {
    logic [24:0] addr;
    logic [31:0] wdata;
    logic        write;
    logic        ds;
    logic        as;
  } vme_bus_t;

  // Six-bit stream label of the merged data path: one-hot stream modulo five, and the
  // half (0: streams 0-4, 1: streams 5-9).
  function automatic logic [5:0] stream_label(input int unsigned s);
    logic [5:0] l;
    l = '0;
    l[s % 5] = 1'b1;
    l[5] = (s >= 5);
    return l;
  endfunction

  function automatic int unsigned label_to_stream(input logic [5:0] l);
    int unsigned s;
    s = 0;
    for (int unsigned i = 0; i < 5; i++) if (l[i]) s = i;
    return s + (l[5] ? 5 : 0);
  endfunction

endpackage
