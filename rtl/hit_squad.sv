// Hit Squad: one complete clustering engine as placed on the board.
//
// It groups the HitMan chip with its three memories: the 64K x 18 Input SPY buffer, the
// 128K x 8 Cluster RAM and the 4K x 18 output FIFO. The HitMan writes the FIFO on the 53 MHz
// front-end clock (26.5 MHz enable); the Merger reads it on the 30 MHz back-end clock through
// rd_en_i, rd_data_o and the active-low flags empty_n_o and full_n_o. The FIFO is reset by
// HF_Init on both sides.
module hit_squad
  import hf_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  raw_word_t   data_i,
  input  logic [3:0]  stream_id_i,
  input  logic        test_i,
  input  logic        test_step_i,
  input  vme_bus_t    vme_i,
  output logic [17:0] vme_rdata_o,
  output logic        vme_rsel_o,
  input  logic        rclk,
  input  logic        rrst,
  input  logic        rd_en_i,
  output logic [17:0] rd_data_o,
  output logic        empty_n_o,
  output logic        full_n_o,
  output logic        eoe_o,
  output logic        cluster_o
);

  logic        fifo_wen;
  logic [17:0] fifo_wdata;
  logic        ispy_we, cram_we;
  logic [15:0] ispy_addr;
  logic [17:0] ispy_wdata, ispy_rdata;
  logic [16:0] cram_addr;
  logic [7:0]  cram_wdata, cram_rdata;

  hitman u_hitman (
    .clk, .rst, .ce, .data_i, .stream_id_i, .test_i, .test_step_i,
    .vme_i, .vme_rdata_o, .vme_rsel_o,
    .fifo_wen_o   (fifo_wen),
    .fifo_wdata_o (fifo_wdata),
    .ispy_we_o    (ispy_we),
    .ispy_addr_o  (ispy_addr),
    .ispy_wdata_o (ispy_wdata),
    .ispy_rdata_i (ispy_rdata),
    .cram_we_o    (cram_we),
    .cram_addr_o  (cram_addr),
    .cram_wdata_o (cram_wdata),
    .cram_rdata_i (cram_rdata),
    .eoe_o, .cluster_o
  );

  hf_spy_ram #(.AW(16), .W(18)) u_ispy (
    .clk, .we(ispy_we), .addr(ispy_addr), .wdata(ispy_wdata), .rdata(ispy_rdata)
  );

  hf_cram #(.AW(17), .W(8)) u_cram (
    .clk, .we(cram_we), .addr(cram_addr), .wdata(cram_wdata), .rdata(cram_rdata)
  );

  hf_fifo #(.W(18), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(clk), .wrst(rst), .wen(fifo_wen), .wdata(fifo_wdata), .full_n(full_n_o),
    .rclk, .rrst, .ren(rd_en_i), .rdata(rd_data_o), .empty_n(empty_n_o)
  );

endmodule
