// Boot chip: board clocks, control register and the internal VME bus.
//
// Clocks: the 30 MHz oscillator clock is divided into 15, 7.5, 3.75 and 1.875 MHz enables
// (div_o[0..3], each one cycle wide at its own rate). A test-clock enable, used when SPY
// buffers are replayed as a data source, is selected from 30 MHz, 15 MHz, 7.5 MHz or one pulse
// per VME write to subaddress 0x0002. test_tgl_o toggles at every test-clock pulse, for use by
// logic on other clocks.
// Brain register (device 0, subaddress 0x0000): bit 8 enables the backup configuration port,
// bit 7 asserts HF_Freeze, bits 6:5 select the test clock (0: 30 MHz, 1: 15 MHz, 2: 7.5 MHz,
// 3: VME strobed), bits 4:2 are the test-mode bits HF_Test0..2 (ISPY input, OSPY output,
// deterministic merge), bits 1:0 the mode (0 boot, 1 test, 2 run, 3 load); HF_Load is high in
// load mode. 0x0001 holds the configuration memory base address. A write to 0x0003, or the
// P2 SVT_INIT* line, produces an HF_Init pulse of INIT_LEN cycles.
// VME: the buffered VME address and data lines are passed to the board as HF_VME_Addr
// (longword address, VME A26..A2) and HF_VME_Data; the strobes come from hf_vme_strobe, clocked
// by the 25 MHz tap clock. The numeric encodings of the test-clock and mode fields, the
// address mapping and the init pulse length are this design's choices.
module hf_boot
  import hf_pkg::*;
#(
  parameter int unsigned INIT_LEN = 8
) (
  input  logic        clk,          // 30 MHz oscillator
  input  logic        tap_clk,      // 25 MHz delay-line tap clock
  input  logic        por,          // power-on reset
  input  logic        svt_init_n,   // P2 SVT_INIT*
  // buffered VME
  input  logic [31:2] vme_addr,
  input  logic [31:0] vme_data,
  input  logic        vme_data_str_n,
  input  logic        vme_write,
  output logic        vme_ack,
  output logic [31:0] vme_rdata_o,
  input  logic [31:0] board_rdata_i, // read data from the other chips
  // board control
  output vme_bus_t    hf_vme_o,
  output logic        hf_init_o,
  output logic        hf_load_o,
  output logic        hf_freeze_o,
  output logic [2:0]  hf_test_o,
  output logic        test_step_o,
  output logic        test_tgl_o,
  output logic [3:0]  div_o,
  output logic        bkup_en_o,
  output logic [1:0]  mode_o
);

  logic as_t, ds_t;

  hf_vme_strobe u_strobe (
    .clk(tap_clk), .rst(por), .vme_data_str_n, .vme_write,
    .hf_vme_as(as_t), .hf_vme_ds(ds_t), .ack(vme_ack)
  );

  always_comb begin
    hf_vme_o.addr  = vme_addr[26:2];
    hf_vme_o.wdata = vme_data;
    hf_vme_o.write = vme_write;
    hf_vme_o.as    = as_t;
    hf_vme_o.ds    = ds_t;
  end

  // clock division
  logic [3:0] cnt_q;
  always_ff @(posedge clk) begin
    if (por) cnt_q <= '0;
    else     cnt_q <= cnt_q + 4'd1;
  end
  always_comb begin
    div_o[0] = cnt_q[0];
    div_o[1] = cnt_q[1:0] == 2'b11;
    div_o[2] = cnt_q[2:0] == 3'b111;
    div_o[3] = cnt_q[3:0] == 4'b1111;
  end

  // register writes on the rising edge of the synchronised data strobe
  logic [2:0]  ds_sync_q;
  logic        wr;
  logic [8:0]  brain_q;
  logic [31:0] fram_base_q;
  logic        sel;
  logic [3:0]  init_cnt_q;
  logic [1:0]  init_sync_q;

  assign sel = hf_vme_o.addr[24:20] == DEV_BOOT && hf_vme_o.addr[19:16] == 4'd0;

  always_ff @(posedge clk) begin
    if (por) ds_sync_q <= '0;
    else     ds_sync_q <= {ds_sync_q[1:0], ds_t};
  end
  assign wr = ds_sync_q[1] && !ds_sync_q[2] && as_t && vme_write && sel;

  logic vme_tick;
  always_ff @(posedge clk) begin
    if (por) begin
      brain_q     <= '0;
      fram_base_q <= '0;
      init_cnt_q  <= 4'(INIT_LEN);
      init_sync_q <= 2'b11;
      vme_tick    <= 1'b0;
    end else begin
      init_sync_q <= {init_sync_q[0], svt_init_n};
      vme_tick    <= wr && hf_vme_o.addr[15:0] == 16'h0002;
      if (wr && hf_vme_o.addr[15:0] == 16'h0000) brain_q     <= vme_data[8:0];
      if (wr && hf_vme_o.addr[15:0] == 16'h0001) fram_base_q <= vme_data;
      if ((wr && hf_vme_o.addr[15:0] == 16'h0003) || !init_sync_q[1])
        init_cnt_q <= 4'(INIT_LEN);
      else if (init_cnt_q != 0)
        init_cnt_q <= init_cnt_q - 4'd1;
    end
  end

  assign hf_init_o   = init_cnt_q != 0;
  assign mode_o      = brain_q[1:0];
  assign hf_load_o   = brain_q[1:0] == 2'd3;
  assign hf_test_o   = brain_q[4:2];
  assign hf_freeze_o = brain_q[7];
  assign bkup_en_o   = brain_q[8];

  always_comb begin
    unique case (brain_q[6:5])
      2'd0:    test_step_o = 1'b1;
      2'd1:    test_step_o = div_o[0];
      2'd2:    test_step_o = div_o[1];
      default: test_step_o = vme_tick;
    endcase
  end

  always_ff @(posedge clk) begin
    if (por)              test_tgl_o <= 1'b0;
    else if (test_step_o) test_tgl_o <= !test_tgl_o;
  end

  always_comb begin
    vme_rdata_o = board_rdata_i;
    if (sel) begin
      unique case (hf_vme_o.addr[15:0])
        16'h0000: vme_rdata_o = {23'd0, brain_q};
        16'h0001: vme_rdata_o = fram_base_q;
        default:  vme_rdata_o = '0;
      endcase
    end
  end

endmodule
