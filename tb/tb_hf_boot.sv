// Self-checking testbench of the Boot chip.
//
// A VME master drives the buffered VME lines and the external data strobe; the testbench
// checks the internal VME bus (longword address bits 26:2, data, write, strobes), the brain
// register (mode, HF_Load, HF_Test bits, HF_Freeze, backup port enable, test-clock select) and
// its read-back, the configuration base register, read data of other chips passed through,
// the clock-divider enables (1/2, 1/4, 1/8, 1/16 of the 30 MHz clock), the test-clock rate for
// each selection including one step per VME write to 0x0002 with test_tgl_o toggling on every
// step, and HF_Init pulses of INIT_LEN cycles after power-up, after a VME write to 0x0003 and
// after a one-cycle SVT_INIT* pulse.
module tb_hf_boot;
  import hf_pkg::*;

  logic clk = 0, tap_clk = 0, por = 1, svt_init_n = 1;
  logic [31:2] vme_addr;
  logic [31:0] vme_data, vme_rdata, board_rdata;
  logic str_n = 1, vme_write = 0, vme_ack;
  vme_bus_t hf_vme;
  logic hf_init, hf_load, hf_freeze, test_step, test_tgl, bkup_en;
  logic [2:0] hf_test;
  logic [3:0] div;
  logic [1:0] mode;
  int checks = 0, failures = 0;

  hf_boot dut (.clk, .tap_clk, .por, .svt_init_n, .vme_addr, .vme_data, .vme_data_str_n(str_n),
               .vme_write, .vme_ack, .vme_rdata_o(vme_rdata), .board_rdata_i(board_rdata),
               .hf_vme_o(hf_vme), .hf_init_o(hf_init), .hf_load_o(hf_load), .hf_freeze_o(hf_freeze),
               .hf_test_o(hf_test), .test_step_o(test_step), .test_tgl_o(test_tgl), .div_o(div),
               .bkup_en_o(bkup_en), .mode_o(mode));

  always #17 clk = !clk;
  always #20 tap_clk = !tap_clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%t %s", $time, what); end
  endtask

  int init_len = 0, init_pulses = 0;
  always @(posedge clk) begin
    if (hf_init && !por) init_len++;
    else if (init_len != 0) begin
      init_pulses++;
      if (init_len != 8) begin failures++; $display("HF_Init lasted %0d cycles", init_len); end
      checks++;
      init_len = 0;
    end
  end

  task automatic bvme(input logic [4:0] dev, input logic [15:0] sub, input logic wr,
                      input logic [31:0] d, output logic [31:0] rd);
    vme_addr = '0;
    vme_addr[26:2] = {dev, 4'd0, sub};
    vme_data = d;
    vme_write = wr;
    @(posedge tap_clk);
    str_n = 0;
    while (!vme_ack) @(posedge tap_clk);
    check(hf_vme.as && hf_vme.addr == vme_addr[26:2] && hf_vme.wdata == d && hf_vme.write == wr,
          "internal VME bus");
    rd = vme_rdata;
    @(posedge tap_clk);
    str_n = 1;
    while (vme_ack) @(posedge tap_clk);
    repeat (2) @(posedge tap_clk);
  endtask

  // pulses of each enable over n cycles
  task automatic count(input int n, output int c[5]);
    c = '{default: 0};
    repeat (n) begin
      @(posedge clk);
      for (int i = 0; i < 4; i++) if (div[i]) c[i]++;
      if (test_step) c[4]++;
    end
  endtask

  initial begin
    logic [31:0] r;
    int c[5];
    board_rdata = 32'h1234_5678;
    repeat (5) @(posedge clk);
    por = 0;
    repeat (12) @(posedge clk);
    count(160, c);
    check(c[0] == 80 && c[1] == 40 && c[2] == 20 && c[3] == 10, "divider enables");
    check(c[4] == 160, "30 MHz test clock");
    for (int m = 0; m < 4; m++) begin
      logic [8:0] v;
      v = {1'b1, 1'b0, 2'd1, 3'b101, 2'(m)};
      bvme(DEV_BOOT, 16'h0000, 1'b1, v, r);
      check(mode == 2'(m) && hf_load == (m == 3) && hf_test == 3'b101 && !hf_freeze && bkup_en, "brain register outputs");
      bvme(DEV_BOOT, 16'h0000, 1'b0, 0, r);
      check(r[8:0] == v, "brain register read-back");
    end
    count(160, c);
    check(c[4] == 80, "15 MHz test clock");
    bvme(DEV_BOOT, 16'h0000, 1'b1, {1'b0, 1'b1, 2'd2, 5'd0}, r);
    check(hf_freeze, "HF_Freeze");
    count(160, c);
    check(c[4] == 40, "7.5 MHz test clock");
    bvme(DEV_BOOT, 16'h0000, 1'b1, {2'd0, 2'd3, 5'd0}, r);
    begin
      logic t0;
      t0 = test_tgl;
      fork
        count(3000, c);
        repeat (5) bvme(DEV_BOOT, 16'h0002, 1'b1, 0, r);
      join
      check(c[4] == 5 && test_tgl == t0 ^ 1'b1, "VME-strobed test clock");
    end
    bvme(DEV_BOOT, 16'h0001, 1'b1, 32'hcafe_0042, r);
    bvme(DEV_BOOT, 16'h0001, 1'b0, 0, r);
    check(r == 32'hcafe_0042, "configuration base register");
    bvme(DEV_HITMAN, 16'h1010, 1'b0, 0, r);
    check(r == 32'h1234_5678, "read data of other chips");
    bvme(DEV_BOOT, 16'h0003, 1'b1, 0, r);
    repeat (20) @(posedge clk);
    #1 svt_init_n = 0;
    @(posedge clk);
    #1 svt_init_n = 1;
    repeat (20) @(posedge clk);
    check(init_pulses == 3, "HF_Init pulses (power-up, VME, SVT_INIT*)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
