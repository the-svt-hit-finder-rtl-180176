// Self-checking testbench of the HitMan with its Input SPY buffer and Cluster RAM.
//
// Everything is programmed through the VME port as on the board: strip thresholds, all 1024
// pedestals, the charge cut and the 32K-entry centroid table in the Cluster RAM. Random events
// built by the reference model are then sent at one word per 26.5 MHz enable, and every FIFO
// write is compared with the reference words (clusters and end-of-event word). Further cases:
// the cluster limit (excess clusters dropped, truncated-data flag set), the ISPY counter after
// capture, replay of an event written into the ISPY in test mode (ending at a halt word),
// register read-back, the disable flag and a VME write into the FIFO. The number of clusters,
// truncations and replays are counted and must be non-zero.
module tb_hitman;
  import hf_pkg::*;
  import hf_tb_ref_pkg::*;

  logic clk = 0, rst = 1, ce = 0;
  raw_word_t din;
  logic test = 0, step = 1;
  vme_bus_t vme;
  logic [17:0] vrd;
  logic vsel, fwen, iwe, cwe, eoe, clus;
  logic [17:0] fwd, iwd, ird;
  logic [15:0] iaddr;
  logic [16:0] caddr;
  logic [7:0] cwd, crd;
  int checks = 0, failures = 0;

  hitman dut (.clk, .rst, .ce, .data_i(din), .stream_id_i(4'd6), .test_i(test), .test_step_i(step),
              .vme_i(vme), .vme_rdata_o(vrd), .vme_rsel_o(vsel),
              .fifo_wen_o(fwen), .fifo_wdata_o(fwd),
              .ispy_we_o(iwe), .ispy_addr_o(iaddr), .ispy_wdata_o(iwd), .ispy_rdata_i(ird),
              .cram_we_o(cwe), .cram_addr_o(caddr), .cram_wdata_o(cwd), .cram_rdata_i(crd),
              .eoe_o(eoe), .cluster_o(clus));
  hf_spy_ram #(.AW(16), .W(18)) ispy (.clk, .we(iwe), .addr(iaddr), .wdata(iwd), .rdata(ird));
  hf_cram #(.AW(17), .W(8)) cram (.clk, .we(cwe), .addr(caddr), .wdata(cwd), .rdata(crd));

  always #5 clk = !clk;
  always @(posedge clk) ce <= rst ? 1'b0 : !ce;

  logic [17:0] expq[$];
  int n_clusters = 0, n_eoe = 0;
  always @(posedge clk) if (!rst && fwen) begin
    checks++;
    if (!fwd[FB_EE]) n_clusters++; else n_eoe++;
    if (expq.size() == 0) begin failures++; $display("unexpected FIFO word %h", fwd); end
    else begin
      logic [17:0] e;
      e = expq.pop_front();
      if (fwd != e) begin failures++; if (failures < 10) $display("FIFO word %h expected %h", fwd, e); end
    end
  end

  task automatic vme_cycle(input logic [4:0] dev, input logic [3:0] st, input logic [15:0] sub,
                           input logic wr, input logic [31:0] d, output logic [17:0] rd);
    vme = '{addr: {dev, st, sub}, wdata: d, write: wr, ds: 1'b0, as: 1'b1};
    repeat (2) @(posedge clk);
    vme.ds = 1;
    repeat (4) @(posedge clk);
    #1 rd = vrd;
    vme = '0;
    @(posedge clk); #1;
  endtask
  task automatic vw(input logic [4:0] dev, input logic [15:0] sub, input logic [31:0] d);
    logic [17:0] r;
    vme_cycle(dev, 4'd15, sub, 1'b1, d, r);   // broadcast write
  endtask
  task automatic vr(input logic [4:0] dev, input logic [15:0] sub, output logic [17:0] r);
    vme_cycle(dev, 4'd6, sub, 1'b0, 0, r);
  endtask

  task automatic send(input logic [15:0] w[$]);
    foreach (w[i]) begin
      @(posedge clk iff ce);
      #1 din = '{valid: 1'b1, err: 1'b0, data: w[i]};
    end
    @(posedge clk iff ce);
    #1 din = '0;
    repeat (80) @(posedge clk);
    #1;
  endtask

  initial begin
    hf_event ev;
    logic [17:0] r;
    int n_trunc = 0, n_replay = 0;
    din = '0; vme = '0;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 8; c++) vw(DEV_HITMAN, 16'h1010 + 16'(c), thr_of(c));
    for (int a = 0; a < 1024; a++) vw(DEV_HITMAN, 16'(a), ped_of(a));
    for (int a = 0; a < 32768; a++) vw(DEV_CRAM0, 16'(a), cram_word(a));
    vr(DEV_HITMAN, 16'h1013, r);
    checks++; if (r != 18'(thr_of(3))) begin failures++; $display("threshold read-back %h", r); end
    vr(DEV_CRAM0, 16'h1234, r);
    checks++; if (r[7:0] != cram_word('h1234)) begin failures++; $display("CRAM read-back %h", r); end
    // normal events
    for (int e = 0; e < 40; e++) begin
      int cut;
      cut = (e % 3 == 0) ? $urandom_range(0, 100) : 0;
      vw(DEV_HITMAN, 16'h1020, cut);
      ev = new($urandom_range(1, 7), 8'($urandom), cut, 0, $urandom_range(20, 80));
      foreach (ev.fifo[i]) expq.push_back(ev.fifo[i]);
      send(ev.words);
    end
    vw(DEV_HITMAN, 16'h1020, 0);
    // cluster limit
    vw(DEV_HITMAN, 16'h1102, 3);
    for (int e = 0; e < 5; e++) begin
      ev = new(6, 8'(e), 0, 3, 50);
      if (ev.nclusters > 3) n_trunc++;
      foreach (ev.fifo[i]) expq.push_back(ev.fifo[i]);
      send(ev.words);
    end
    vw(DEV_HITMAN, 16'h1102, 0);
    // ISPY counter after capture
    vw(DEV_HITMAN, 16'h1100, 0);
    ev = new(3, 8'h42, 0, 0, 40);
    foreach (ev.fifo[i]) expq.push_back(ev.fifo[i]);
    send(ev.words);
    vr(DEV_HITMAN, 16'h1100, r);
    checks++;
    if (r != 18'(ev.words.size() + 1)) begin failures++; $display("ISPY count %0d expected %0d", r, ev.words.size() + 1); end
    // the capture holds the event words
    vr(DEV_ISPY, 16'd2, r);
    checks++;
    if (r != {2'b10, ev.words[2]}) begin failures++; $display("ISPY word %h", r); end
    // ISPY replay in test mode
    ev = new(4, 8'h99, 0, 0, 40);
    foreach (ev.words[i]) vw(DEV_ISPY, 16'(i), {14'd0, 2'b10, ev.words[i]});
    vw(DEV_ISPY, 16'(ev.words.size()), 32'h00000);
    vw(DEV_ISPY, 16'(ev.words.size() + 1), 32'h10000);
    vw(DEV_HITMAN, 16'h1100, 0);
    foreach (ev.fifo[i]) expq.push_back(ev.fifo[i]);
    test = 1;
    repeat (2 * ev.words.size() + 200) @(posedge clk);
    #1;
    vr(DEV_HITMAN, 16'h1100, r);
    checks++;
    if (r != 18'(ev.words.size() + 1)) begin failures++; $display("replay stopped at %0d", r); end
    else n_replay++;
    test = 0;
    repeat (10) @(posedge clk);
    // disabled: no output
    vw(DEV_HITMAN, 16'h1104, 1);
    ev = new(2, 8'h11, 0, 0, 50);
    send(ev.words);
    vw(DEV_HITMAN, 16'h1104, 0);
    repeat (4) @(posedge clk iff ce);
    // VME write into the FIFO
    expq.push_back(18'h2abcd);
    vw(DEV_FIFO, 16'h0, 32'h2abcd);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d FIFO words missing", expq.size()); end
    checks++;
    if (n_clusters == 0 || n_trunc == 0 || n_replay == 0) begin failures++; $display("a mechanism never happened"); end
    $display("clusters %0d, end-of-event words %0d, truncated events %0d, replays %0d", n_clusters, n_eoe, n_trunc, n_replay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
