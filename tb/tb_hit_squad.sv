// Self-checking testbench of one clustering engine with its memories and output FIFO.
//
// The engine is programmed over VME (thresholds, pedestals and the Cluster RAM entries the
// events will read, from the reference model's offset table) and fed random events at one word
// per 26.5 MHz enable of a 53 MHz clock. The FIFO is read on a separate 30 MHz clock with
// random read enables, and every word read is compared with the reference model. A second
// phase stops reading and keeps sending events until the FIFO reports full: the testbench then
// checks that exactly FIFO_DEPTH words were kept, that they are the oldest ones, and that the
// empty flag is low at the end. The FIFO is reduced to 256 words to keep the run short.
module tb_hit_squad;
  import hf_pkg::*;
  import hf_tb_ref_pkg::*;

  localparam int DEPTH = 256;
  logic clk = 0, rclk = 0, rst = 1, ce = 0;
  raw_word_t din;
  vme_bus_t vme;
  logic [17:0] vrd, rdata;
  logic vsel, ren = 0, empty_n, full_n, eoe, clus;
  int checks = 0, failures = 0;

  hit_squad #(.FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst, .ce, .data_i(din), .stream_id_i(4'd2), .test_i(1'b0), .test_step_i(1'b1),
    .vme_i(vme), .vme_rdata_o(vrd), .vme_rsel_o(vsel),
    .rclk, .rrst(rst), .rd_en_i(ren), .rd_data_o(rdata), .empty_n_o(empty_n), .full_n_o(full_n),
    .eoe_o(eoe), .cluster_o(clus));

  always #9  clk = !clk;
  always #17 rclk = !rclk;
  always @(posedge clk) ce <= rst ? 1'b0 : !ce;

  logic [17:0] expq[$];
  bit reading = 1, took = 0;
  int nread = 0, n_full = 0;
  always @(posedge rclk) begin
    if (took) begin
      checks++;
      nread++;
      if (expq.size() == 0) begin failures++; $display("extra word %h", rdata); end
      else begin
        logic [17:0] e;
        e = expq.pop_front();
        if (rdata != e) begin failures++; if (failures < 10) $display("read %h expected %h", rdata, e); end
      end
    end
    took = ren && empty_n;
    #1 ren = reading && ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (!rst && !full_n) n_full++;

  task automatic vw(input logic [4:0] dev, input logic [15:0] sub, input logic [31:0] d);
    vme = '{addr: {dev, 4'd2, sub}, wdata: d, write: 1'b1, ds: 1'b0, as: 1'b1};
    repeat (2) @(posedge clk);
    vme.ds = 1;
    repeat (4) @(posedge clk);
    vme = '0;
    @(posedge clk); #1;
  endtask

  bit cram_done[int];
  task automatic send(hf_event ev);
    foreach (ev.cram_addr[i]) if (!cram_done.exists(ev.cram_addr[i])) begin
      vw(DEV_CRAM0, 16'(ev.cram_addr[i]), cram_word(ev.cram_addr[i]));
      cram_done[ev.cram_addr[i]] = 1;
    end
    foreach (ev.words[i]) begin
      @(posedge clk iff ce);
      #1 din = '{valid: 1'b1, err: 1'b0, data: ev.words[i]};
    end
    @(posedge clk iff ce);
    #1 din = '0;
    repeat (60) @(posedge clk);
    #1;
  endtask

  initial begin
    hf_event ev;
    int kept;
    din = '0; vme = '0;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 8; c++) vw(DEV_HITMAN, 16'h1010 + 16'(c), thr_of(c));
    for (int a = 0; a < 1024; a++) vw(DEV_HITMAN, 16'(a), ped_of(a));
    checks++;
    if (empty_n) begin failures++; $display("FIFO not empty after reset"); end
    for (int e = 0; e < 20; e++) begin
      ev = new($urandom_range(1, 8), 8'(e), 0, 0, $urandom_range(10, 80));
      foreach (ev.fifo[i]) expq.push_back(ev.fifo[i]);
      send(ev);
    end
    repeat (200) @(posedge rclk);
    checks++;
    if (expq.size() != 0 || empty_n) begin failures++; $display("%0d words not read", expq.size()); end
    // fill the FIFO with reading stopped
    reading = 0;
    repeat (4) @(posedge rclk);
    nread = 0;
    while (n_full == 0) begin
      ev = new(8, 8'hf0, 0, 0, 0);
      foreach (ev.fifo[i]) expq.push_back(ev.fifo[i]);
      send(ev);
    end
    while (expq.size() > DEPTH) void'(expq.pop_back());
    kept = expq.size();
    reading = 1;
    repeat (3 * DEPTH + 50) @(posedge rclk);
    checks++;
    if (nread != kept || kept != DEPTH || expq.size() != 0 || empty_n) begin
      failures++; $display("after overflow: read %0d words, kept %0d", nread, kept);
    end
    $display("words read %0d, cycles with FIFO full %0d", nread, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
