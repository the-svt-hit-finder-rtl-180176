// Self-checking testbench of the dual-clock FIFO.
//
// Write clock and read clock run at unrelated periods (19 and 33 time units). Phase 1 fills the
// FIFO until full* goes low and checks that exactly DEPTH words went in and that empty* went
// high; phase 2 drains it and checks order and that empty* returns low. Phase 3 writes and reads
// at random and checks every word against a queue kept by the testbench.
module tb_hf_fifo;
  localparam int unsigned DEPTH = 4096;
  logic wclk = 0, rclk = 0, rst = 1;
  logic wen = 0, ren = 0;
  logic [17:0] wdata, rdata;
  logic full_n, empty_n;
  int checks = 0, failures = 0;

  hf_fifo #(.W(18), .DEPTH(DEPTH)) dut (.wclk, .wrst(rst), .wen, .wdata, .full_n,
                                        .rclk, .rrst(rst), .ren, .rdata, .empty_n);

  always #19 wclk = !wclk;
  always #33 rclk = !rclk;

  logic [17:0] q[$];
  int nwritten = 0, nread = 0;
  logic rd_pend = 0;

  always @(posedge wclk) if (wen && full_n) begin q.push_back(wdata); nwritten++; end
  always @(posedge rclk) begin
    if (rd_pend) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("read from empty FIFO"); end
      else begin
        logic [17:0] e;
        e = q.pop_front();
        if (rdata != e) begin failures++; if (failures < 10) $display("read %h expected %h", rdata, e); end
      end
    end
    rd_pend <= ren && empty_n;
    if (ren && empty_n) nread++;
  end

  initial begin
    wdata = 0;
    repeat (3) @(posedge rclk);
    rst = 0;
    @(posedge wclk); #1;
    // phase 1: fill
    wen = 1;
    while (full_n && nwritten < DEPTH + 8) begin wdata = 18'($urandom); @(posedge wclk); #1; end
    wen = 0;
    checks++;
    if (nwritten != DEPTH) begin failures++; $display("full after %0d words", nwritten); end
    repeat (4) @(posedge rclk); #1;
    checks++;
    if (!empty_n) begin failures++; $display("empty* still low"); end
    // phase 2: drain
    @(posedge rclk); #1;
    ren = 1;
    while (empty_n) begin @(posedge rclk); #1; end
    ren = 0;
    repeat (4) @(posedge rclk); #1;
    checks++;
    if (nread != DEPTH || q.size() != 0) begin failures++; $display("drained %0d", nread); end
    // phase 3: random traffic
    fork
      for (int i = 0; i < 20000; i++) begin
        wen = ($urandom_range(0, 2) == 0); wdata = 18'($urandom);
        @(posedge wclk); #1;
      end
      for (int i = 0; i < 12000; i++) begin
        ren = ($urandom_range(0, 1) == 0);
        @(posedge rclk); #1;
      end
    join
    wen = 0; ren = 1;
    repeat (DEPTH + 20) @(posedge rclk);
    #1 ren = 0;
    repeat (3) @(posedge rclk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d words left", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge rclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
