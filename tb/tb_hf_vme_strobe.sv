// Self-checking testbench of the internal VME strobe sequencer.
//
// For write and read cycles, with the external strobe dropped at random phases, the testbench
// measures in tap-clock cycles when the address strobe, the data strobe, the end of the write
// data strobe and the acknowledge occur. It checks the spacing between them (2 taps from
// address to data strobe, 2 more to the end of a write strobe, 5 from address strobe to
// acknowledge), that the address strobe comes 2 to 4 taps after the external strobe, that a
// read keeps its data strobe until the cycle ends, and that every strobe falls within 3 taps
// once the external strobe is released.
module tb_hf_vme_strobe;
  logic clk = 0, rst = 1, str_n = 1, wr = 0;
  logic as, ds, ack;
  int checks = 0, failures = 0;

  hf_vme_strobe dut (.clk, .rst, .vme_data_str_n(str_n), .vme_write(wr), .hf_vme_as(as),
                     .hf_vme_ds(ds), .ack);

  always #20 clk = !clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%t %s", $time, what); end
  endtask

  task automatic cycle(input logic w);
    int t = 0, t_as = -1, t_ds = -1, t_dsend = -1, t_ack = -1;
    wr = w;
    #($urandom_range(1, 39));
    str_n = 0;
    while (t < 12) begin
      @(posedge clk); #1; t++;
      if (as && t_as < 0) t_as = t;
      if (ds && t_ds < 0) t_ds = t;
      if (!ds && t_ds >= 0 && t_dsend < 0) t_dsend = t;
      if (ack && t_ack < 0) t_ack = t;
    end
    check(t_as >= 2 && t_as <= 4, "address strobe delay");
    check(t_ds - t_as == 2, "data strobe delay");
    check(t_ack - t_as == 5, "acknowledge delay");
    if (w) check(t_dsend - t_as == 4, "write data strobe length");
    else   check(t_dsend < 0 && ds, "read data strobe held");
    str_n = 1;
    repeat (3) @(posedge clk);
    #1 check(!as && !ds && !ack, "strobes released");
    repeat ($urandom_range(0, 3)) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 40; i++) cycle($urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
