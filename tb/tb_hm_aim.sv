// Self-checking testbench of Aim, the pedestal and threshold pipeline.
//
// Loads random pedestals for every chip+strip and random thresholds for every chip, then sends
// random words (with random valid bits and negative pulse heights) every cycle. The expected
// output, computed here from the same tables, is max(0, max(0,ph) - pedestal) and valid only if
// that is at least the chip threshold; it must appear after the fifth clock edge, counting the one that takes the input.
module tb_hm_aim;
  import hf_pkg::*;

  logic clk = 0, rst = 1, ce = 1;
  hit_t hin, hout;
  logic [7:0][6:0] thr;
  logic we = 0;
  logic [9:0] addr;
  logic [6:0] wdata, rdata;
  int checks = 0, failures = 0;
  int ped [1024];

  hm_aim dut (.clk, .rst, .ce, .hit_i(hin), .thresh_i(thr), .ped_we_i(we), .ped_addr_i(addr),
              .ped_wdata_i(wdata), .ped_rdata_o(rdata), .hit_o(hout));

  always #5 clk = !clk;

  hit_t expq[$];

  initial begin
    hin = '0;
    for (int c = 0; c < 8; c++) thr[c] = 7'($urandom_range(0, 40));
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int a = 0; a < 1024; a++) begin
      ped[a] = $urandom_range(0, 60);
      we = 1; addr = 10'(a); wdata = 7'(ped[a]);
      @(posedge clk); #1;
    end
    we = 0;
    addr = 10'd77; #1;
    checks++;
    if (rdata != 7'(ped[77])) begin failures++; $display("pedestal read-back"); end
    for (int i = 0; i < 4; i++) expq.push_back('0);
    for (int i = 0; i < 5000; i++) begin
      hit_t e;
      int p;
      hin.valid = ($urandom_range(0, 3) != 0);
      hin.cs    = 10'($urandom);
      hin.ph    = 8'($urandom);
      p = hin.ph[7] ? 0 : int'(hin.ph);
      p = p - ped[hin.cs];
      if (p < 0) p = 0;
      e.valid = hin.valid && (p >= int'(thr[hin.cs[9:7]]));
      e.cs = hin.cs;
      e.ph = 8'(p);
      expq.push_back(e);
      @(posedge clk); #1;
      begin
        hit_t x;
        x = expq.pop_front();
        checks++;
        if (hout.valid != x.valid || (x.valid && (hout.cs != x.cs || hout.ph != x.ph))) begin
          failures++;
          if (failures < 10) $display("out %p expected %p", hout, x);
        end
      end
    end
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
