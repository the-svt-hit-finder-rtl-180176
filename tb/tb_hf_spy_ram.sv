// Self-checking testbench of the SPY buffer memory: writes random words at 2048 addresses spread
// over the 64K space, keeps a copy, and checks every read returns the last word written one
// clock after the address was given.
module tb_hf_spy_ram;
  logic clk = 0, we = 0;
  logic [15:0] addr = 0;
  logic [17:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [17:0] model [int];

  hf_spy_ram #(.AW(16), .W(18)) dut (.clk, .we, .addr, .wdata, .rdata);
  always #5 clk = !clk;

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [10:0] k;
      k = 11'($urandom_range(0, 2047));
      addr = {k, k[4:0]};   // 2048 addresses that between them exercise every address bit
      if ($urandom_range(0, 1) || !model.exists(addr)) begin
        we = 1; wdata = 18'($urandom); model[addr] = wdata;
        @(posedge clk); #1;
      end else begin
        we = 0;
        @(posedge clk); #1;
        checks++;
        if (rdata != model[addr]) begin failures++; if (failures < 10) $display("addr %h: %h expected %h", addr, rdata, model[addr]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
