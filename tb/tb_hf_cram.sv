// Self-checking testbench of the Cluster RAM: fills the first 32K addresses with the centroid
// offset table used by the clustering pipeline and some upper addresses with random data, then
// checks combinational reads against the values computed here.
module tb_hf_cram;
  logic clk = 0, we = 0;
  logic [16:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  hf_cram #(.AW(17), .W(8)) dut (.clk, .we, .addr, .wdata, .rdata);
  always #5 clk = !clk;

  function automatic logic [7:0] table_val(int a);
    int p, c, n, t, o;
    if (a >= 32768) return 8'(a * 37 + 11);
    p = (a >> 10) & 31; c = (a >> 5) & 31; n = a & 31; t = p + c + n;
    if (t == 0) return 8'd0;
    o = (2 * 16 * (n - p) + (n - p >= 0 ? t : -t)) / (2 * t);
    return 8'(o) & 8'h3f;
  endfunction

  initial begin
    for (int a = 0; a < 32768 + 512; a++) begin
      we = 1; addr = 17'(a); wdata = table_val(a);
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 5000; i++) begin
      int a;
      a = $urandom_range(0, 32768 + 511);
      addr = 17'(a); #1;
      checks++;
      if (rdata != table_val(a)) begin failures++; if (failures < 10) $display("addr %h: %h", addr, rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
