// Self-checking testbench of the front-panel data strobe gate model.
//
// A 30 MHz clock and a valid signal that changes on the falling clock edge, half a cycle ahead
// of the data it marks, drive the gate. In the high half of each clock cycle the strobe must
// be low exactly when the valid of that cycle is high, it must be high throughout the low half,
// and each rising edge of the strobe must come 3 ns (the gate delay) after a falling clock edge.
module tb_hf_strobe_gate;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 0, valid = 0, ds_n;
  int checks = 0, failures = 0, n_strobes = 0;

  hf_strobe_gate dut (.clk, .valid, .ds_n);

  always #16.5 clk = !clk;

  realtime t_fall = 0;
  always @(negedge clk) t_fall = $realtime;
  always @(posedge ds_n) if ($realtime > 100) begin
    checks++;
    n_strobes++;
    if ($realtime - t_fall < 2.9 || $realtime - t_fall > 3.1) begin
      failures++; $display("strobe rose %0.2f ns after the clock fell", $realtime - t_fall);
    end
  end

  initial begin
    logic v;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      v = $urandom_range(0, 1);
      valid = v;
      @(posedge clk);
      #8;
      checks++;
      if (ds_n != !v) begin failures++; $display("%t strobe %0d with valid %0d", $time, ds_n, v); end
      @(negedge clk);
      #8;
      checks++;
      if (!ds_n) begin failures++; $display("%t strobe low while the clock is low", $time); end
    end
    checks++;
    if (n_strobes == 0) begin failures++; $display("no strobe"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
