// Self-checking testbench of the Data Alignment Device.
//
// Each event sends N 20-bit words on each of the two links, with the second link starting 0,
// 1 or 2 cycles after the first (or before it). The byte lanes carry independent random
// streams: link 0 holds layers 0 and 1 and the low nibble of layer 4, link 1 layers 2 and 3
// and the high nibble of layer 4. Random ERROR bits are set. The testbench checks that every
// stream delivers exactly N valid 16-bit words, first byte in the high half, in order, that
// each word's error bit is the OR of the error bits of the link words it came from, and that
// the 26.5 MHz enable toggles every cycle.
module tb_hf_dad;
  import hf_pkg::*;

  logic clk = 0, rst = 1;
  logic [1:0][19:0] ld;
  logic [1:0] dav_n, lerr;
  logic clk26, ce26;
  raw_word_t [4:0] so;
  int checks = 0, failures = 0;

  hf_dad dut (.clk, .rst, .link_data(ld), .link_dav_n(dav_n), .link_err(lerr),
              .clk26_o(clk26), .ce26_o(ce26), .stream_o(so));

  always #5 clk = !clk;

  logic [15:0] expw [5][$];
  logic        expe [5][$];
  int          got [5];

  always @(posedge clk) if (!rst && !ce26) begin
    for (int s = 0; s < 5; s++) if (so[s].valid) begin
      checks++;
      got[s]++;
      if (expw[s].size() == 0) begin failures++; $display("stream %0d extra word", s); end
      else begin
        logic [15:0] w;
        logic e;
        w = expw[s].pop_front(); e = expe[s].pop_front();
        if (so[s].data != w || so[s].err != e) begin
          failures++;
          if (failures < 10) $display("stream %0d: %h/%0d expected %h/%0d", s, so[s].data, so[s].err, w, e);
        end
      end
    end
  end

  int ph_toggles = 0;
  logic last_ce;
  always @(posedge clk) begin
    if (!rst && $time > 100 && ce26 == last_ce) ph_toggles++;
    last_ce <= ce26;
  end

  task automatic run_event(input int n, input int skew);
    logic [19:0] w0 [$], w1 [$];
    logic e0 [$], e1 [$];
    int len, t0, t1;
    for (int k = 0; k < 2 * n; k++) begin
      w0.push_back(20'($urandom)); w1.push_back(20'($urandom));
      e0.push_back($urandom_range(0, 15) == 0); e1.push_back($urandom_range(0, 15) == 0);
    end
    for (int k = 0; k < n; k++) begin
      logic [19:0] a0, b0, a1, b1;
      a0 = w0[2*k]; b0 = w0[2*k+1]; a1 = w1[2*k]; b1 = w1[2*k+1];
      expw[0].push_back({a0[7:0], b0[7:0]});   expe[0].push_back(e0[2*k] | e0[2*k+1]);
      expw[1].push_back({a0[15:8], b0[15:8]}); expe[1].push_back(e0[2*k] | e0[2*k+1]);
      expw[2].push_back({a1[7:0], b1[7:0]});   expe[2].push_back(e1[2*k] | e1[2*k+1]);
      expw[3].push_back({a1[15:8], b1[15:8]}); expe[3].push_back(e1[2*k] | e1[2*k+1]);
      expw[4].push_back({a1[19:16], a0[19:16], b1[19:16], b0[19:16]});
      expe[4].push_back(e0[2*k] | e0[2*k+1] | e1[2*k] | e1[2*k+1]);
    end
    t0 = (skew < 0) ? -skew : 0;
    t1 = (skew > 0) ? skew : 0;
    len = 2 * n + 3;
    for (int t = 0; t < len; t++) begin
      int i0, i1;
      i0 = t - t0; i1 = t - t1;
      dav_n[0] = !(i0 >= 0 && i0 < 2 * n);
      dav_n[1] = !(i1 >= 0 && i1 < 2 * n);
      ld[0] = dav_n[0] ? 20'hfffff : w0[i0]; lerr[0] = dav_n[0] ? 1'b0 : e0[i0];
      ld[1] = dav_n[1] ? 20'hfffff : w1[i1]; lerr[1] = dav_n[1] ? 1'b0 : e1[i1];
      @(posedge clk); #1;
    end
    dav_n = 2'b11;
    repeat (30) @(posedge clk);
    #1;
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (expw[s].size() != 0) begin
        failures++; $display("stream %0d: %0d words missing (skew %0d)", s, expw[s].size(), skew);
        expw[s].delete(); expe[s].delete();
      end
    end
  endtask

  initial begin
    dav_n = 2'b11; ld = '0; lerr = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (4) @(posedge clk);
    #1;
    for (int e = 0; e < 60; e++) begin
      run_event($urandom_range(1, 40), $urandom_range(0, 4) - 2);
      if ($urandom_range(0, 1)) @(posedge clk);
      #1;
    end
    checks++;
    if (ph_toggles != 0) begin failures++; $display("26.5 MHz enable did not toggle"); end
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
