// Self-checking testbench of Fire, the clustering pipeline.
//
// A behavioural Cluster RAM answers each address with the charge-weighted offset
// round(16*(next-prev)/(prev+centre+next)), clipped to 6 bits. Random events of strips with
// random gaps and pulse heights are fed with random idle cycles (enable low), each followed by
// an enabled flush. A reference model in the testbench splits the strips into clusters of
// adjacent strips (at most six) and computes the expected position, long-cluster bit and
// charge cut; the outputs are compared in order. A separate run checks the fourteen-step
// latency from the last strip of a cluster to its output.
module tb_hm_fire;
  import hf_pkg::*;

  logic clk = 0, rst = 1, ce = 1, en = 0;
  hit_t hit;
  logic [7:0] cut;
  logic [14:0] cram_addr;
  logic [7:0] cram_data;
  logic ov, olc;
  logic [13:0] opos;
  int checks = 0, failures = 0;

  hm_fire dut (.clk, .rst, .ce, .en, .hit_i(hit), .charge_cut_i(cut), .cram_addr_o(cram_addr),
               .cram_data_i(cram_data), .out_valid_o(ov), .out_lc_o(olc), .out_pos_o(opos));

  always #5 clk = !clk;

  function automatic int off3(int p, int c, int n);
    int t, o;
    t = p + c + n;
    if (t == 0) return 0;
    o = (2 * 16 * (n - p) + (n - p >= 0 ? t : -t)) / (2 * t);
    if (o > 31) o = 31;
    if (o < -32) o = -32;
    return o;
  endfunction

  assign cram_data = 8'(off3(int'(cram_addr[14:10]), int'(cram_addr[9:5]), int'(cram_addr[4:0])) & 8'h3f);

  // expected outputs
  int exp_pos[$], exp_lc[$];
  int got = 0;

  always @(posedge clk) if (!rst && ov) begin
    checks++;
    if (exp_pos.size() == 0) begin
      failures++; $display("unexpected cluster %h", opos);
    end else begin
      int p, l;
      p = exp_pos.pop_front(); l = exp_lc.pop_front();
      if (opos != 14'(p) || olc != l[0]) begin
        failures++; $display("cluster mismatch: got %h lc %0d, expected %h lc %0d", opos, olc, p, l);
      end
    end
  end

  task automatic reference(input int cs[$], input int ph[$]);
    int i = 0;
    while (i < cs.size()) begin
      int j = i, n, sum = 0, pos;
      while (j + 1 < cs.size() && cs[j+1] == cs[j] + 1 && j + 1 - i < 6) j++;
      n = j - i + 1;
      for (int k = i; k <= j; k++) sum += ph[k];
      if (n == 1)      pos = cs[i] * 16 + off3(0, ph[i] >> 2, 0);
      else if (n == 2) pos = cs[j] * 16 + off3(ph[i] >> 2, ph[j] >> 2, 0);
      else if (n == 3) pos = cs[i+1] * 16 + off3(ph[i] >> 2, ph[i+1] >> 2, ph[j] >> 2);
      else             pos = (cs[j] - n / 2) * 16;
      if (sum > int'(cut)) begin
        exp_pos.push_back(pos & 16'h3fff);
        exp_lc.push_back(n > 3);
      end
      i = j + 1;
    end
  endtask

  task automatic step(input logic v, input logic e, input int cs_, input int ph_);
    hit.valid = v; hit.cs = 10'(cs_); hit.ph = 8'(ph_); en = e;
    @(posedge clk); #1;
  endtask

  initial begin
    int lat;
    hit = '0; cut = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // latency: one strip, then a continuous flush
    cut = 0;
    exp_pos.push_back(40 * 16); exp_lc.push_back(0);
    step(1, 1, 40, 100);
    lat = 1;
    hit = '0; en = 1;
    while (!ov && lat < 40) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != 14) begin failures++; $display("latency %0d, expected 14", lat); end
    repeat (20) step(0, 1, 0, 0);
    // random events
    for (int ev = 0; ev < 300; ev++) begin
      int cs[$], ph[$], c;
      cut = 8'($urandom_range(0, 3) == 0 ? $urandom_range(0, 200) : 0);
      c = $urandom_range(0, 20);
      while (c < 1000) begin
        cs.push_back(c);
        ph.push_back($urandom_range(0, 127));
        c += ($urandom_range(0, 2) == 0) ? $urandom_range(2, 30) : 1;
        if (cs.size() > 40) break;
      end
      reference(cs, ph);
      foreach (cs[k]) begin
        while ($urandom_range(0, 3) == 0) step(0, 0, 0, 0);
        step(1, 1, cs[k], ph[k]);
      end
      repeat (21) step(0, 1, 0, 0);
      repeat (3) step(0, 0, 0, 0);
    end
    checks++;
    if (exp_pos.size() != 0) begin failures++; $display("%0d clusters missing", exp_pos.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
