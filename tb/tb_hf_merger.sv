// Self-checking testbench of the Merger.
//
// Ten behavioural FIFOs (queues with registered read data and an empty* flag updated on the
// clock edge) are preloaded with several events per stream: a random number of cluster words
// followed by an end-of-event word. The testbench checks that every word leaves in order with
// the right stream label, that no word of the next event leaves nbefore all ten end-of-event
// words of the current one, that streams 0-4 and 5-9 are read on alternate cycles, that hold
// stops the reads, and that in deterministic mode whole streams leave one after another in
// stream order. It counts how often hold and deterministic mode took effect.
module tb_hf_merger;
  import hf_pkg::*;

  logic clk = 0, rst = 1, test = 0, hold = 0;
  logic [9:0] empty_n, ren;
  logic [9:0][17:0] fdata;
  logic [23:0] merged;
  vme_bus_t vme;
  logic [31:0] vrd;
  logic vsel;
  int checks = 0, failures = 0;

  hf_merger dut (.clk, .rst, .test_i(test), .hold_i(hold), .empty_n_i(empty_n),
                 .fifo_data_i(fdata), .ren_o(ren), .merged_o(merged), .vme_i(vme),
                 .vme_rdata_o(vrd), .vme_rsel_o(vsel));

  always #5 clk = !clk;

  logic [17:0] fq [10][$];
  logic [17:0] expq [10][$];
  int ev_of_stream [10];
  int cur_event = 0, ee_in_event = 0;
  int hold_seen = 0, hold_stops = 0, det_switches = 0;
  int par_a = -1, cyc = 0, last_stream = -1;

  always @(posedge clk) begin
    cyc++;
    for (int s = 0; s < 10; s++) begin
      if (ren[s] && fq[s].size() > 0) fdata[s] <= fq[s].pop_front();
      empty_n[s] <= (fq[s].size() > 0);
    end
  end

  always @(posedge clk) if (!rst) begin
    if (merged[22:18] != 0) begin
      int s;
      s = label_to_stream(merged[23:18]);
      checks++;
      if ($countones(merged[22:18]) != 1) begin failures++; $display("bad label %b", merged[23:18]); end
      // alternate groups: the parity of the cycle fixes the group
      if (par_a < 0 && s < 5) par_a = cyc % 2;
      if (par_a >= 0 && ((cyc % 2 == par_a) != (s < 5))) begin failures++; $display("group on wrong cycle"); end
      if (expq[s].size() == 0) begin failures++; $display("extra word from %0d", s); end
      else begin
        logic [17:0] e;
        e = expq[s].pop_front();
        if (merged[17:0] != e) begin failures++; $display("stream %0d word %h expected %h", s, merged[17:0], e); end
      end
      if (ev_of_stream[s] != cur_event) begin failures++; $display("stream %0d ran ahead to event %0d", s, ev_of_stream[s]); end
      if (test) begin
        if (s < last_stream) begin failures++; $display("deterministic order broken"); end
        if (s != last_stream) det_switches++;
        last_stream = s;
      end
      if (merged[FB_EE]) begin
        ev_of_stream[s]++;
        ee_in_event++;
        if (ee_in_event == 10) begin cur_event++; ee_in_event = 0; last_stream = -1; end
      end
    end
  end

  task automatic load(input int nev);
    for (int e = 0; e < nev; e++)
      for (int s = 0; s < 10; s++) begin
        int n;
        n = $urandom_range(0, 12);
        for (int k = 0; k < n; k++) begin
          logic [17:0] w;
          w = 18'($urandom) & ~(18'(1) << FB_EE);
          fq[s].push_back(w); expq[s].push_back(w);
        end
        begin
          logic [17:0] w;
          w = {2'b00, 1'b1, 7'(e), 4'(s), 4'(e)};
          fq[s].push_back(w); expq[s].push_back(w);
        end
      end
  endtask

  task automatic drain(input int maxcyc);
    int c = 0;
    while (c < maxcyc) begin
      int left = 0;
      for (int s = 0; s < 10; s++) left += expq[s].size();
      if (left == 0) break;
      @(posedge clk); #1; c++;
      if ($urandom_range(0, 15) == 0 && !test) begin
        int nbefore;
        nbefore = 0;
        for (int s = 0; s < 10; s++) nbefore += expq[s].size();
        hold = 1; hold_seen++;
        repeat (8) @(posedge clk);
        #1;
        begin
          int mid;
          mid = 0;
          for (int s = 0; s < 10; s++) mid += expq[s].size();
          repeat (6) @(posedge clk);
          #1;
          begin
            int aft;
            aft = 0;
            for (int s = 0; s < 10; s++) aft += expq[s].size();
            checks++;
            if (aft != mid) begin failures++; $display("words left while hold"); end
            else hold_stops++;
          end
        end
        hold = 0;
      end
    end
    checks++;
    for (int s = 0; s < 10; s++) if (expq[s].size() != 0) begin failures++; $display("stream %0d: %0d words not read", s, expq[s].size()); break; end
  endtask

  initial begin
    vme = '0;
    for (int s = 0; s < 10; s++) begin ev_of_stream[s] = 0; fdata[s] = '0; end
    empty_n = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    load(20);
    drain(20000);
    test = 1;
    load(5);
    drain(20000);
    test = 0;
    checks++;
    if (hold_stops == 0 || det_switches < 10) begin failures++; $display("hold %0d deterministic %0d", hold_stops, det_switches); end
    $display("hold periods %0d, deterministic stream switches %0d", hold_stops, det_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
