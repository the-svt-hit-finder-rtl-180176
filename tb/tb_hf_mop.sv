// Self-checking testbench of the output processor (MOP) with its Output SPY buffer.
//
// Merged words are driven directly: per event each of the ten streams sends random clusters and
// an end-of-event word carrying a bunch crossing number and the truncated/invalid flags. Some
// events carry a mismatched bunch number, a lost-lock pulse or a FIFO-full pulse. Expected
// output words are computed here: clusters with layer and barrel from the default map, and one
// end-of-event word per event with error flags, the parity of the event's cluster words and the
// bunch number. Also checked: valid runs half a cycle ahead of each word, the LEDs, the Hold
// OR, the CDF/SVT error outputs through their masks, suppression of a masked error flag in the
// end-of-event word, and the OSPY test mode replaying the words stored in the buffer.
module tb_hf_mop;
  import hf_pkg::*;

  logic clk = 0, rst = 1;
  logic [23:0] merged;
  logic [9:0] full_n;
  logic [3:0] llock;
  logic h1 = 0, h2 = 0, hold, test = 0, step = 1;
  logic [22:0] od;
  logic v1, v2, l1, l2, cdf, svt, ll, ospy_we, eoe;
  logic [15:0] ospy_addr;
  logic [35:0] ospy_wd, ospy_rd;
  vme_bus_t vme;
  logic [31:0] vrd;
  logic vsel;
  int checks = 0, failures = 0;

  hf_mop dut (.clk, .rst, .merged_i(merged), .fifo_full_n_i(full_n), .lost_lock_i(llock),
              .hold1_i(h1), .hold2_i(h2), .hold_o(hold), .test_i(test), .test_step_i(step),
              .out_data_o(od), .valid1_o(v1), .valid2_o(v2), .led1_n_o(l1), .led2_n_o(l2),
              .cdf_error_o(cdf), .svt_error_o(svt), .lost_lock_o(ll),
              .ospy_we_o(ospy_we), .ospy_addr_o(ospy_addr), .ospy_wdata_o(ospy_wd),
              .ospy_rdata_i(ospy_rd), .vme_i(vme), .vme_rdata_o(vrd), .vme_rsel_o(vsel),
              .eoe_o(eoe));
  hf_spy_ram #(.AW(16), .W(36)) ospy (.clk, .we(ospy_we), .addr(ospy_addr), .wdata(ospy_wd),
                                     .rdata(ospy_rd));

  always #5 clk = !clk;

  // default map: layer/barrel of each stream
  function automatic logic [5:0] lb(int s);
    int order[10] = '{0, 6, 2, 8, 4, 5, 1, 7, 3, 9};
    for (int i = 0; i < 10; i++) if (order[i] == s) return {3'(i % 5 + 1), 3'(i / 5 + 1)};
    return 0;
  endfunction

  logic [22:0] expq[$], all_out[$];
  logic v_prev = 0;
  int n_out = 0;
  always @(posedge clk) begin
    if (!rst && !l1) begin
      n_out++;
      all_out.push_back(od);
      checks++;
      if (!v_prev) begin failures++; $display("valid not ahead of word"); end
      if (!test) begin
        if (expq.size() == 0) begin failures++; $display("extra word %h", od); end
        else begin
          logic [22:0] e;
          e = expq.pop_front();
          if (od != e) begin failures++; if (failures < 10) $display("word %h expected %h", od, e); end
        end
      end
    end
    v_prev <= v1;
  end

  task automatic put(input logic [23:0] m);
    merged = m; @(posedge clk); #1; merged = '0;
  endtask

  task automatic vme_write(input logic [15:0] sub, input logic [31:0] d);
    vme = '{addr: {DEV_MOP, 4'd0, sub}, wdata: d, write: 1'b1, ds: 1'b0, as: 1'b1};
    repeat (2) @(posedge clk);
    vme.ds = 1; repeat (4) @(posedge clk);
    vme = '0; @(posedge clk); #1;
  endtask

  int n_lostsync = 0, n_llock = 0, n_fifoovf = 0;
  task automatic event_run(input int kind, input logic [11:0] mask);
    logic [7:0] bx;
    logic [11:0] err;
    logic par;
    bx = 8'($urandom); err = 0; par = 0;
    for (int s = 0; s < 10; s++) begin
      int n;
      n = $urandom_range(0, 4);
      for (int k = 0; k < n; k++) begin
        logic [14:0] c;
        logic [22:0] w;
        c = 15'($urandom);
        w = {1'b0, 1'b1, lb(s), c};
        par ^= ^w[21:0];
        expq.push_back(w);
        put({stream_label(s), 3'b000, c});
      end
      if (s == 3 && kind == 1) begin llock = 4'b0100; put(0); llock = 0; err[ERR_LOSTLOCK] = 1; n_llock++; end
      if (s == 5 && kind == 2) begin full_n = 10'h3fe; put(0); full_n = '1; err[ERR_FIFOOVF] = 1; n_fifoovf++; end
      begin
        logic td, id;
        logic [7:0] b;
        td = ($urandom_range(0, 9) == 0); id = ($urandom_range(0, 9) == 0);
        b = (kind == 3 && s == 7) ? bx ^ 8'h01 : bx;
        if (kind == 3 && s == 7) begin err[ERR_LOSTSYNC] = 1; n_lostsync++; end
        if (td) err[ERR_TRUNC] = 1;
        if (id) err[ERR_INVDATA] = 1;
        if (s == 9) expq.push_back({1'b1, 1'b1, err & ~mask, par, bx});
        put({stream_label(s), 2'b00, 1'b1, td, 1'b0, id, 4'h0, b});
      end
    end
    repeat (2) @(posedge clk);
    #1;
  endtask

  initial begin
    merged = '0; full_n = '1; llock = '0; vme = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int e = 0; e < 100; e++) event_run(e % 4, 0);
    checks++;
    if (cdf || svt) begin failures++; $display("error outputs without masks"); end
    vme_write(16'h1212, 1 << ERR_LOSTSYNC);   // CDF error on lost sync
    vme_write(16'h1213, 1 << ERR_FIFOOVF);    // SVT error on FIFO overflow
    checks++;
    if (!cdf || !svt) begin failures++; $display("error outputs not set"); end
    vme_write(16'h1201, 0);
    checks++;
    if (cdf || svt) begin failures++; $display("error register not cleared"); end
    vme_write(16'h1210, 1 << ERR_LOSTLOCK);   // mask lost lock out of the EE word
    for (int e = 0; e < 8; e++) event_run(e % 4, 12'(1 << ERR_LOSTLOCK));
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d words missing", expq.size()); end
    // hold and lost-lock output
    h2 = 1; #1; checks++; if (!hold) begin failures++; $display("hold"); end
    h2 = 0; llock = 4'b0001; #1; checks++; if (!ll) begin failures++; $display("lost lock"); end
    llock = 0;
    // OSPY replay: the first words stored must come out again
    begin
      logic [22:0] rec[$];
      int n0;
      rec = all_out;
      n0 = n_out;
      test = 1;
      repeat (rec.size() + 10) @(posedge clk);
      #1 test = 0;
      checks++;
      if (n_out - n0 != rec.size()) begin failures++; $display("replayed %0d of %0d", n_out - n0, rec.size()); end
      for (int i = 0; i < rec.size() && n0 + i < all_out.size(); i++) begin
        checks++;
        if (all_out[n0 + i] != rec[i]) begin failures++; $display("replay word %0d", i); break; end
      end
    end
    checks++;
    if (n_lostsync == 0 || n_llock == 0 || n_fifoovf == 0) begin failures++; $display("an error kind never happened"); end
    $display("lost sync %0d, lost lock %0d, FIFO overflow %0d events", n_lostsync, n_llock, n_fifoovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
