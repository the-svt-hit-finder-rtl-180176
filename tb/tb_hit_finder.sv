// End-to-end testbench of the Hit Finder board, at the default sizes.
//
// The testbench plays the four G-links and a VME master. Over VME (through the Boot chip's
// strobe sequencer) it sets the run mode, broadcasts thresholds and pedestals to the ten
// clustering engines and writes the Cluster RAM entries the events will read, with the offset
// table of the reference model. Events are built per stream by the reference model, padded to
// a common length and packed into link words the way the alignment chips unpack them (layers
// 0 and 1 and the low nibble of layer 4 on the first link of a pair, layers 2, 3 and the high
// nibble of layer 4 on the second), with a random skew of up to one clock between the links of
// a pair. Every front-panel word is checked: cluster words against the expected per-stream
// order with the default barrel/layer map, the end-of-event word against the expected error
// flags, the parity of the event's cluster words and the bunch crossing; the valid strobe must
// lead each word by half a clock and the LEDs must light with it.
// Mechanisms made to happen and counted (each must occur at least once): front-panel Hold
// stalling a non-empty FIFO, deterministic merge mode, the cluster limit (truncated data),
// lost lock, lost sync, invalid data, Input SPY replay in test mode, Output SPY replay in test
// mode, FIFO overflow (with Hold kept high) and its SVT error output, and HF_Init clearing the
// board afterwards. VME read-back of a clustering-engine register is checked as well.
module tb_hit_finder;
  import hf_pkg::*;
  import hf_tb_ref_pkg::*;

  logic clk53 = 0, clk30 = 0, tap_clk = 0, por = 1, svt_init_n = 1;
  logic [3:0][19:0] link_data;
  logic [3:0] link_dav_n, link_err, link_lnkrdy_n;
  logic [31:2] vme_addr;
  logic [31:0] vme_data, vme_rdata;
  logic vme_data_str_n, vme_write, vme_ack;
  logic [22:0] out_data;
  logic valid1, valid2, led1_n, led2_n, hold1 = 0, hold2 = 0;
  logic cdf_error_n, svt_error_n, lost_lock_n;
  logic [6:0] lights;
  int checks = 0, failures = 0;

  hit_finder dut (
    .clk53, .clk30, .tap_clk, .por, .svt_init_n,
    .link_data, .link_dav_n, .link_err, .link_lnkrdy_n,
    .vme_addr, .vme_data, .vme_data_str_n, .vme_write, .vme_ack, .vme_rdata,
    .out_data_o(out_data), .valid1_o(valid1), .valid2_o(valid2), .led1_n_o(led1_n), .led2_n_o(led2_n),
    .hold1_i(hold1), .hold2_i(hold2),
    .cdf_error_n_o(cdf_error_n), .svt_error_n_o(svt_error_n), .lost_lock_n_o(lost_lock_n),
    .lights_o(lights));

  always #9  clk53 = !clk53;
  always #17 clk30 = !clk30;
  always #20 tap_clk = !tap_clk;

  // stream fed by alignment chip d, layer l; its default output label is layer l+1, barrel d+1
  function automatic int s_of(int d, int l);
    int t0[5] = '{0, 6, 2, 8, 4};
    int t1[5] = '{5, 1, 7, 3, 9};
    return d == 0 ? t0[l] : t1[l];
  endfunction
  function automatic logic [5:0] label_of(int s);
    for (int d = 0; d < 2; d++) for (int l = 0; l < 5; l++)
      if (s_of(d, l) == s) return {3'(l + 1), 3'(d + 1)};
    return '0;
  endfunction

  // ---------------- expected output ----------------
  class exp_ev;
    logic [22:0] q[10][$];
    logic [11:0] err;
    logic [7:0]  bx, bx_alt;
  endclass
  exp_ev evq[$];
  logic [22:0] ospy_ref[$], ospy_got[$];
  int  chk_mode = 0;           // 0 check against evq, 1 collect OSPY replay, 2 ignore
  bit  record_ospy = 0;
  logic parity_acc = 0;
  int  n_out_events = 0, n_trunc = 0, n_lostlock = 0, n_lostsync = 0, n_invdata = 0, n_led = 0;
  logic valid_before;
  time  t_first_in = 0, t_first_out = 0;   // first link word and first front-panel word

  always @(posedge clk30) valid_before <= valid1;

  always @(negedge clk30) if (!por) begin
    if (valid_before != !led1_n || led1_n != led2_n || valid1 != valid2) begin
      failures++;
      if (failures < 10) $display("%t strobe/LED mismatch", $time);
    end
    if (!led1_n) begin
      if (t_first_out == 0) t_first_out = $time;
      n_led++;
      if (record_ospy) ospy_ref.push_back(out_data);
      if (chk_mode == 1) ospy_got.push_back(out_data);
      else if (chk_mode == 0) check_word(out_data);
    end
  end

  task automatic check_word(input logic [22:0] o);
    exp_ev e;
    checks++;
    if (evq.size() == 0) begin failures++; $display("%t unexpected word %h", $time, o); return; end
    e = evq[0];
    if (!o[OB_EP]) begin failures++; $display("EP bit clear in %h", o); end
    if (!o[OB_EE]) begin
      int s = -1;
      for (int k = 0; k < 10; k++) if (label_of(k) == o[20:15]) s = k;
      parity_acc ^= ^o[21:0];
      if (s < 0 || e.q[s].size() == 0) begin
        failures++; if (failures < 10) $display("%t unexpected cluster word %h", $time, o);
      end else begin
        logic [22:0] x;
        x = e.q[s].pop_front();
        if (x != o) begin failures++; if (failures < 10) $display("%t cluster %h expected %h", $time, o, x); end
      end
    end else begin
      for (int k = 0; k < 10; k++) if (e.q[k].size() != 0) begin
        failures++; $display("%t stream %0d: %0d cluster words missing", $time, k, e.q[k].size());
      end
      if (o[20:9] != e.err || o[OB_PA] != parity_acc || (o[7:0] != e.bx && o[7:0] != e.bx_alt)) begin
        failures++;
        $display("%t end-of-event %h: errors %h parity %0d bx %h, expected %h %0d %h", $time, o,
                 o[20:9], o[OB_PA], o[7:0], e.err, parity_acc, e.bx);
      end
      if (o[9 + ERR_TRUNC])    n_trunc++;
      if (o[9 + ERR_LOSTLOCK]) n_lostlock++;
      if (o[9 + ERR_LOSTSYNC]) n_lostsync++;
      if (o[9 + ERR_INVDATA])  n_invdata++;
      parity_acc = 0;
      n_out_events++;
      void'(evq.pop_front());
    end
  endtask

  // ---------------- VME master ----------------
  task automatic bvme(input logic [4:0] dev, input logic [3:0] st, input logic [15:0] sub,
                      input logic wr, input logic [31:0] d, output logic [31:0] rd);
    vme_addr = '0;
    vme_addr[26:2] = {dev, st, sub};
    vme_data = d;
    vme_write = wr;
    @(posedge tap_clk);
    vme_data_str_n = 0;
    while (!vme_ack) @(posedge tap_clk);
    @(posedge tap_clk);
    rd = vme_rdata;
    vme_data_str_n = 1;
    while (vme_ack) @(posedge tap_clk);
    repeat (2) @(posedge tap_clk);
  endtask
  task automatic vw(input logic [4:0] dev, input logic [15:0] sub, input logic [31:0] d);
    logic [31:0] r;
    bvme(dev, dev == DEV_BOOT ? 4'd0 : STREAM_BROADCAST, sub, 1'b1, d, r);
  endtask
  task automatic vr(input logic [4:0] dev, input logic [3:0] st, input logic [15:0] sub,
                    output logic [31:0] r);
    bvme(dev, st, sub, 1'b0, 0, r);
  endtask

  // ---------------- links ----------------
  hf_event evs[$][10];
  bit      cram_done[int];

  // Send one event: ev[s] is stream s; link lostlock drives LNKRDY* of link 3 high meanwhile.
  task automatic send(input hf_event ev[10], input bit lostlock);
    int n = 0;
    logic [15:0] w[10][$];
    logic [19:0] lw[4][$];
    int skew[4];
    foreach (ev[s]) if (ev[s].words.size() > n) n = ev[s].words.size();
    foreach (ev[s]) begin ev[s].pad_to(n); w[s] = ev[s].words; end
    for (int d = 0; d < 2; d++) begin
      for (int k = 0; k < n; k++) begin
        logic [15:0] w0, w1, w2, w3, w4;
        w0 = w[s_of(d, 0)][k]; w1 = w[s_of(d, 1)][k]; w2 = w[s_of(d, 2)][k];
        w3 = w[s_of(d, 3)][k]; w4 = w[s_of(d, 4)][k];
        lw[2*d].push_back({w4[11:8], w1[15:8], w0[15:8]});
        lw[2*d].push_back({w4[3:0], w1[7:0], w0[7:0]});
        lw[2*d+1].push_back({w4[15:12], w3[15:8], w2[15:8]});
        lw[2*d+1].push_back({w4[7:4], w3[7:0], w2[7:0]});
      end
    end
    foreach (skew[i]) skew[i] = $urandom_range(0, 1);
    if (lostlock) link_lnkrdy_n[3] = 1'b1;
    for (int t = 0; t < 2 * n + 1; t++) begin
      @(posedge clk53); #1;
      if (t_first_in == 0) t_first_in = $time;
      for (int i = 0; i < 4; i++) begin
        int k = t - skew[i];
        link_dav_n[i] = !(k >= 0 && k < 2 * n);
        link_data[i]  = link_dav_n[i] ? 20'hfffff : lw[i][k];
      end
    end
    @(posedge clk53); #1;
    link_dav_n = '1;
    link_lnkrdy_n = '0;
    repeat (80) @(posedge clk53);
    #1;
  endtask

  // Expected output of an event whose stream s is built by ev[s].
  function automatic exp_ev expect_of(hf_event ev[10], logic [11:0] extra_err);
    exp_ev e = new;
    e.err = extra_err;
    e.bx = ev[0].fifo[ev[0].fifo.size() - 1][7:0];
    e.bx_alt = e.bx;
    foreach (ev[s]) begin
      logic [17:0] ee;
      foreach (ev[s].fifo[i]) if (i < ev[s].fifo.size() - 1)
        e.q[s].push_back({1'b0, 1'b1, label_of(s), ev[s].fifo[i][14:0]});
      ee = ev[s].fifo[ev[s].fifo.size() - 1];
      if (ee[FB_TD]) e.err[ERR_TRUNC] = 1'b1;
      if (ee[FB_ID]) e.err[ERR_INVDATA] = 1'b1;
      if (ee[7:0] != e.bx) begin e.err[ERR_LOSTSYNC] = 1'b1; e.bx_alt = ee[7:0]; end
    end
    return e;
  endfunction

  function automatic void make_event(output hf_event ev[10], input logic [7:0] bx, input int max_cl,
                                     input int occ);
    foreach (ev[s]) ev[s] = new($urandom_range(1, 8), bx, 0, max_cl, occ);
  endfunction

  task automatic load_cram(input hf_event ev[10]);
    foreach (ev[s]) foreach (ev[s].cram_addr[i]) begin
      int a = ev[s].cram_addr[i];
      if (!cram_done.exists(a)) begin
        vw(DEV_CRAM0, 16'(a), cram_word(a));
        cram_done[a] = 1;
      end
    end
  endtask

  task automatic wait_drained();
    int t = 0;
    while (evq.size() != 0 && t < 20000) begin @(posedge clk30); t++; end
    repeat (20) @(posedge clk30);
  endtask

  // random Hold while enabled
  bit hold_rand = 0;
  int n_hold_stall = 0;
  always begin
    @(posedge clk30);
    if (hold_rand) begin
      hold1 = $urandom_range(0, 1);
      hold2 = !hold1 && $urandom_range(0, 3) == 0;
      repeat ($urandom_range(1, 60)) @(posedge clk30);
    end
  end
  always @(posedge clk30) if ((hold1 || hold2) && dut.empty_n != 0) n_hold_stall++;
  int n_ovf = 0, n_svt = 0, n_cdf = 0, n_lost_lock_pin = 0, n_test_light = 0;
  always @(posedge clk53) if (dut.full_n != 10'h3ff) n_ovf++;
  always @(posedge clk30) begin
    if (!svt_error_n) n_svt++;
    if (!cdf_error_n) n_cdf++;
    if (!lost_lock_n) n_lost_lock_pin++;
    if (lights[6]) n_test_light++;
  end

  initial begin
    hf_event ev[10];
    exp_ev e;
    logic [31:0] r;
    int n_det = 0, n_ispy = 0, n_ospy = 0, n_init = 0;
    link_data = '0; link_dav_n = '1; link_err = '0; link_lnkrdy_n = '0;
    vme_addr = '0; vme_data = '0; vme_data_str_n = 1; vme_write = 0;
    repeat (10) @(posedge clk30);
    por = 0;
    repeat (20) @(posedge clk30);
    vw(DEV_BOOT, 16'h0000, 32'h2);                     // run mode
    vr(DEV_BOOT, 4'd0, 16'h0000, r);
    checks++; if (r[1:0] != 2'd2) begin failures++; $display("brain register %h", r); end
    for (int c = 0; c < 8; c++) vw(DEV_HITMAN, 16'h1010 + 16'(c), thr_of(c));
    for (int a = 0; a < 1024; a++) vw(DEV_HITMAN, 16'(a), ped_of(a));
    vw(DEV_MOP, 16'h1212, 32'hfff);                    // CDF error: all flags
    vw(DEV_MOP, 16'h1213, 32'h1 << ERR_FIFOOVF);       // SVT error: FIFO overflow only
    vr(DEV_HITMAN, 4'd7, 16'h1015, r);
    checks++; if (r[6:0] != 7'(thr_of(5))) begin failures++; $display("threshold read-back %h", r); end

    // plain, held, deterministic, truncated, lost-lock, lost-sync and invalid-data events
    for (int k = 0; k < 18; k++) begin
      logic [11:0] extra;
      bit ll;
      int max_cl;
      extra = '0;
      ll = 0;
      max_cl = (k == 9 || k == 10) ? 4 : 0;
      make_event(ev, 8'(k + 1), max_cl, k % 4 == 0 ? 70 : 30);
      if (k == 12) begin ev[9] = new(5, 8'(k + 100), 0, 0, 30); end
      if (k == 14) begin ev[3].make_bad_order(); ev[7].make_bad_order(); end
      if (k == 11) begin ll = 1; extra[ERR_LOSTLOCK] = 1'b1; end
      load_cram(ev);
      if (k == 9) vw(DEV_HITMAN, 16'h1102, 4);
      if (k == 11) vw(DEV_HITMAN, 16'h1102, 0);
      if (k == 6) vw(DEV_BOOT, 16'h0000, 32'h12);      // deterministic merge
      if (k == 9) vw(DEV_BOOT, 16'h0000, 32'h2);
      if (k >= 6 && k < 9) n_det++;
      hold_rand = (k >= 3 && k < 8);
      if (k == 8) begin hold1 = 0; hold2 = 0; end
      if (k == 11) wait_drained();
      e = expect_of(ev, extra);
      evq.push_back(e);
      send(ev, ll);
    end
    hold_rand = 0; hold1 = 0; hold2 = 0;
    wait_drained();

    // Output SPY: record one event, then replay it in OSPY test mode
    vw(DEV_MOP, 16'h1100, 0);
    make_event(ev, 8'h77, 0, 40);
    load_cram(ev);
    evq.push_back(expect_of(ev, '0));
    record_ospy = 1;
    send(ev, 0);
    wait_drained();
    record_ospy = 0;
    chk_mode = 1;
    vw(DEV_BOOT, 16'h0000, 32'h29);                    // test mode, OSPY, 15 MHz test clock
    repeat (4 * ospy_ref.size() + 100) @(posedge clk30);
    vw(DEV_BOOT, 16'h0000, 32'h2);
    repeat (10) @(posedge clk30);
    chk_mode = 0;
    checks++;
    if (ospy_got != ospy_ref || ospy_ref.size() == 0) begin
      failures++; $display("OSPY replay: %0d words, %0d recorded", ospy_got.size(), ospy_ref.size());
    end else n_ospy++;

    // Input SPY: write one event into every engine's ISPY and replay it in ISPY test mode
    ev[0] = new(6, 8'h5c, 0, 0, 40);
    foreach (ev[s]) ev[s] = ev[0];
    load_cram(ev);
    foreach (ev[0].words[i]) vw(DEV_ISPY, 16'(i), {14'd0, 2'b10, ev[0].words[i]});
    vw(DEV_ISPY, 16'(ev[0].words.size()), 32'h00000);
    vw(DEV_ISPY, 16'(ev[0].words.size() + 1), 32'h10000);
    vw(DEV_HITMAN, 16'h1100, 0);
    evq.push_back(expect_of(ev, '0));
    vw(DEV_BOOT, 16'h0000, 32'h25);                    // test mode, ISPY, 15 MHz test clock
    wait_drained();
    checks++;
    if (evq.size() != 0) begin failures++; $display("ISPY replay did not complete"); evq.delete(); end
    else n_ispy++;
    vw(DEV_BOOT, 16'h0000, 32'h2);
    repeat (100) @(posedge clk53);

    // FIFO overflow: keep Hold high and send busy events until a FIFO fills
    chk_mode = 2;
    hold1 = 1;
    for (int k = 0; k < 400 && n_ovf == 0; k++) begin
      make_event(ev, 8'(k), 0, 0);
      send(ev, 0);
    end
    repeat (2) begin make_event(ev, 8'hee, 0, 0); send(ev, 0); end
    hold1 = 0;
    repeat (30000) @(posedge clk30);
    vr(DEV_MOP, 4'd0, 16'h1214, r);
    checks++;
    if (!r[ERR_FIFOOVF] || n_svt == 0) begin failures++; $display("FIFO overflow not reported: %h", r); end
    // HF_Init clears the board
    vw(DEV_BOOT, 16'h0003, 0);
    repeat (50) @(posedge clk30);
    vr(DEV_MOP, 4'd0, 16'h1214, r);
    checks++;
    if (r != 0 || dut.empty_n != 0 || !svt_error_n) begin
      failures++; $display("HF_Init did not clear: errors %h, empty* %b", r, dut.empty_n);
    end else n_init++;

    checks++;
    if (n_out_events == 0 || n_hold_stall == 0 || n_det == 0 || n_trunc == 0 || n_lostlock == 0 ||
        n_lostsync == 0 || n_invdata == 0 || n_ospy == 0 || n_ispy == 0 || n_ovf == 0 ||
        n_svt == 0 || n_init == 0 || n_led == 0 || n_lost_lock_pin == 0 || n_test_light == 0 ||
        n_cdf == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("events out %0d, hold stalls %0d, deterministic events %0d, truncated %0d, lost lock %0d,",
             n_out_events, n_hold_stall, n_det, n_trunc, n_lostlock);
    $display("lost sync %0d, invalid data %0d, OSPY replays %0d, ISPY replays %0d, FIFO full cycles %0d, HF_Init %0d",
             n_lostsync, n_invdata, n_ospy, n_ispy, n_ovf, n_init);
    $display("SVT error cycles %0d, LED cycles %0d, lost-lock output cycles %0d, test-mode light cycles %0d, CDF error cycles %0d",
             n_svt, n_led, n_lost_lock_pin, n_test_light, n_cdf);
    // the 53 MHz clock has a period of 18 time units here
    $display("latency from the first link word to the first output word: %0d cycles of 53 MHz (%0d ns)",
             (t_first_out - t_first_in) / 18, (t_first_out - t_first_in) * 1887 / 1800);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk53);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
