// Self-checking testbench of Ready, the raw-data parser.
//
// Builds SVX events word by word (HDI ID, bunch crossing, axial chip IDs with strips, a stereo
// chip ID, then valid low) and checks the strip words sent on, the end-of-event word and the
// number of cycles from the stereo chip ID to the end-of-event flag (21 flush words plus the
// flag itself). Error events check each rule that ends an event with the invalid-data flag: a
// strip number going down, a strip before any chip ID, an unexpected chip ID and the input
// ERROR bit. Also checked: the truncated-data flag, the WAIT state holding until valid drops,
// and the DISABLED state.
module tb_hm_ready;
  import hf_pkg::*;

  logic clk = 0, rst = 1, ce = 1;
  raw_word_t in;
  logic [7:0][7:0] chip_id;
  logic [2:0] n_m1;
  logic dis = 0, trunc = 0;
  hit_t hit;
  logic end_data, eoe;
  logic [17:0] eoe_word;
  int checks = 0, failures = 0;

  hm_ready dut (.clk, .rst, .ce, .in_i(in), .chip_id_i(chip_id), .n_chip_m1_i(n_m1),
                .disable_i(dis), .trunc_i(trunc), .hit_o(hit), .end_data_o(end_data),
                .eoe_o(eoe), .eoe_word_o(eoe_word));

  always #5 clk = !clk;

  int exp_cs[$], exp_ph[$];
  int eoe_count = 0, eoe_cycle = 0, cyc = 0;
  logic [17:0] last_eoe;
  always @(posedge clk) begin
    cyc++;
    if (!rst && hit.valid) begin
      checks++;
      if (exp_cs.size() == 0) begin failures++; $display("unexpected hit %h", hit.cs); end
      else begin
        int c, p;
        c = exp_cs.pop_front(); p = exp_ph.pop_front();
        if (hit.cs != 10'(c) || hit.ph != 8'(p)) begin
          failures++; $display("hit %h/%h expected %h/%h", hit.cs, hit.ph, c, p);
        end
      end
    end
    if (!rst && eoe) begin eoe_count++; eoe_cycle = cyc; last_eoe = eoe_word; end
  end

  task automatic put(input logic v, input logic e, input logic [15:0] d);
    in.valid = v; in.err = e; in.data = d;
    @(posedge clk); #1;
  endtask

  // kind: 0 good, 1 strip goes down, 2 strip before chip ID, 3 wrong chip ID, 4 ERROR bit
  task automatic event_run(input int kind, input int nchips, input logic [7:0] bx,
                           input logic do_trunc);
    int stereo_cyc, n0, err_at;
    logic exp_id, trunc_done;
    trunc_done = 0;
    n0 = eoe_count;
    exp_id = (kind != 0);
    err_at = $urandom_range(0, nchips - 1);
    put(1, 0, 16'hA5A5);               // HDI ID, discarded
    put(1, 0, {bx, 8'h3C});            // bunch crossing
    if (kind == 2) put(1, 0, {8'h05, 8'h10});  // strip before any chip ID
    else begin
      for (int c = 0; c < nchips; c++) begin
        int s;
        logic stop;
        stop = 0;
        if (kind == 3 && c == err_at) begin
          put(1, 0, {AXIAL_ID_TAG, 5'd31, 8'h00});   // unexpected ID: chip count becomes 15
          put(1, 0, {8'h01, 8'h20});
          stop = 1;
        end else put(1, 0, {chip_id[c], 8'h00});
        if (stop) break;
        s = 10;
        for (int k = 0; k < 5; k++) begin
          logic [7:0] ph;
          s += $urandom_range(0, 20);
          if (s > 127) break;
          ph = 8'($urandom);
          if (kind == 1 && c == err_at && k == 3) begin
            put(1, 0, {1'b0, 7'd0, ph});      // strip number goes down: event ends
            break;
          end
          if (kind == 4 && c == err_at && k == 2) begin
            put(1, 1, {1'b0, 7'(s), ph});
            break;
          end
          exp_cs.push_back({c[2:0], 7'(s)}); exp_ph.push_back(ph);
          trunc = do_trunc && c == 0 && k == 0;
          if (trunc) trunc_done = 1;
          put(1, 0, {1'b0, 7'(s), ph});
          trunc = 0;
        end
        if ((kind == 1 || kind == 4) && c == err_at) break;
      end
    end
    stereo_cyc = cyc;
    put(1, 0, {STEREO_ID_TAG, 5'd0, 8'h00});
    for (int k = 0; k < 30; k++) put(1, 0, {8'h02, 8'h55});   // stereo strips, ignored
    put(0, 0, 16'h0);
    repeat (5) put(0, 0, 16'h0);
    checks++;
    if (eoe_count != n0 + 1) begin failures++; $display("no end-of-event flag"); end
    else begin
      checks++;
      if (last_eoe[FB_EE] != 1 || last_eoe[7:0] != bx || last_eoe[FB_ID] != exp_id ||
          last_eoe[FB_TD] != trunc_done) begin
        failures++; $display("eoe word %h (kind %0d bx %h)", last_eoe, kind, bx);
      end
      if (kind == 0) begin
        checks++;
        if (eoe_cycle - stereo_cyc != 24) begin
          failures++; $display("end of event after %0d cycles", eoe_cycle - stereo_cyc);
        end
      end
    end
    checks++;
    if (exp_cs.size() != 0) begin failures++; $display("%0d hits missing", exp_cs.size()); exp_cs.delete(); exp_ph.delete(); end
  endtask

  initial begin
    in = '0;
    for (int i = 0; i < 8; i++) chip_id[i] = {AXIAL_ID_TAG, 5'(i + 3)};
    n_m1 = 3'd5;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (2) put(0, 0, 0);
    for (int e = 0; e < 200; e++) event_run(e % 5, $urandom_range(1, 6), 8'($urandom), (e % 7) == 3);
    // disabled: an event is ignored completely
    dis = 1; put(0, 0, 0); dis = 0;
    begin
      int n0;
      n0 = eoe_count;
      dis = 1;
      put(1, 0, 16'h1111); put(1, 0, 16'h2222); put(1, 0, {chip_id[0], 8'h0}); put(1, 0, 16'h0505);
      put(1, 0, {STEREO_ID_TAG, 13'h0}); repeat (30) put(0, 0, 0);
      dis = 0;
      repeat (2) put(0, 0, 0);
      checks++;
      if (eoe_count != n0) begin failures++; $display("disabled machine produced output"); end
    end
    event_run(0, 3, 8'h77, 0);
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
