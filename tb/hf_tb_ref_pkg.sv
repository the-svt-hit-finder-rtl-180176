// Reference model shared by the clustering-engine and board testbenches.
//
// It builds SVX raw events and computes, independently of the RTL, the FIFO words a clustering
// engine must write for them: pedestal subtraction and threshold, clusters of adjacent strips
// (cut every six strips), the charge cut, the position rule (charge-weighted for up to three
// strips using the offset table below, median for four to six) and the end-of-event word. The
// offset table is the one the Cluster RAM is loaded with:
//   offset(p, c, n) = round(16 * (n - p) / (p + c + n)), 0 when all three are zero,
// where p, c, n are bits 6:2 of the previous, centre and next pulse heights.
package hf_tb_ref_pkg;
  import hf_pkg::*;

  function automatic int cram_offset(int p, int c, int n);
    int t, o;
    t = p + c + n;
    if (t == 0) return 0;
    o = (2 * 16 * (n - p) + (n - p >= 0 ? t : -t)) / (2 * t);
    if (o > 31) o = 31;
    if (o < -32) o = -32;
    return o;
  endfunction

  function automatic logic [7:0] cram_word(int a);
    return 8'(cram_offset((a >> 10) & 31, (a >> 5) & 31, a & 31)) & 8'h3f;
  endfunction

  // Pedestal and threshold used by the testbenches.
  function automatic int ped_of(int cs);
    return (cs * 7) % 13;
  endfunction
  function automatic int thr_of(int chip);
    return 2 + chip;
  endfunction

  class hf_event;
    logic [15:0] words[$];      // raw words of the event (all valid)
    logic [17:0] fifo[$];       // expected FIFO words
    int          nclusters;
    int          cram_addr[$];  // Cluster RAM entries the position lookups of this event read

    // nchips axial chips with random strips; max_cl = cluster limit (0 = none)
    function new(int nchips, logic [7:0] bx, int cut, int max_cl, int occupancy);
      int cs[$], ph[$], vcs[$], vph[$];
      int written;
      logic td;
      words.push_back(16'hC3C3);                  // HDI ID
      words.push_back({bx, 8'h5A});               // bunch crossing
      for (int c = 0; c < nchips; c++) begin
        int s;
        words.push_back({AXIAL_ID_TAG, 5'(c), 8'h00});
        s = (c < nchips - 2 && $urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 20);
        while (s < 128) begin
          logic [7:0] p;
          p = ($urandom_range(0, 9) == 0) ? 8'($urandom_range(128, 255)) : 8'($urandom_range(0, 127));
          words.push_back({1'b0, 7'(s), p});
          cs.push_back(c * 128 + s);
          ph.push_back(int'(p));
          s += ($urandom_range(0, 99) < occupancy) ? 1 : $urandom_range(2, 40);
        end
      end
      words.push_back({STEREO_ID_TAG, 5'd0, 8'h00});
      for (int k = 0; k < 4; k++) words.push_back({1'b0, 7'(k * 3), 8'h40});
      // Aim
      foreach (cs[i]) begin
        int p;
        p = (ph[i] >= 128) ? 0 : ph[i];
        p = p - ped_of(cs[i]);
        if (p < 0) p = 0;
        if (p >= thr_of(cs[i] / 128)) begin vcs.push_back(cs[i]); vph.push_back(p); end
      end
      // Fire
      nclusters = 0; written = 0; td = 0;
      begin
        int i = 0;
        while (i < vcs.size()) begin
          int j = i, n, sum = 0, pos;
          while (j + 1 < vcs.size() && vcs[j+1] == vcs[j] + 1 && j + 1 - i < 6) j++;
          n = j - i + 1;
          for (int k = i; k <= j; k++) sum += vph[k];
          if (n == 1) begin
            pos = vcs[i] * 16 + cram_offset(0, vph[i] >> 2, 0);
            cram_addr.push_back((vph[i] >> 2) << 5);
          end else if (n == 2) begin
            pos = vcs[j] * 16 + cram_offset(vph[i] >> 2, vph[j] >> 2, 0);
            cram_addr.push_back(((vph[i] >> 2) << 10) | ((vph[j] >> 2) << 5));
          end else if (n == 3) begin
            pos = vcs[i+1] * 16 + cram_offset(vph[i] >> 2, vph[i+1] >> 2, vph[j] >> 2);
            cram_addr.push_back(((vph[i] >> 2) << 10) | ((vph[i+1] >> 2) << 5) | (vph[j] >> 2));
          end else pos = (vcs[j] - n / 2) * 16;
          if (sum > cut) begin
            nclusters++;
            if (max_cl == 0 || written < max_cl) begin
              fifo.push_back({2'b00, 1'b0, n > 3, 14'(pos)});
              written++;
            end else td = 1;
          end
          i = j + 1;
        end
      end
      begin
        logic [17:0] ee;
        ee = '0;
        ee[FB_EE] = 1'b1;
        ee[FB_TD] = td;
        ee[11:8]  = (nchips == 0) ? 4'd15 : 4'(nchips - 1);
        ee[7:0]   = bx;
        fifo.push_back(ee);
      end
    endfunction

    // Insert a strip word that is out of order (strip 0 after the last axial strip): the
    // clustering engine ends the event there and flags it as invalid data.
    function void make_bad_order();
      words.insert(words.size() - 5, 16'h0010);
      fifo[fifo.size() - 1][FB_ID] = 1'b1;
    endfunction

    // Pad the event with stereo strip words up to n words (ignored by the clustering engine).
    function void pad_to(int n);
      while (words.size() < n) words.push_back({1'b0, 7'(words.size() % 128), 8'h20});
    endfunction
  endclass

endpackage
