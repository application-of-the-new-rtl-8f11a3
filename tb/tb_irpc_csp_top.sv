// End-to-end test of irpc_csp_top at its default sizes: 96 TDC channels (48 strips
// read at both ends by three TDC devices) through Check, both sortings, the
// concentrator and Push, into the back-end Demux window check.
//
// Hits follow a simple half-chamber model: per BX a muon with probability
// MUON_PCT % fires a cluster of 1 to 8 neighbouring strips (mean about 3); each
// strip also fires alone with a small background probability. A fired strip gives
// a word on both ends, except 5 % of strips that give one end only.
//  Phase 1 (steady rate, 1500 BX, the BX number wraps several times): every word
//   arrives exactly once, channel order is kept, no word is later than the 23 BX
//   window, and the mean sending delay does not depend on the TDC device or on the
//   strip end (within 1 BX). Strips fired at both ends carry TDC values that encode
//   a known hit position; each must come back exactly once with that position.
//  Phase 2 (burst: all 96 channels for 24 BX): channel FIFOs overflow and words
//   exceed the Demux window; generated = accepted + late + dropped.
// Mechanisms counted, each must occur: frames with three words, results of the
// first sorting on the LR end that moved words, single-ended words delivered,
// BX wrap-around, channel FIFO overflow, late words, hit positions computed, unpaired
// words replaced.
module tb_irpc_csp_top;
  import csp_pkg::*;
  // Stimulus generator (xorshift32) with its own fixed start value, so the traffic,
  // and with it every measured delay, is the same whatever the simulator seed.
  int unsigned rng_state = 32'h2545_f491;
  function automatic int unsigned rnd();
    rng_state ^= rng_state << 13;
    rng_state ^= rng_state >> 17;
    rng_state ^= rng_state << 5;
    return rng_state;
  endfunction
  function automatic int unsigned rnd_range(int unsigned n);
    return rnd() % (n + 1);
  endfunction
  localparam int MUON_PCT = 12;   // muon cluster per BX, percent
  localparam int BKG_PM   = 5;    // background per strip per BX, per mille

  logic clk40 = 0, clk160 = 0, clk120 = 0, rst_n = 1;   // falls at 1 ns: an edge for the asynchronous resets
  logic [95:0] hit = '0;
  logic [15:0] tdc [96];
  frame_t frame;
  logic [7:0] bx;
  logic [15:0] drop_count [3];
  logic [2:0] acc_valid;
  word_t acc_word [3];
  logic [7:0] acc_delay [3];
  logic [31:0] n_accepted, n_late;
  logic [7:0] max_delay;
  logic [2:0] pos_valid;
  logic [5:0] pos_strip [3];
  logic [7:0] pos_bx [3];
  logic signed [23:0] pos_r [3];
  logic [31:0] n_pairs, n_unpaired;

  int checks = 0, failures = 0;
  word_t chq [96][$];          // words generated per channel, oldest first
  int n_gen = 0, n_got = 0, min_delay = 999;
  bit phase2 = 0;
  longint dsum_dev [3], dsum_end [2];
  int dcnt_dev [3], dcnt_end [2];
  // mechanism counters
  int m_three = 0, m_lr_used = 0, m_single = 0, m_wrap = 0;
  bit single [logic [31:0]];
  int exp_r [logic [13:0]];    // expected position per {strip, generation BX}
  int n_dbl = 0, m_pairs = 0;

  irpc_csp_top dut (.*);

  always #12.5 clk40 = ~clk40;
  always #3.125 clk160 = ~clk160;
  always #4.1667 clk120 = ~clk120;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- frame monitor (40 MHz)
  always @(posedge clk40) if (rst_n) begin
    if (bx == 8'hFF) m_wrap++;
    // the back end reports the delay less its fixed latency of 4 BX; its outputs
    // come one clock after the frame
    for (int k = 0; k < 3; k++) if (acc_valid[k]) begin
      checks++;
      if (acc_delay[k] != 8'(bx - acc_word[k].bx - 8'd5)) begin
        failures++; $display("FAIL back-end delay %0d for word of BX %0d at %0d", acc_delay[k], acc_word[k].bx, bx);
      end
    end
    if (frame.valid == 3'b111) m_three++;
    checks++;
    if (!(frame.valid inside {3'b000, 3'b001, 3'b011, 3'b111})) begin
      failures++; $display("FAIL frame valid %b", frame.valid);
    end
    for (int k = 0; k < 3; k++) if (frame.valid[k]) begin
      logic [31:0] w;
      int ch, d;
      w = frame.word[k];
      ch = 32 * int'(frame.word[k].dev) + int'(frame.word[k].ch);
      d = int'(8'(bx - frame.word[k].bx - 8'd1));
      n_got++;
      if (d < min_delay) min_delay = d;
      checks++;
      if (ch >= 96) begin
        failures++; $display("FAIL word from channel %0d", ch);
      end else begin
        int pos;
        pos = -1;
        foreach (chq[ch][i]) if (pos < 0 && chq[ch][i] == frame.word[k]) pos = i;
        if (pos < 0) begin
          failures++; $display("FAIL unexpected word %h", w);
        end else begin
          // older words of the channel still waiting can only be words that were dropped
          if (pos > 0 && !phase2) begin
            failures++; $display("FAIL channel %0d out of order", ch);
          end
          if (single.exists(w)) m_single++;
          for (int i = 0; i <= pos; i++) void'(chq[ch].pop_front());
        end
        if (frame.word[k].dev < 3) begin
          dsum_dev[frame.word[k].dev] += d; dcnt_dev[frame.word[k].dev]++;
        end
        dsum_end[frame.word[k].ch[4]] += d; dcnt_end[frame.word[k].ch[4]]++;
      end
    end
  end

  // ---- hit positions: each must match the position encoded in the TDC values
  always @(negedge clk40) if (rst_n) begin
    for (int k = 0; k < 3; k++) if (pos_valid[k]) begin
      logic [13:0] key;
      key = {pos_strip[k], pos_bx[k]};
      checks++; m_pairs++;
      if (!exp_r.exists(key)) begin
        failures++; $display("FAIL position for strip %0d BX %0d that was not generated", pos_strip[k], pos_bx[k]);
      end else begin
        if (int'(pos_r[k]) != exp_r[key]) begin
          failures++; $display("FAIL position %0d, expected %0d (strip %0d)", pos_r[k], exp_r[key], pos_strip[k]);
        end
        exp_r.delete(key);
      end
    end
  end

  // ---- first sorting: results of searches on the LR end that were used
  for (genvar d = 0; d < 3; d++) begin : g_mon
    always @(posedge clk160)
      if (rst_n && dut.u_fee.g_tdc[d].u_group.u_first_sort.push &&
          !dut.u_fee.g_tdc[d].u_group.u_first_sort.side_hr)
        m_lr_used++;
  end

  task automatic fire(int strip, bit lr, bit hr);
    int dev, s;
    dev = strip / 16; s = strip % 16;
    if (lr) hit[32*dev + s] = 1'b1;
    if (hr) hit[32*dev + 16 + s] = 1'b1;
  endtask

  task automatic drive_bx(bit burst);
    @(negedge clk40);
    hit = '0;
    if (burst) hit = '1;
    else begin
      if (rnd_range(99) < MUON_PCT) begin
        int first, size;
        size = 1 + rnd_range(3) + rnd_range(2) + ((rnd_range(3) == 0) ? rnd_range(2) : 0);
        first = rnd_range(47);
        for (int s = first; s < first + size && s < 48; s++) fire(s, 1, 1);
      end
      for (int s = 0; s < 48; s++) begin
        if (rnd_range(999) < BKG_PM) begin
          int kind;
          kind = rnd_range(19);
          fire(s, kind != 0, kind != 1);
          if (s < 47 && rnd_range(1) != 0) fire(s + 1, 1, 1);   // size 1 or 2
        end
      end
    end
    // TDC values: random, except that a strip fired at both ends gets an HR time
    // that lies dt counts after its LR time, which places the hit at
    // r = (1600 - 20 dt) / 2 = 800 - 10 dt with the top's default length and speed.
    for (int c = 0; c < 96; c++) tdc[c] = 16'(rnd());
    for (int st = 0; st < 48; st++) begin
      int lo, hi, dt;
      lo = 32 * (st / 16) + st % 16; hi = lo + 16;
      if (hit[lo] && hit[hi]) begin
        dt = int'(rnd_range(160)) - 80;
        tdc[lo] = 16'(1000 + rnd_range(30000));
        tdc[hi] = 16'(int'(tdc[lo]) + dt);
        exp_r[{6'(st), bx}] = 800 - 10 * dt;
        n_dbl++;
      end
    end
    for (int c = 0; c < 96; c++) begin
      if (hit[c]) begin
        word_t w;
        int pair;
        w.bx = bx; w.dev = 3'(c / 32); w.ch = 5'(c % 32); w.tdc = tdc[c];
        chq[c].push_back(w);
        pair = (c % 32 < 16) ? c + 16 : c - 16;
        if (!hit[pair]) single[w] = 1;
        n_gen++;
      end
    end
  endtask

  initial begin
    for (int c = 0; c < 96; c++) tdc[c] = '0;
    for (int d = 0; d < 3; d++) begin dsum_dev[d] = 0; dcnt_dev[d] = 0; end
    dsum_end = '{0, 0}; dcnt_end = '{0, 0};
    #1 rst_n = 0;
    repeat (3) @(posedge clk40);
    rst_n = 1;
    repeat (4) @(posedge clk40);
    // ---- phase 1
    for (int n = 0; n < 1500; n++) drive_bx(0);
    @(negedge clk40); hit = '0;
    repeat (80) @(posedge clk40);
    checks++;
    if (n_got != n_gen || n_late != 0 || drop_count[0] + drop_count[1] + drop_count[2] != 0) begin
      failures++;
      $display("FAIL phase 1: %0d of %0d words, late %0d", n_got, n_gen, n_late);
    end
    // with nothing lost, every strip fired at both ends gives exactly one position
    checks++;
    if (n_pairs != 32'(n_dbl) || m_pairs != n_dbl) begin
      failures++; $display("FAIL phase 1: %0d positions (%0d seen) for %0d double-ended strips", n_pairs, m_pairs, n_dbl);
    end
    $display("phase 1: %0d hit positions, %0d single-ended words left unpaired", n_pairs, n_unpaired);
    $display("phase 1: %0d words in %0d BX, sending delay %0d to %0d BX", n_got, 1500, min_delay, max_delay);
    begin
      real m [3], e [2];
      for (int d = 0; d < 3; d++) m[d] = real'(dsum_dev[d]) / real'(dcnt_dev[d] > 0 ? dcnt_dev[d] : 1);
      for (int d = 0; d < 2; d++) e[d] = real'(dsum_end[d]) / real'(dcnt_end[d] > 0 ? dcnt_end[d] : 1);
      $display("mean delay per device %0.2f %0.2f %0.2f, LR %0.2f HR %0.2f", m[0], m[1], m[2], e[0], e[1]);
      checks++;
      if (m[0] - m[2] > 1.0 || m[2] - m[0] > 1.0 || e[0] - e[1] > 1.0 || e[1] - e[0] > 1.0) begin
        failures++; $display("FAIL delay depends on channel");
      end
    end
    // ---- phase 2
    begin
      int gen0;
      gen0 = n_gen;
      phase2 = 1;
      for (int n = 0; n < 24; n++) drive_bx(1);
      @(negedge clk40); hit = '0;
      // wait until the link has been idle for 50 BX
      begin
        int idle, t;
        idle = 0; t = 0;
        while (idle < 50 && t < 3000) begin
          @(posedge clk40);
          t++;
          idle = (frame.valid == 0) ? idle + 1 : 0;
        end
      end
      checks++;
      if (int'(n_accepted + n_late) + int'(drop_count[0]) + int'(drop_count[1]) + int'(drop_count[2]) != n_gen ||
          n_got != int'(n_accepted + n_late)) begin
        failures++;
        $display("FAIL phase 2: generated %0d accepted %0d late %0d dropped %0d", n_gen, n_accepted,
                 n_late, drop_count[0] + drop_count[1] + drop_count[2]);
      end
      $display("phase 2: burst of %0d words, accepted %0d late %0d dropped %0d %0d %0d", n_gen - gen0,
               n_accepted, n_late, drop_count[0], drop_count[1], drop_count[2]);
    end
    $display("mechanisms: three-word frames %0d, LR-end results used %0d, single-ended words %0d, BX wraps %0d, overflow drops %0d, late words %0d, hit positions %0d, unpaired words replaced %0d",
             m_three, m_lr_used, m_single, m_wrap, drop_count[0] + drop_count[1] + drop_count[2], n_late, m_pairs, n_unpaired);
    checks++; if (m_three == 0)    begin failures++; $display("FAIL no three-word frame"); end
    checks++; if (m_lr_used == 0) begin failures++; $display("FAIL no LR-end result used"); end
    checks++; if (m_single == 0)   begin failures++; $display("FAIL no single-ended word"); end
    checks++; if (m_wrap == 0)     begin failures++; $display("FAIL no BX wrap"); end
    checks++; if (drop_count[0] + drop_count[1] + drop_count[2] == 0) begin failures++; $display("FAIL no overflow"); end
    checks++; if (n_late == 0)     begin failures++; $display("FAIL no late word"); end
    checks++; if (m_pairs == 0)    begin failures++; $display("FAIL no hit position"); end
    checks++; if (n_unpaired == 0) begin failures++; $display("FAIL no unpaired word replaced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
