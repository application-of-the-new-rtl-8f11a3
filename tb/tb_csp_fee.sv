// Self-checking test of csp_fee, the complete front end, with its three clocks.
// Steady hits from a simple half-chamber model (muon clusters of 1 to 8 strips,
// single-strip background, 5 % of strips seen at one end only) for 800 BX: every
// word must come out in a frame exactly once, in channel order, frames must be
// filled from word 0 up, and every word must leave within 23 BX of its generation.
// Frames carrying three words and first-sorting results on the LR end must both occur.
module tb_csp_fee;
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
  localparam int MUON_PCT = 20;   // muon cluster per BX, percent
  localparam int BKG_PM   = 5;    // background per strip per BX, per mille

  logic clk40 = 0, clk160 = 0, clk120 = 0, rst_n = 1;   // falls at 1 ns: an edge for the asynchronous resets
  logic [95:0] hit = '0;
  logic [15:0] tdc [96];
  frame_t frame;
  logic [7:0] bx;
  logic [15:0] drop_count [3];
  int max_delay = 0;

  int checks = 0, failures = 0;
  word_t chq [96][$];          // words generated per channel, oldest first
  int n_gen = 0, n_got = 0, min_delay = 999;
  bit phase2 = 0;
  longint dsum_dev [3], dsum_end [2];
  int dcnt_dev [3], dcnt_end [2];
  // mechanism counters
  int m_three = 0, m_lr_used = 0, m_single = 0, m_wrap = 0;
  bit single [logic [31:0]];

  csp_fee dut (.*);

  always #12.5 clk40 = ~clk40;
  always #3.125 clk160 = ~clk160;
  always #4.1667 clk120 = ~clk120;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- frame monitor (40 MHz)
  always @(posedge clk40) if (rst_n) begin
    if (bx == 8'hFF) m_wrap++;
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
      if (d > max_delay) max_delay = d;
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

  // ---- first sorting: results of searches on the LR end that were used
  for (genvar d = 0; d < 3; d++) begin : g_mon
    always @(posedge clk160)
      if (rst_n && dut.g_tdc[d].u_group.u_first_sort.push &&
          !dut.g_tdc[d].u_group.u_first_sort.side_hr)
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
    for (int c = 0; c < 96; c++) begin
      tdc[c] = 16'(rnd());
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
    for (int n = 0; n < 800; n++) drive_bx(0);
    @(negedge clk40); hit = '0;
    repeat (80) @(posedge clk40);
    checks++;
    if (n_got != n_gen || drop_count[0] + drop_count[1] + drop_count[2] != 0) begin
      failures++;
      $display("FAIL %0d of %0d words", n_got, n_gen);
    end
    checks++;
    if (max_delay > 23) begin failures++; $display("FAIL sending delay %0d BX", max_delay); end
    $display("%0d words, sending delay %0d to %0d BX, three-word frames %0d, LR-end results used %0d",
             n_got, min_delay, max_delay, m_three, m_lr_used);
    checks++; if (m_three == 0)    begin failures++; $display("FAIL no three-word frame"); end
    checks++; if (m_lr_used == 0) begin failures++; $display("FAIL no LR-end result used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
