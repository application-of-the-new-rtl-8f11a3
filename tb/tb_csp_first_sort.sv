// Self-checking test of csp_first_sort, with the 32 channel FIFOs modelled here as
// first-word fall-through queues.
//  1. The 16-strip example: HR heads 30, 31, 32, 33 on strips 0, 1, 3, 7 (both ends
//     hit). The first four words written must be strip 0 HR, strip 0 LR, strip 1
//     HR, strip 1 LR, the first within 7 clocks of the start.
//  2. A word seen only on the LR end must come out, both alone and while 320 words
//     on both ends of other strips are pending (it is the earliest, so it must be
//     among the first words once a search compares the LR ends).
//  3. Random content with random TDC-FIFO-full stalls: every word comes out exactly
//     once, each channel in order, and every result taken names a strip whose head
//     is no later than that of any strip free at the time of its search.
module tb_csp_first_sort;
  import csp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] bx_ref = 8'd250;   // with this reference, key == timestamp
  logic [31:0] ch_empty, ch_rd;
  word_t ch_data [32];
  logic tdc_full = 0, tdc_wr, side_hr;
  word_t tdc_data;
  int checks = 0, failures = 0;
  int cyc = 0;

  word_t q [32][$];
  word_t outq [$];
  int n_expected = 0;
  logic [15:0] mask_hist [4] = '{default: '0};   // strips left out of each search in flight

  csp_first_sort dut (.*);

  always #3.125 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb begin
    for (int c = 0; c < 32; c++) begin
      ch_empty[c] = (q[c].size() == 0);
      ch_data[c]  = q[c].size() ? q[c][0] : '0;
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      // A result taken now was searched on the end compared now (the end changes
      // every clock and the search takes 4). Its earliest strip must be no later
      // than any strip that was free for that search, with its head unchanged since.
      if (dut.push && dut.use_strip[0]) begin
        logic [15:0] masked;
        masked = mask_hist[3] | dut.recent | dut.busy;
        checks++;
        for (int s = 0; s < 16; s++) begin
          int c;
          c = side_hr ? s + 16 : s;
          if (!masked[s] && q[c].size() && q[c][0].bx < dut.min1.key) begin
            failures++;
            $display("FAIL strip %0d head %0d earlier than chosen %0d", s, q[c][0].bx, dut.min1.key);
          end
        end
      end
      if (tdc_wr) outq.push_back(tdc_data);
      for (int i = 3; i > 0; i--) mask_hist[i] = mask_hist[i-1];
      mask_hist[0] = dut.busy | dut.taken;
      for (int c = 0; c < 32; c++) if (ch_rd[c]) begin
        checks++;
        if (q[c].size() == 0 || tdc_data !== q[c][0]) begin
          failures++; $display("FAIL pop of channel %0d", c);
        end
        if (q[c].size()) void'(q[c].pop_front());
      end
    end
  end

  function automatic word_t mk(int c, int ts);
    word_t w;
    w.bx = 8'(ts); w.dev = 3'd1; w.ch = 5'(c); w.tdc = 16'($urandom);
    return w;
  endfunction

  task automatic put_hit(int strip, int ts, bit hr, bit lr);
    if (hr) begin q[strip+16].push_back(mk(strip+16, ts)); n_expected++; end
    if (lr) begin q[strip].push_back(mk(strip, ts)); n_expected++; end
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
  endtask

  task automatic wait_drained(int max_cycles);
    int t0;
    t0 = cyc;
    while (outq.size() < n_expected && cyc - t0 < max_cycles) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    // ---- 1. worked example
    put_hit(0, 30, 1, 1); put_hit(1, 31, 1, 1); put_hit(3, 32, 1, 1); put_hit(7, 33, 1, 1);
    begin
      int t0;
      do_reset();
      t0 = cyc;
      while (!tdc_wr && cyc - t0 < 50) @(posedge clk);
      checks++;
      if (cyc - t0 > 7) begin failures++; $display("FAIL first word after %0d clocks", cyc - t0); end
    end
    wait_drained(200);
    checks++;
    if (outq.size() != 8 || outq[0].ch != 16 || outq[1].ch != 0 || outq[2].ch != 17 ||
        outq[3].ch != 1) begin
      failures++; $display("FAIL example order (%0d words)", outq.size());
    end
    // ---- 2. LR-only word, alone and while HR words keep the search busy
    outq.delete(); n_expected = 0;
    put_hit(5, 10, 0, 1);
    wait_drained(200);
    checks++;
    if (outq.size() != 1 || outq[0].ch != 5) begin failures++; $display("FAIL LR-only word"); end
    outq.delete(); n_expected = 0;
    for (int ts = 20; ts < 40; ts++)
      for (int s = 8; s < 16; s++) put_hit(s, ts, 1, 1);
    put_hit(5, 10, 0, 1);
    wait_drained(2000);
    begin
      int pos;
      pos = -1;
      foreach (outq[i]) if (outq[i].ch == 5) pos = i;
      checks++;
      if (outq.size() != n_expected || pos < 0 || pos > 8) begin
        failures++; $display("FAIL LR-only word held back (position %0d of %0d)", pos, outq.size());
      end
    end
    // ---- 3. random, with stalls
    outq.delete(); n_expected = 0;
    for (int ts = 0; ts < 120; ts++) begin
      for (int s = 0; s < 16; s++) begin
        if ($urandom_range(5) == 0) begin
          int kind;
          kind = $urandom_range(9);
          put_hit(s, ts, kind != 0, kind != 1);   // 10% HR-only, 10% LR-only
        end
      end
    end
    $display("random phase: %0d words", n_expected);
    fork
      begin
        while (outq.size() < n_expected) begin
          @(negedge clk);
          tdc_full = ($urandom_range(3) == 0);
        end
        tdc_full = 0;
      end
      wait_drained(20000);
    join
    checks++;
    if (outq.size() != n_expected) begin
      failures++; $display("FAIL random: %0d of %0d words out", outq.size(), n_expected);
    end
    // per-channel order
    begin
      int last [32];
      for (int c = 0; c < 32; c++) last[c] = -1;
      foreach (outq[i]) begin
        checks++;
        if (int'(outq[i].bx) < last[outq[i].ch]) begin
          failures++; $display("FAIL channel %0d out of order", outq[i].ch);
        end
        last[outq[i].ch] = int'(outq[i].bx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
