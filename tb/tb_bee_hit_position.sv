// Self-checking test of bee_hit_position with its default strip length (1600) and
// speed (20 per TDC count), so r = 800 - 10 * (t_hr - t_lr).
//  1. Directed: both ends in one frame in either order; ends in frames a few clocks
//     apart; two strips interleaved; ends of different BX that must not pair.
//  2. A single-ended word is replaced by a newer word of the same end (unpaired).
//  3. Aging: a single-ended word of BX X, then 256 BX later a new hit of BX X on the
//     same strip: the old word must have been released, so the new pair gives the
//     new position.
//  4. Random traffic: every hit is a pair with a chosen position, its two words sent
//     in random frames and slots up to 6 clocks apart, strips never reused while
//     pending. Every hit must come back exactly once with its position.
// Expected positions come from the chosen hit positions, not from the block.
module tb_bee_hit_position;
  import csp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [2:0] in_valid = '0;
  word_t in_word [3];
  logic [2:0] pos_valid;
  logic [5:0] pos_strip [3];
  logic [7:0] pos_bx [3];
  logic signed [23:0] pos_r [3];
  logic [31:0] n_pairs, n_unpaired;

  int checks = 0, failures = 0;
  logic [7:0] bx = '0;                 // mirrors the block's BX counter
  int exp_r [logic [13:0]];            // expected position per {strip, BX}
  int n_exp = 0, n_seen = 0;

  bee_hit_position dut (.*);

  always #12.5 clk = ~clk;
  always @(posedge clk) if (rst_n) bx <= bx + 1'b1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare every position produced with the expected one
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < 3; k++) if (pos_valid[k]) begin
      logic [13:0] key;
      key = {pos_strip[k], pos_bx[k]};
      checks++; n_seen++;
      if (!exp_r.exists(key)) begin
        failures++; $display("FAIL unexpected position strip %0d BX %0d r %0d", pos_strip[k], pos_bx[k], pos_r[k]);
      end else begin
        if (int'(pos_r[k]) != exp_r[key]) begin
          failures++; $display("FAIL strip %0d BX %0d: r %0d, expected %0d", pos_strip[k], pos_bx[k], pos_r[k], exp_r[key]);
        end
        exp_r.delete(key);
      end
    end
  end

  function automatic word_t mk(int strip, bit hr, logic [7:0] wbx, int t);
    word_t w;
    w.bx = wbx; w.dev = 3'(strip / 16); w.ch = {hr, 4'(strip % 16)}; w.tdc = 16'(t);
    return w;
  endfunction

  // one frame of up to three words, then idle
  task automatic send(int n, word_t w0, word_t w1 = '0, word_t w2 = '0);
    @(negedge clk);
    in_word[0] = w0; in_word[1] = w1; in_word[2] = w2;
    in_valid = (n == 0) ? 3'b000 : (n == 1) ? 3'b001 : (n == 2) ? 3'b011 : 3'b111;
    @(negedge clk);
    in_valid = '0;
  endtask

  task automatic expect_hit(int strip, logic [7:0] hbx, int dt);
    exp_r[{6'(strip), hbx}] = 800 - 10 * dt;
    n_exp++;
  endtask

  // random traffic state
  typedef struct { int strip; logic [7:0] hbx; int t_lr, t_hr; int when [2]; } hit_t;

  initial begin
    logic [7:0] x;
    int un0;
    for (int k = 0; k < 3; k++) in_word[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- 1. directed
    x = bx - 8'd6;
    expect_hit(5, x, 30);                             // HR then LR in one frame
    send(2, mk(5, 1, x, 1030), mk(5, 0, x, 1000));
    expect_hit(40, x, -70);                           // LR then HR in one frame
    send(3, mk(40, 0, x, 2070), mk(40, 1, x, 2000), mk(7, 1, x, 500));
    expect_hit(7, x, 5);                              // other end two clocks later
    repeat (2) @(negedge clk);
    send(1, mk(7, 0, x, 495));
    expect_hit(20, x, 0);                             // two strips interleaved
    expect_hit(21, x, 80);
    send(2, mk(20, 1, x, 300), mk(21, 1, x, 380));
    send(2, mk(21, 0, x, 300), mk(20, 0, x, 300));
    send(1, mk(30, 0, x, 100));                       // different BX: no pair
    send(1, mk(30, 1, x + 8'd1, 100));
    repeat (3) @(negedge clk);
    checks++;
    if (n_pairs != 32'd5 || n_seen != 5 || exp_r.size() != 0) begin
      failures++; $display("FAIL directed: %0d pairs, %0d seen, %0d missing", n_pairs, n_seen, exp_r.size());
    end

    // ---- 2. replacement of an unpaired word
    un0 = int'(n_unpaired);
    send(1, mk(30, 0, x + 8'd2, 100));               // replaces the LR word of BX x
    repeat (2) @(negedge clk);
    checks++;
    if (int'(n_unpaired) != un0 + 1) begin
      failures++; $display("FAIL replacement not counted: %0d -> %0d", un0, n_unpaired);
    end

    // ---- 3. aging: a single word must not pair 256 BX later
    x = bx - 8'd5;
    send(1, mk(11, 0, x, 4000));                      // LR alone, never completed
    repeat (254) @(negedge clk);                      // x is now 256 + 5 BX old, which
                                                      // reads as 5: the same BX number
    expect_hit(11, x, -20);
    send(1, mk(11, 1, x, 980));
    send(1, mk(11, 0, x, 1000));
    repeat (3) @(negedge clk);
    checks++;
    if (exp_r.size() != 0) begin
      failures++; $display("FAIL aging: stale word paired");
    end

    // ---- 4. random traffic
    begin
      hit_t pend [$];
      bit busy [48];
      int free_at [48];                // a strip is reused only after its check
      int clk_n;
      foreach (busy[i]) begin busy[i] = 0; free_at[i] = 0; end
      clk_n = 0;
      for (int n = 0; n < 3000; n++) begin
        // new hits this clock
        repeat ($urandom_range(2)) begin
          hit_t h;
          h.strip = $urandom_range(47);
          if (!busy[h.strip] && clk_n >= free_at[h.strip]) begin
            int dt;
            busy[h.strip] = 1;
            dt = int'($urandom_range(160)) - 80;
            h.hbx = bx - 8'($urandom_range(20));
            h.t_lr = 1000 + $urandom_range(30000);
            h.t_hr = h.t_lr + dt;
            h.when[0] = clk_n + $urandom_range(3);
            h.when[1] = h.when[0] + $urandom_range(6);
            if ($urandom_range(1) != 0) begin int tmp; tmp = h.when[0]; h.when[0] = h.when[1]; h.when[1] = tmp; end
            expect_hit(h.strip, h.hbx, dt);
            pend.push_back(h);
          end
        end
        // words due this clock, at most three per frame
        begin
          word_t w [3];
          int cnt;
          cnt = 0;
          for (int i = 0; i < pend.size(); i++)
            for (int e = 0; e < 2; e++)
              if (cnt < 3 && pend[i].when[e] <= clk_n) begin
                w[cnt] = mk(pend[i].strip, e[0], pend[i].hbx, e == 0 ? pend[i].t_lr : pend[i].t_hr);
                pend[i].when[e] = 1 << 30;
                cnt++;
              end
          for (int i = pend.size() - 1; i >= 0; i--)
            if (pend[i].when[0] == 1 << 30 && pend[i].when[1] == 1 << 30) begin
              busy[pend[i].strip] = 0;
              free_at[pend[i].strip] = clk_n + 4;
              pend.delete(i);
            end
          @(negedge clk);
          for (int k = 0; k < 3; k++) in_word[k] = (k < cnt) ? w[k] : '0;
          in_valid = (cnt == 0) ? 3'b000 : (cnt == 1) ? 3'b001 : (cnt == 2) ? 3'b011 : 3'b111;
        end
        clk_n++;
      end
      @(negedge clk); in_valid = '0;
      while (pend.size() > 0) begin   // send what is left
        word_t w [3];
        int cnt;
        cnt = 0;
        for (int i = 0; i < pend.size(); i++)
          for (int e = 0; e < 2; e++)
            if (cnt < 3 && pend[i].when[e] != 1 << 30) begin
              w[cnt] = mk(pend[i].strip, e[0], pend[i].hbx, e == 0 ? pend[i].t_lr : pend[i].t_hr);
              pend[i].when[e] = 1 << 30; cnt++;
            end
        for (int i = pend.size() - 1; i >= 0; i--)
          if (pend[i].when[0] == 1 << 30 && pend[i].when[1] == 1 << 30) pend.delete(i);
        @(negedge clk);
        for (int k = 0; k < 3; k++) in_word[k] = (k < cnt) ? w[k] : '0;
        in_valid = (cnt == 0) ? 3'b000 : (cnt == 1) ? 3'b001 : (cnt == 2) ? 3'b011 : 3'b111;
      end
      @(negedge clk); in_valid = '0;
      repeat (3) @(negedge clk);
    end
    checks++;
    if (exp_r.size() != 0 || n_seen != n_exp || n_pairs != 32'(n_exp)) begin
      failures++; $display("FAIL random: %0d expected, %0d seen, %0d counted, %0d missing", n_exp, n_seen, n_pairs, exp_r.size());
    end
    $display("%0d hits paired, %0d words unpaired", n_pairs, n_unpaired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
