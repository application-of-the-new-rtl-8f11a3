// Self-checking test of csp_tdc_group (Check, 32 channel FIFOs, first sorting, TDC
// FIFO) with its three real clocks. Hits are generated per BX on the 16 strips,
// normally on both ends, sometimes on one end only.
//  Phase 1 (moderate rate, 700 BX so the 8-bit BX number wraps): every generated
//   word is read out of the TDC FIFO exactly once, nothing is dropped, and each
//   channel's words stay in time order.
//  Phase 2 (burst: every channel hit for 30 BX running): channel FIFOs overflow; the
//   words read plus the drop counter must equal the words generated, and every word
//   read must be one that was generated.
module tb_csp_tdc_group;
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
  logic clk40 = 0, clk160 = 0, clk120 = 0, rst_n = 0;
  logic rst40_n, rst160_n, rst120_n;
  logic [7:0] bx = 0, bx_gray;
  logic [31:0] hit = 0;
  logic [15:0] tdc [32];
  logic tdc_rd, tdc_empty, tdc_fifo_full;
  word_t tdc_head;
  logic [15:0] drop_count;
  int checks = 0, failures = 0;

  int gen [logic [31:0]];
  int n_gen = 0, n_got = 0, max_delay = 0;
  int last_bx_age [32];

  assign rst40_n = rst_n; assign rst160_n = rst_n; assign rst120_n = rst_n;
  assign bx_gray = bx ^ (bx >> 1);

  csp_tdc_group #(.DEV_ID(3'd1)) dut (.*);

  always #12.5 clk40 = ~clk40;
  always #3.125 clk160 = ~clk160;
  always #4.1667 clk120 = ~clk120;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk40) if (rst_n) bx <= bx + 1;

  // reader: pop whenever a word is there
  assign tdc_rd = !tdc_empty;
  always @(posedge clk120) if (rst_n && !tdc_empty) begin
    logic [31:0] w;
    int d;
    w = tdc_head;
    n_got++;
    checks++;
    if (!gen.exists(w) || gen[w] == 0) begin
      failures++; $display("FAIL unexpected word %h", w);
    end else gen[w]--;
    d = int'(8'(bx - tdc_head.bx));
    if (d > max_delay) max_delay = d;
    if (tdc_head.dev != 3'd1) begin failures++; $display("FAIL device id"); end
  end

  task automatic drive_bx(int prob_pct, bit burst);
    @(negedge clk40);
    hit = '0;
    for (int s = 0; s < 16; s++) begin
      if (burst || rnd_range(99) < prob_pct) begin
        int kind;
        kind = burst ? 9 : rnd_range(19);
        hit[s]      = (kind != 0);   // LR end
        hit[s + 16] = (kind != 1);   // HR end
      end
    end
    for (int c = 0; c < 32; c++) begin
      tdc[c] = 16'(rnd());
      if (hit[c]) begin
        word_t w;
        w.bx = bx; w.dev = 3'd1; w.ch = 5'(c); w.tdc = tdc[c];
        if (gen.exists(w)) gen[w]++; else gen[w] = 1;
        n_gen++;
      end
    end
  endtask

  initial begin
    for (int c = 0; c < 32; c++) tdc[c] = '0;
    repeat (3) @(posedge clk40);
    rst_n = 1;
    repeat (4) @(posedge clk40);
    // ---- phase 1
    for (int n = 0; n < 700; n++) drive_bx(3, 0);
    @(negedge clk40); hit = '0;
    repeat (100) @(posedge clk40);
    checks++;
    if (n_got != n_gen || drop_count != 0) begin
      failures++; $display("FAIL phase 1: %0d of %0d words, %0d dropped", n_got, n_gen, drop_count);
    end
    $display("phase 1: %0d words, max delay to TDC FIFO output %0d BX", n_got, max_delay);
    // ---- phase 2
    n_gen = 0; n_got = 0;
    for (int n = 0; n < 30; n++) drive_bx(0, 1);
    @(negedge clk40); hit = '0;
    repeat (400) @(posedge clk40);
    checks++;
    if (drop_count == 0 || n_got + int'(drop_count) != n_gen) begin
      failures++;
      $display("FAIL phase 2: generated %0d read %0d dropped %0d", n_gen, n_got, drop_count);
    end
    $display("phase 2: generated %0d read %0d dropped %0d", n_gen, n_got, drop_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
