// Workload test: the rate and window studies of the CSP readout, run on four copies
// of irpc_csp_top that differ only in their Demux window (8, 12, 16 and 23 BX) and
// see the same hits.
//  1. Low background, then high background (ratio 0.7 : 2.7, the two background
//     rates of the study), 1500 BX each, on top of the same muon rate. For each
//     window the fraction of words inside it is reported. Checks: no word is lost,
//     the fraction never falls when the window grows, the 23 BX window keeps every
//     word, and the largest delay at low rate is not above the one at high rate.
//  2. Two muon clusters of 8 strips in the same BX, nothing else: 32 words. The
//     link needs ceil(32/3) = 11 frames for them; check that they leave in 11 to 13
//     consecutive frames and that all arrive inside the 23 BX window.
module tb_csp_workloads;
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
  localparam int NW = 4;
  localparam int WIN [NW] = '{8, 12, 16, 23};
  localparam int MUON_PCT = 10;

  logic clk40 = 0, clk160 = 0, clk120 = 0, rst_n = 1;   // falls at 1 ns: an edge for the asynchronous resets
  logic [95:0] hit = '0;
  logic [15:0] tdc [96];
  frame_t frame [NW];
  logic [7:0] bx [NW];
  logic [15:0] drop_count [NW][3];
  logic [2:0] acc_valid [NW];
  word_t acc_word [NW][3];
  logic [7:0] acc_delay [NW][3];
  logic [31:0] n_accepted [NW], n_late [NW];
  logic [7:0] max_delay [NW];

  int checks = 0, failures = 0;
  int n_gen = 0;
  int bkg_pm = 1;

  for (genvar i = 0; i < NW; i++) begin : g_dut
    irpc_csp_top #(.DEMUX_WINDOW(WIN[i])) dut (
      .clk40(clk40), .clk160(clk160), .clk120(clk120), .rst_n(rst_n), .hit(hit), .tdc(tdc),
      .frame(frame[i]), .bx(bx[i]), .drop_count(drop_count[i]), .acc_valid(acc_valid[i]),
      .acc_word(acc_word[i]), .acc_delay(acc_delay[i]), .n_accepted(n_accepted[i]),
      .n_late(n_late[i]), .max_delay(max_delay[i]));
  end

  always #12.5 clk40 = ~clk40;
  always #3.125 clk160 = ~clk160;
  always #4.1667 clk120 = ~clk120;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frames carrying words, counted on the 23 BX copy
  int n_frames = 0, n_words = 0;
  always @(posedge clk40) if (rst_n && frame[NW-1].valid != 0) begin
    n_frames++;
    n_words += $countones(frame[NW-1].valid);
  end

  task automatic fire(int strip);
    int dev, s;
    dev = strip / 16; s = strip % 16;
    hit[32*dev + s] = 1'b1;
    hit[32*dev + 16 + s] = 1'b1;
  endtask

  task automatic count_hits();
    for (int c = 0; c < 96; c++) begin
      tdc[c] = 16'(rnd());
      if (hit[c]) n_gen++;
    end
  endtask

  task automatic drive_bx();
    @(negedge clk40);
    hit = '0;
    if (rnd_range(99) < MUON_PCT) begin
      int first, size;
      size = 1 + rnd_range(3) + rnd_range(2) + ((rnd_range(3) == 0) ? rnd_range(2) : 0);
      first = rnd_range(47);
      for (int s = first; s < first + size && s < 48; s++) fire(s);
    end
    for (int s = 0; s < 48; s++)
      if (rnd_range(999) < bkg_pm) begin
        fire(s);
        if (s < 47 && rnd_range(1) != 0) fire(s + 1);
      end
    count_hits();
  endtask

  task automatic settle();
    @(negedge clk40); hit = '0;
    repeat (100) @(posedge clk40);
  endtask

  task automatic run_rate(string name, int pm, output int maxd);
    int acc0 [NW], late0 [NW], gen0;
    real eff [NW];
    gen0 = n_gen;
    for (int i = 0; i < NW; i++) begin acc0[i] = int'(n_accepted[i]); late0[i] = int'(n_late[i]); end
    bkg_pm = pm;
    for (int n = 0; n < 1500; n++) drive_bx();
    settle();
    maxd = int'(max_delay[NW-1]);
    for (int i = 0; i < NW; i++) begin
      int a, l;
      a = int'(n_accepted[i]) - acc0[i];
      l = int'(n_late[i]) - late0[i];
      eff[i] = 100.0 * real'(a) / real'(a + l);
      checks++;
      if (a + l != n_gen - gen0 || drop_count[i][0] + drop_count[i][1] + drop_count[i][2] != 0) begin
        failures++; $display("FAIL %s: words lost (%0d of %0d)", name, a + l, n_gen - gen0);
      end
      if (i > 0) begin
        checks++;
        if (eff[i] < eff[i-1]) begin failures++; $display("FAIL %s: efficiency falls with window", name); end
      end
    end
    checks++;
    if (eff[NW-1] < 100.0) begin failures++; $display("FAIL %s: 23 BX window loses words", name); end
    $display("%s: %0d words, max delay %0d BX, inside window 8/12/16/23 BX: %0.2f %0.2f %0.2f %0.2f %%",
             name, n_gen - gen0, maxd, eff[0], eff[1], eff[2], eff[3]);
  endtask

  initial begin
    int max_low, max_high;
    for (int c = 0; c < 96; c++) tdc[c] = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk40);
    rst_n = 1;
    repeat (4) @(posedge clk40);
    // ---- 1. rates (max_delay is a running maximum, so low rate runs first)
    run_rate("low rate", 2, max_low);
    run_rate("high rate", 7, max_high);
    checks++;
    if (max_low > max_high) begin failures++; $display("FAIL low rate slower than high rate"); end
    // ---- 2. two 8-strip clusters in one BX
    begin
      int f0, w0, late0, first_bx, last_bx, t;
      f0 = n_frames; w0 = n_words; late0 = int'(n_late[NW-1]);
      @(negedge clk40);
      hit = '0;
      for (int s = 4; s < 12; s++) fire(s);
      for (int s = 28; s < 36; s++) fire(s);
      count_hits();
      @(negedge clk40); hit = '0;
      first_bx = -1; last_bx = -1; t = 0;
      while (t < 100) begin
        @(posedge clk40);
        t++;
        if (frame[NW-1].valid != 0) begin
          if (first_bx < 0) first_bx = t;
          last_bx = t;
        end
      end
      checks++;
      if (n_words - w0 != 32 || last_bx - first_bx + 1 < 11 || last_bx - first_bx + 1 > 13 ||
          int'(n_late[NW-1]) != late0) begin
        failures++;
        $display("FAIL two clusters: %0d words over %0d frames", n_words - w0, last_bx - first_bx + 1);
      end
      $display("two 8-strip clusters: %0d words sent over %0d consecutive BX (%0d frames with data)",
               n_words - w0, last_bx - first_bx + 1, n_frames - f0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
