// Self-checking test of csp_async_fifo: 40 MHz writer, 160 MHz FWFT reader (the
// channel-FIFO case), random traffic in both directions, bursts that fill the
// FIFO, and a scoreboard that checks every word comes out once, in order. Also
// checks that a word written into an empty FIFO shows on the read side within a
// few read clocks without any read request (first-word fall-through).
module tb_csp_async_fifo;
  localparam int DW = 32, AW = 4;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [DW-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  logic [DW-1:0] sb [$];
  int n_full = 0, n_read = 0;
  bit drain_fast = 1;

  csp_async_fifo #(.DW(DW), .AW(AW)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en(wr_en), .wr_data(wr_data), .full(full),
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en(rd_en), .rd_data(rd_data), .empty(empty));

  always #12.5 wclk = ~wclk;
  always #3.125 rclk = ~rclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader: random pops, checks the head against the scoreboard
  always @(posedge rclk) if (rrst_n) begin
    if (rd_en && !empty) begin
      checks++;
      n_read++;
      if (sb.size() == 0 || rd_data !== sb[0]) begin
        failures++;
        $display("FAIL read %h expected %h", rd_data, sb.size() ? sb[0] : 'x);
      end
      if (sb.size()) void'(sb.pop_front());
    end
  end
  always @(negedge rclk) rd_en = drain_fast ? ($urandom_range(3) != 0) : ($urandom_range(15) == 0);

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    // fall-through: one word into the empty FIFO, no read request
    drain_fast = 0;
    @(negedge wclk);
    force rd_en = 0;
    wr_data = 32'hCAFE0001; wr_en = 1; sb.push_back(wr_data);
    @(negedge wclk); wr_en = 0;
    repeat (6) @(posedge rclk);
    checks++;
    if (empty || rd_data !== 32'hCAFE0001) begin failures++; $display("FAIL fall-through"); end
    release rd_en;
    // phase 1: slow reader, fast writer -> fills up
    for (int n = 0; n < 400; n++) begin
      @(negedge wclk);
      if (n == 200) drain_fast = 1;
      wr_en = 0;
      if (full) n_full++;
      else if ($urandom_range(3) != 0) begin
        wr_data = $urandom; wr_en = 1; sb.push_back(wr_data);
      end
    end
    @(negedge wclk); wr_en = 0;
    repeat (100) @(posedge wclk);
    checks++;
    if (sb.size() != 0 || !empty) begin failures++; $display("FAIL %0d words left", sb.size()); end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL full never reached"); end
    $display("read %0d words, full seen %0d clocks", n_read, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
