// Self-checking test of csp_concentrator_fifo: a 120 MHz writer with random gaps
// and a 40 MHz reader that takes a random number (0 to 3) of the offered words each
// clock. Checks word order, that avail is a thermometer code, that three words
// are offered at once when the FIFO holds them, and that all words come out.
module tb_csp_concentrator_fifo;
  import csp_pkg::*;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, full;
  word_t wr_data = '0;
  logic [1:0] rd_cnt = 0;
  logic [2:0] avail;
  word_t head [3];
  int checks = 0, failures = 0;
  word_t sb [$];
  int n_three = 0, n_full = 0;
  bit slow_reader = 1;

  csp_concentrator_fifo #(.LANE_AW(3)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en(wr_en), .wr_data(wr_data), .full(full),
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_cnt(rd_cnt), .avail(avail), .head(head));

  always #4.1667 wclk = ~wclk;
  always #12.5 rclk = ~rclk;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge rclk) begin
    int navail, k;
    navail = (avail == 3'b111) ? 3 : (avail == 3'b011) ? 2 : (avail == 3'b001) ? 1 : 0;
    k = slow_reader ? (($urandom_range(3) == 0) ? navail : 0) : $urandom_range(navail);
    if (!slow_reader && navail == 3 && $urandom_range(1)) k = 3;
    rd_cnt = 2'(k);
  end

  always @(posedge rclk) if (rrst_n) begin
    checks++;
    if (!(avail inside {3'b000, 3'b001, 3'b011, 3'b111})) begin
      failures++; $display("FAIL avail %b", avail);
    end
    if (avail == 3'b111) n_three++;
    for (int k = 0; k < 3; k++) if (2'(k) < rd_cnt) begin
      checks++;
      if (sb.size() == 0 || head[k] !== sb[0]) begin failures++; $display("FAIL word order"); end
      if (sb.size()) void'(sb.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge wclk);
      if (n == 600) slow_reader = 0;
      wr_en = 0;
      if (full) n_full++;
      else if ($urandom_range(3) != 0) begin
        wr_data = word_t'($urandom); wr_en = 1; sb.push_back(wr_data);
      end
    end
    @(negedge wclk); wr_en = 0;
    repeat (60) @(posedge rclk);
    checks++;
    if (sb.size() != 0) begin failures++; $display("FAIL %0d words left", sb.size()); end
    checks++;
    if (n_three == 0 || n_full == 0) begin
      failures++; $display("FAIL three-word reads %0d full %0d", n_three, n_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
