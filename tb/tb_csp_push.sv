// Self-checking test of csp_push: random thermometer-coded availability and head
// words. Each clock the pop count must equal the number of words offered, and the
// next frame must carry exactly those words in order with matching valid flags.
module tb_csp_push;
  import csp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] avail = 0;
  word_t head [3];
  logic [1:0] rd_cnt;
  frame_t frame;
  int checks = 0, failures = 0;

  csp_push dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) head[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (frame.valid != 0) begin failures++; $display("FAIL frame not empty after reset"); end
    for (int n = 0; n < 1000; n++) begin
      int na;
      logic [2:0] a;
      word_t h [3];
      @(negedge clk);
      na = $urandom_range(3);
      a = (na == 0) ? 3'b000 : (na == 1) ? 3'b001 : (na == 2) ? 3'b011 : 3'b111;
      avail = a;
      for (int k = 0; k < 3; k++) begin head[k] = word_t'($urandom); h[k] = head[k]; end
      #1;
      checks++;
      if (rd_cnt != 2'(na)) begin failures++; $display("FAIL rd_cnt %0d for %0d", rd_cnt, na); end
      @(posedge clk); #1;
      checks++;
      if (frame.valid != a) begin failures++; $display("FAIL valid %b", frame.valid); end
      for (int k = 0; k < na; k++) begin
        checks++;
        if (frame.word[k] !== h[k]) begin failures++; $display("FAIL word %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
