// Self-checking test of csp_min2_tree: the 16-input worked example (earliest 30 on
// input 0, second 31 on input 1), then a new random key set every clock, each
// result checked against a reference search exactly 4 clocks later.
module tb_csp_min2_tree;
  import csp_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] keys [16];
  logic out_valid;
  cand_t min1, min2;
  int checks = 0, failures = 0;
  int cyc = 0;

  typedef struct { logic [7:0] k [16]; int issued; } job_t;
  job_t q [$];

  csp_min2_tree dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    job_t j;
    logic [7:0] best1, best2;
    j = q.pop_front();
    best1 = 8'hFF; best2 = 8'hFF;
    for (int i = 0; i < 16; i++) begin
      if (j.k[i] < best1) begin best2 = best1; best1 = j.k[i]; end
      else if (j.k[i] < best2) best2 = j.k[i];
    end
    checks++;
    if (min1.key !== best1 || min2.key !== best2 || j.k[min1.idx] !== min1.key ||
        j.k[min2.idx] !== min2.key || min1.idx == min2.idx || cyc - j.issued != 4) begin
      failures++;
      $display("FAIL tree: got %0d(%0d) %0d(%0d) exp %0d %0d latency %0d", min1.key, min1.idx,
               min2.key, min2.idx, best1, best2, cyc - j.issued);
    end
  end

  initial begin
    for (int i = 0; i < 16; i++) keys[i] = 8'd255;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // worked example
    keys[0] = 30; keys[1] = 31; keys[3] = 32; keys[7] = 33;
    in_valid = 1;
    begin job_t j; j.k = keys; j.issued = cyc + 1; q.push_back(j); end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (!(out_valid && min1.key == 30 && min1.idx == 0 && min2.key == 31 && min2.idx == 1)) begin
      failures++; $display("FAIL worked example");
    end
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 16; i++) begin
        keys[i] = 8'($urandom);
        if ($urandom_range(3) == 0) keys[i] = 8'd255;
        if (n % 7 == 0) keys[i] = 8'($urandom_range(3));   // many ties
      end
      in_valid = ($urandom_range(4) != 0);
      if (in_valid) begin job_t j; j.k = keys; j.issued = cyc + 1; q.push_back(j); end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
