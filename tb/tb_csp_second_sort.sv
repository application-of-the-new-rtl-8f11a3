// Self-checking test of csp_second_sort: random heads on three FWFT inputs, random
// empty and full flags, and BX references that make the 8-bit timestamps wrap.
// Each clock the chosen input must be the non-empty one generated earliest (age
// measured back from the reference, computed here without the package function),
// exactly one input is popped, and nothing moves when all are empty or the output
// is full.
module tb_csp_second_sort;
  import csp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] bx_ref;
  logic [2:0] in_empty, in_rd;
  word_t in_data [3];
  logic out_full, out_wr;
  word_t out_data;
  int checks = 0, failures = 0;

  csp_second_sort #(.N_IN(3)) dut (.*);

  always #4.1667 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bx_ref = '0; in_empty = '1; out_full = 0;
    for (int i = 0; i < 3; i++) in_data[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int age [3];
      int best, best_age;
      @(negedge clk);
      bx_ref = 8'($urandom);
      in_empty = 3'($urandom);
      out_full = ($urandom_range(7) == 0);
      for (int i = 0; i < 3; i++) begin
        age[i] = $urandom_range(60);              // generated 0..60 BX before the reference
        if (n % 5 == 0) age[i] = $urandom_range(2);   // ties
        in_data[i] = word_t'($urandom);
        in_data[i].bx = bx_ref - 8'(age[i]);
      end
      best = -1; best_age = -1;
      for (int i = 0; i < 3; i++)
        if (!in_empty[i] && age[i] > best_age) begin best = i; best_age = age[i]; end
      #1;
      checks++;
      if (best < 0 || out_full) begin
        if (out_wr || in_rd != 0) begin failures++; $display("FAIL moved with nothing to move"); end
      end else begin
        if (!out_wr || in_rd != (3'b1 << best) || out_data !== in_data[best]) begin
          failures++;
          $display("FAIL picked rd=%b expected input %0d (ages %0d %0d %0d empty %b)", in_rd, best,
                   age[0], age[1], age[2], in_empty);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
