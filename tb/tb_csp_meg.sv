// Self-checking test of csp_meg: the worked example of the two-level selection
// (groups {30,31} and {32,255} give 30 then 31), then random sorted groups checked
// against a sort of all four keys.
module tb_csp_meg;
  import csp_pkg::*;
  cand_t a1, a2, b1, b2, m1, m2;
  int checks = 0, failures = 0;

  csp_meg dut (.a_min1(a1), .a_min2(a2), .b_min1(b1), .b_min2(b2), .min1(m1), .min2(m2));

  task automatic check_one();
    logic [7:0] k [4];
    logic [7:0] t;
    k = '{a1.key, a2.key, b1.key, b2.key};
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 3 - i; j++)
        if (k[j] > k[j+1]) begin t = k[j]; k[j] = k[j+1]; k[j+1] = t; end
    #1;
    checks++;
    if (m1.key !== k[0] || m2.key !== k[1] || m1.idx == m2.idx) begin
      failures++;
      $display("FAIL meg in %0d,%0d | %0d,%0d -> %0d(%0d) %0d(%0d)", a1.key, a2.key, b1.key, b2.key,
               m1.key, m1.idx, m2.key, m2.idx);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a1 = '{30, 0}; a2 = '{31, 1}; b1 = '{32, 3}; b2 = '{255, 2};
    #1;
    checks++;
    if (m1.key != 30 || m1.idx != 0 || m2.key != 31 || m2.idx != 1) begin
      failures++; $display("FAIL worked example");
    end
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] x, y, u, v;
      x = 8'($urandom); y = 8'($urandom); u = 8'($urandom); v = 8'($urandom);
      if (n % 4 == 0) begin y = x; v = u; end          // ties inside groups
      if (n % 5 == 0) u = x;                           // ties across groups
      a1 = '{(x < y) ? x : y, 4'd0}; a2 = '{(x < y) ? y : x, 4'd1};
      b1 = '{(u < v) ? u : v, 4'd2}; b2 = '{(u < v) ? v : u, 4'd3};
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
