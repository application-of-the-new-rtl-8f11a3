// "meg" merge unit of the first sorting tree (combinational).
//
// Takes two groups, each already reduced to its earliest (min1) and second
// earliest (min2) candidate, and returns the earliest and second earliest of the
// four. min1 is the smaller of the two group minima. min2 is then chosen between
// the two candidates that could still be second: the loser of the min1 comparison
// and the runner-up of the winning group. This two-level selection follows the
// design exactly, including its tie rule: when a.min1 is not strictly smaller than
// b.min1, group b wins.
module csp_meg
  import csp_pkg::*;
(
  input  cand_t a_min1,
  input  cand_t a_min2,
  input  cand_t b_min1,
  input  cand_t b_min2,
  output cand_t min1,
  output cand_t min2
);
  always_comb begin
    if (a_min1.key < b_min1.key) begin
      min1 = a_min1;
      min2 = (b_min1.key < a_min2.key) ? b_min1 : a_min2;
    end else begin
      min1 = b_min1;
      min2 = (a_min1.key < b_min2.key) ? a_min1 : b_min2;
    end
  end
endmodule
