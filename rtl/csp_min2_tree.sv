// Four-stage pipeline that finds the earliest and second earliest of 16 keys.
//
// Stage 1 compares the inputs in pairs (0/1, 2/3, ...) and keeps each pair as
// (smaller, larger). Stages 2, 3 and 4 merge neighbouring groups with the meg unit,
// 8 -> 4 -> 2 -> 1, so after the fourth register the two smallest of all 16 keys and
// their input indices are known. The divide-and-conquer structure, four stages and
// the meg unit follow the design. Pairs with equal keys keep the lower index first.
//
// Timing: one result per clock; out_valid and the result appear 4 clocks after
// in_valid and the keys. Intended clock: 160 MHz.
module csp_min2_tree
  import csp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [BX_W-1:0] keys [16],
  output logic            out_valid,
  output cand_t           min1,
  output cand_t           min2
);
  cand_t b1 [8], b2 [8];   // after stage 1
  cand_t c1 [4], c2 [4];   // after stage 2
  cand_t d1 [2], d2 [2];   // after stage 3
  cand_t c1_n [4], c2_n [4], d1_n [2], d2_n [2], g1_n, g2_n;
  logic [3:0] vld;

  // Stage 1: pairwise compare.
  always_ff @(posedge clk) begin
    for (int p = 0; p < 8; p++) begin
      if (keys[2*p+1] < keys[2*p]) begin
        b1[p] <= '{key: keys[2*p+1], idx: 4'(2*p+1)};
        b2[p] <= '{key: keys[2*p],   idx: 4'(2*p)};
      end else begin
        b1[p] <= '{key: keys[2*p],   idx: 4'(2*p)};
        b2[p] <= '{key: keys[2*p+1], idx: 4'(2*p+1)};
      end
    end
  end

  // Stages 2-4: meg merges.
  for (genvar m = 0; m < 4; m++) begin : g_st2
    csp_meg u_meg (.a_min1(b1[2*m]), .a_min2(b2[2*m]), .b_min1(b1[2*m+1]), .b_min2(b2[2*m+1]),
                   .min1(c1_n[m]), .min2(c2_n[m]));
  end
  for (genvar m = 0; m < 2; m++) begin : g_st3
    csp_meg u_meg (.a_min1(c1[2*m]), .a_min2(c2[2*m]), .b_min1(c1[2*m+1]), .b_min2(c2[2*m+1]),
                   .min1(d1_n[m]), .min2(d2_n[m]));
  end
  csp_meg u_meg_st4 (.a_min1(d1[0]), .a_min2(d2[0]), .b_min1(d1[1]), .b_min2(d2[1]),
                     .min1(g1_n), .min2(g2_n));

  always_ff @(posedge clk) begin
    c1   <= c1_n;
    c2   <= c2_n;
    d1   <= d1_n;
    d2   <= d2_n;
    min1 <= g1_n;
    min2 <= g2_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], in_valid};
  end
  assign out_valid = vld[3];
endmodule
