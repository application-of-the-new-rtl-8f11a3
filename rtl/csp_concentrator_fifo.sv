// Concentrator FIFO: written one word at a time at 120 MHz, read up to three
// words at a time at 40 MHz.
//
// The design names this FIFO and its clocks but not its construction. Here it is
// built from three dual-clock lanes (csp_async_fifo). Words are written to the
// lanes in turn (0, 1, 2, 0, ...) and read back in the same turn, so a 40 MHz read
// of k words pops each of k different lanes once: every lane pointer still moves
// by one per clock and its Gray-coded crossing stays safe. The read side shows the
// next three words in order (head[0] oldest) with a thermometer-coded avail: a
// word is offered only when all older words are offered too.
//
// Depth: 3 * 2**LANE_AW words. full refers to the lane that takes the next word.
module csp_concentrator_fifo
  import csp_pkg::*;
#(
  parameter int unsigned LANE_AW = 4
) (
  input  logic        wr_clk,     // 120 MHz
  input  logic        wr_rst_n,
  input  logic        wr_en,
  input  word_t       wr_data,
  output logic        full,

  input  logic        rd_clk,     // 40 MHz
  input  logic        rd_rst_n,
  input  logic [1:0]  rd_cnt,     // words popped this clock, 0..3, at most the avail count
  output logic [2:0]  avail,      // thermometer: avail[k] = at least k+1 words present
  output word_t       head [3]
);
  logic [1:0]  wlane, rlane;
  logic [2:0]  l_wr, l_full, l_rd, l_empty;
  word_t       l_data [3];

  for (genvar l = 0; l < 3; l++) begin : g_lane
    csp_async_fifo #(.DW(WORD_W), .AW(LANE_AW)) u_lane (
      .wr_clk(wr_clk), .wr_rst_n(wr_rst_n), .wr_en(l_wr[l]), .wr_data(wr_data), .full(l_full[l]),
      .rd_clk(rd_clk), .rd_rst_n(rd_rst_n), .rd_en(l_rd[l]), .rd_data(l_data[l]), .empty(l_empty[l]));
  end

  function automatic logic [1:0] lane_add(input logic [1:0] a, input logic [1:0] b);
    logic [2:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= 3'd3) ? 2'(s - 3'd3) : s[1:0];
  endfunction

  // write side
  assign full = l_full[wlane];
  always_comb begin
    l_wr = '0;
    if (wr_en && !full) l_wr[wlane] = 1'b1;
  end
  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) wlane <= '0;
    else if (wr_en && !full) wlane <= lane_add(wlane, 2'd1);
  end

  // read side
  always_comb begin
    logic run;
    run = 1'b1;
    for (int k = 0; k < 3; k++) begin
      logic [1:0] l;
      l = lane_add(rlane, 2'(k));
      run      = run && !l_empty[l];
      avail[k] = run;
      head[k]  = l_data[l];
    end
    l_rd = '0;
    for (int k = 0; k < 3; k++) begin
      if (2'(k) < rd_cnt) l_rd[lane_add(rlane, 2'(k))] = 1'b1;
    end
  end
  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) rlane <= '0;
    else           rlane <= lane_add(rlane, rd_cnt);
  end

`ifndef SYNTHESIS
  a_rd_avail: assert property (@(posedge rd_clk) disable iff (!rd_rst_n)
                               rd_cnt == 2'd0 || avail[rd_cnt - 2'd1]);
`endif
endmodule
