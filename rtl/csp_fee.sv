// Front-end CSP readout of one half-chamber: 48 strips read at both ends by three
// 32-channel TDC devices (96 channels), concentrated into one link.
//
//   3 x csp_tdc_group (Check, channel FIFOs, first sorting, TDC FIFO)
//     -> csp_second_sort (120 MHz) -> csp_concentrator_fifo -> csp_push (40 MHz)
//
// The structure, the three clock rates (40, 160, 120 MHz) and the three-words-per-
// frame output follow the design. The 8-bit BX counter, the reset synchronizers and
// the Gray-coded BX crossing are this design's choices. The BX counter starts at 0
// when reset is released and counts one per 40 MHz clock; a word's generation time
// is the counter value in the clock its hit is presented.
//
// Clocks are assumed to come from one source (as on the LHC-synchronous front
// end), but all crossings are made with dual-clock FIFOs or Gray synchronizers, so
// no phase relation is relied on. rst_n is asynchronous, active low.
module csp_fee
  import csp_pkg::*;
#(
  parameter int unsigned CH_AW   = 4,   // channel FIFO depth 2**CH_AW
  parameter int unsigned TDC_AW  = 6,   // TDC FIFO depth 2**TDC_AW
  parameter int unsigned CONC_AW = 5    // concentrator depth 3 * 2**CONC_AW
) (
  input  logic            clk40,
  input  logic            clk160,
  input  logic            clk120,
  input  logic            rst_n,
  input  logic [95:0]     hit,          // channel 32*d + c of TDC device d
  input  logic [TDC_W-1:0] tdc [96],
  output frame_t          frame,        // one frame per BX (40 MHz)
  output logic [BX_W-1:0] bx,           // BX counter
  output logic [15:0]     drop_count [3]
);
  logic rst40_n, rst160_n, rst120_n;
  logic [BX_W-1:0] bx_gray, bx_gray120;
  logic [2:0]  t_rd, t_empty;
  word_t       t_head [3];
  logic        c_wr, c_full;
  word_t       c_data;
  logic [1:0]  rd_cnt;
  logic [2:0]  avail;
  word_t       heads [3];

  csp_rst_sync u_rs40  (.clk(clk40),  .arst_n(rst_n), .rst_n(rst40_n));
  csp_rst_sync u_rs160 (.clk(clk160), .arst_n(rst_n), .rst_n(rst160_n));
  csp_rst_sync u_rs120 (.clk(clk120), .arst_n(rst_n), .rst_n(rst120_n));

  always_ff @(posedge clk40 or negedge rst40_n) begin
    if (!rst40_n) begin
      bx      <= '0;
      bx_gray <= '0;
    end else begin
      bx      <= bx + 1'b1;
      bx_gray <= (bx + 1'b1) ^ ((bx + 1'b1) >> 1);
    end
  end

  for (genvar d = 0; d < 3; d++) begin : g_tdc
    csp_tdc_group #(.DEV_ID(DEV_W'(d)), .CH_AW(CH_AW), .TDC_AW(TDC_AW)) u_group (
      .clk40(clk40), .rst40_n(rst40_n), .clk160(clk160), .rst160_n(rst160_n),
      .clk120(clk120), .rst120_n(rst120_n), .bx(bx), .bx_gray(bx_gray),
      .hit(hit[32*d +: 32]), .tdc(tdc[32*d +: 32]),
      .tdc_rd(t_rd[d]), .tdc_empty(t_empty[d]), .tdc_head(t_head[d]),
      .drop_count(drop_count[d]), .tdc_fifo_full());
  end

  csp_gray_sync #(.W(BX_W)) u_bx_sync120 (
    .clk(clk120), .rst_n(rst120_n), .gray_in(bx_gray), .gray_out(bx_gray120));

  csp_second_sort #(.N_IN(3)) u_second_sort (
    .clk(clk120), .rst_n(rst120_n), .bx_ref(gray2bin(bx_gray120)),
    .in_empty(t_empty), .in_data(t_head), .in_rd(t_rd),
    .out_full(c_full), .out_wr(c_wr), .out_data(c_data));

  csp_concentrator_fifo #(.LANE_AW(CONC_AW)) u_conc (
    .wr_clk(clk120), .wr_rst_n(rst120_n), .wr_en(c_wr), .wr_data(c_data), .full(c_full),
    .rd_clk(clk40), .rd_rst_n(rst40_n), .rd_cnt(rd_cnt), .avail(avail), .head(heads));

  csp_push u_push (
    .clk(clk40), .rst_n(rst40_n), .avail(avail), .head(heads), .rd_cnt(rd_cnt), .frame(frame));
endmodule
