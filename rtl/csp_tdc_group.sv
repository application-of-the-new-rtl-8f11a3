// One row of the CSP readout: everything that belongs to one 32-channel TDC device.
//
//   hit/tdc --Check (40 MHz)--> 32 channel FIFOs --first sorting (160 MHz)--> TDC FIFO
//                                                                   (read at 120 MHz)
//
// Channel c is the low-radius end of strip c for c < 16 and the high-radius end of
// strip c-16 otherwise. The chain and its clocks follow the design; the FIFO depths
// (2**CH_AW per channel, 2**TDC_AW for the TDC FIFO) are this design's choice.
// bx_gray is the Gray-coded BX number from the 40 MHz domain; it is synchronized
// into the 160 MHz domain as the sorting reference.
module csp_tdc_group
  import csp_pkg::*;
#(
  parameter logic [DEV_W-1:0] DEV_ID = '0,
  parameter int unsigned      CH_AW  = 4,
  parameter int unsigned      TDC_AW = 6
) (
  input  logic            clk40,
  input  logic            rst40_n,
  input  logic            clk160,
  input  logic            rst160_n,
  input  logic            clk120,
  input  logic            rst120_n,
  input  logic [BX_W-1:0] bx,          // BX number (40 MHz domain)
  input  logic [BX_W-1:0] bx_gray,     // the same, Gray coded
  input  logic [31:0]     hit,
  input  logic [TDC_W-1:0] tdc [32],
  // TDC FIFO read side (120 MHz, FWFT)
  input  logic            tdc_rd,
  output logic            tdc_empty,
  output word_t           tdc_head,
  // status
  output logic [15:0]     drop_count,  // 40 MHz domain
  output logic            tdc_fifo_full // 160 MHz domain
);
  logic [31:0] ch_full, ch_wr, ch_empty, ch_rd;
  word_t       ch_wdata [32];
  word_t       ch_rdata [32];
  logic [BX_W-1:0] bx_gray160;
  logic        fs_wr;
  word_t       fs_data;

  csp_check #(.N_CH(32), .DEV_ID(DEV_ID)) u_check (
    .clk(clk40), .rst_n(rst40_n), .bx(bx), .hit(hit), .tdc(tdc),
    .fifo_full(ch_full), .fifo_wr(ch_wr), .fifo_data(ch_wdata), .drop_count(drop_count));

  for (genvar c = 0; c < 32; c++) begin : g_chfifo
    csp_async_fifo #(.DW(WORD_W), .AW(CH_AW)) u_chfifo (
      .wr_clk(clk40), .wr_rst_n(rst40_n), .wr_en(ch_wr[c]), .wr_data(ch_wdata[c]), .full(ch_full[c]),
      .rd_clk(clk160), .rd_rst_n(rst160_n), .rd_en(ch_rd[c]), .rd_data(ch_rdata[c]), .empty(ch_empty[c]));
  end

  csp_gray_sync #(.W(BX_W)) u_bx_sync (
    .clk(clk160), .rst_n(rst160_n), .gray_in(bx_gray), .gray_out(bx_gray160));

  csp_first_sort u_first_sort (
    .clk(clk160), .rst_n(rst160_n), .bx_ref(gray2bin(bx_gray160)),
    .ch_empty(ch_empty), .ch_data(ch_rdata), .ch_rd(ch_rd),
    .tdc_full(tdc_fifo_full), .tdc_wr(fs_wr), .tdc_data(fs_data), .side_hr());

  csp_async_fifo #(.DW(WORD_W), .AW(TDC_AW)) u_tdc_fifo (
    .wr_clk(clk160), .wr_rst_n(rst160_n), .wr_en(fs_wr), .wr_data(fs_data), .full(tdc_fifo_full),
    .rd_clk(clk120), .rd_rst_n(rst120_n), .rd_en(tdc_rd), .rd_data(tdc_head), .empty(tdc_empty));
endmodule
