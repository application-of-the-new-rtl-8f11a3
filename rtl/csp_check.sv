// Check step of the CSP readout for one 32-channel TDC device (40 MHz domain).
//
// Every BX all channels are looked at in parallel. For each channel whose
// discriminated signal is above threshold (hit[i] high) a data word is formed from
// the current BX number (generation time), the channel ID, the device ID and the
// channel's TDC value, and is written into that channel's own FIFO in the same
// clock cycle. The parallel check and the word contents follow the design. What
// happens when a channel FIFO is full is not specified there: this block drops
// the word and counts it in a saturating counter.
//
// Interface: hit/tdc come from the TDC front end, one cycle per BX; fifo_full is
// the write-side full flag of each channel FIFO; fifo_wr/fifo_data drive them.
module csp_check
  import csp_pkg::*;
#(
  parameter int unsigned      N_CH   = 32,
  parameter logic [DEV_W-1:0] DEV_ID = '0
) (
  input  logic                 clk,        // 40 MHz BX clock
  input  logic                 rst_n,
  input  logic [BX_W-1:0]      bx,         // current BX number
  input  logic [N_CH-1:0]      hit,
  input  logic [TDC_W-1:0]     tdc [N_CH],
  input  logic [N_CH-1:0]      fifo_full,
  output logic [N_CH-1:0]      fifo_wr,
  output word_t                fifo_data [N_CH],
  output logic [15:0]          drop_count   // words lost to full channel FIFOs
);
  logic [N_CH-1:0] dropped;

  always_comb begin
    for (int i = 0; i < N_CH; i++) begin
      fifo_data[i].bx  = bx;
      fifo_data[i].dev = DEV_ID;
      fifo_data[i].ch  = CH_W'(i);
      fifo_data[i].tdc = tdc[i];
      fifo_wr[i]       = hit[i] && !fifo_full[i];
      dropped[i]       = hit[i] && fifo_full[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drop_count <= '0;
    else if (dropped != '0) begin
      if (drop_count > 16'hFFFF - 16'($countones(dropped))) drop_count <= 16'hFFFF;
      else drop_count <= drop_count + 16'($countones(dropped));
    end
  end
endmodule
