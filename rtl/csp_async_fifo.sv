// Dual-clock FIFO in first-word fall-through (FWFT) mode.
//
// Used as the per-channel FIFO (written by the Check step at 40 MHz, read by the
// first sorting at 160 MHz) and as the TDC FIFO (written at 160 MHz, read by the
// second sorting at 120 MHz). In FWFT mode the oldest word is present on rd_data
// whenever empty is low, so a reader can look at the head before popping it with
// rd_en. The FWFT behaviour and the clock-domain crossing follow the design; the
// implementation (2**AW entries, Gray-coded pointers with one spare bit, two-flop
// synchronizers) is a standard one chosen here.
//
// Timing: a write is visible on the read side about two read clocks later; a pop
// frees its entry on the write side about two write clocks later. full and empty
// are therefore conservative. Writes while full and pops while empty are ignored.
module csp_async_fifo #(
  parameter int unsigned DW = 32,
  parameter int unsigned AW = 4
) (
  input  logic          wr_clk,
  input  logic          wr_rst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          full,

  input  logic          rd_clk,
  input  logic          rd_rst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty
);
  logic [DW-1:0] mem [2**AW];

  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] wr_gray_rd, rd_gray_wr;   // pointers seen in the other domain
  logic [AW:0] wr_bin_nxt, rd_bin_nxt;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain
  assign full = (wr_gray == {~rd_gray_wr[AW:AW-1], rd_gray_wr[AW-2:0]});
  assign wr_bin_nxt = wr_bin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wr_bin  <= '0;
      wr_gray <= '0;
    end else begin
      wr_bin  <= wr_bin_nxt;
      wr_gray <= bin2gray(wr_bin_nxt);
    end
  end

  csp_gray_sync #(.W(AW + 1)) u_rd2wr (
    .clk(wr_clk), .rst_n(wr_rst_n), .gray_in(rd_gray), .gray_out(rd_gray_wr));

  // ---------------- read domain
  assign empty      = (rd_gray == wr_gray_rd);
  assign rd_data    = mem[rd_bin[AW-1:0]];
  assign rd_bin_nxt = rd_bin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rd_bin  <= '0;
      rd_gray <= '0;
    end else begin
      rd_bin  <= rd_bin_nxt;
      rd_gray <= bin2gray(rd_bin_nxt);
    end
  end

  csp_gray_sync #(.W(AW + 1)) u_wr2rd (
    .clk(rd_clk), .rst_n(rd_rst_n), .gray_in(wr_gray), .gray_out(wr_gray_rd));

endmodule
