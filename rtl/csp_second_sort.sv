// Second sorting of the CSP readout (120 MHz domain).
//
// Looks at the head words of the three TDC FIFOs (FWFT), leaves out the empty
// ones, and each clock moves the one with the earliest generation time into the
// concentrator FIFO. Three inputs compared at 120 MHz, empty FIFOs excluded: that
// follows the design. This design's choices: the compare and the move are
// combinational within one clock (one word per 120 MHz clock, i.e. three per BX,
// the rate the push step sends); on equal keys the lower-numbered FIFO wins;
// nothing moves while the concentrator FIFO is full. Keys are rebased on bx_ref.
module csp_second_sort
  import csp_pkg::*;
#(
  parameter int unsigned N_IN = 3
) (
  input  logic            clk,         // 120 MHz (only the assertion uses it)
  input  logic            rst_n,
  input  logic [BX_W-1:0] bx_ref,
  input  logic [N_IN-1:0] in_empty,
  input  word_t           in_data [N_IN],
  output logic [N_IN-1:0] in_rd,
  input  logic            out_full,
  output logic            out_wr,
  output word_t           out_data
);
  logic [BX_W:0] best_key;   // one bit wider so that "none yet" is above any key
  logic [$clog2(N_IN > 1 ? N_IN : 2)-1:0] best;

  always_comb begin
    best_key = '1;
    best     = '0;
    for (int i = 0; i < N_IN; i++) begin
      if (!in_empty[i] && {1'b0, ts_key(in_data[i].bx, bx_ref)} < best_key) begin
        best_key = {1'b0, ts_key(in_data[i].bx, bx_ref)};
        best     = i[$bits(best)-1:0];
      end
    end
    out_wr   = (in_empty != '1) && !out_full;
    out_data = in_data[best];
    in_rd    = '0;
    if (out_wr) in_rd[best] = 1'b1;
  end

`ifndef SYNTHESIS
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) (in_rd & in_empty) == '0);
`endif
endmodule
