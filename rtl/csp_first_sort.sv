// First sorting of the CSP readout for one TDC device (160 MHz domain): the
// readout priority encoder and the logic processing that move data words from the
// 32 channel FIFOs into the device's TDC FIFO, earliest first.
//
// Channels 0-15 are the low-radius (LR) ends of strips 0-15 and channels 16-31 the
// high-radius (HR) ends of the same strips. Both ends of a strip see the same hit
// within a few ns, so the search runs over 16 strips rather than 32 channels: the
// 16 head timestamps of one end are the keys, an empty FIFO giving the key 255.
// The pipelined csp_min2_tree returns the two strips with the earliest heads; the
// heads of both ends of each of those strips are then popped, if present, and
// written into the TDC FIFO. The compared end alternates between HR and LR, so a
// word that only one end recorded cannot be held back for ever. All of that
// follows the design.
//
// How the pipeline is kept busy is this design's choice. A new search starts every
// clock, on the other end than the one before. Its result comes back 4 clocks
// later, and by then earlier results may already have taken some strips, whose
// heads have changed. So:
//   * strips with words waiting in the pop queue (busy) enter a search as empty;
//   * a returned strip is used only if no result was taken for it in the 4 clocks
//     since its search started, and it is not busy;
//   * the words of a used strip (HR end, then LR end, earliest strip first) go into
//     an 8-entry pop queue, if it has room for all of them; otherwise the result is
//     dropped and found again by a later search.
// One word leaves the pop queue per clock (4 per BX) unless the TDC FIFO is full.
// Keys are rebased on bx_ref (see csp_pkg::ts_key).
//
// Timing: a word at the head of an otherwise idle set of FIFOs is written 5 or 6
// clocks after it becomes visible (search 4 clocks, queue 1 clock, and up to one
// clock waiting for a search on its end).
module csp_first_sort
  import csp_pkg::*;
(
  input  logic            clk,          // 160 MHz
  input  logic            rst_n,
  input  logic [BX_W-1:0] bx_ref,       // BX number, synchronized into this domain
  // channel FIFO read side (FWFT)
  input  logic [31:0]     ch_empty,
  input  word_t           ch_data [32],
  output logic [31:0]     ch_rd,
  // TDC FIFO write side
  input  logic            tdc_full,
  output logic            tdc_wr,
  output word_t           tdc_data,
  // status
  output logic            side_hr       // end compared by the search started this clock
);
  localparam int unsigned QD = 8;       // pop queue depth

  logic [BX_W-1:0] keys [16];
  logic            tree_valid;
  cand_t           min1, min2;
  logic [15:0]     hist [4];            // strips taken in each of the last 4 clocks
  logic [15:0]     busy, taken, recent;

  // pop queue
  logic [4:0]      q_ch  [QD];
  logic [QD-1:0]   q_vld;
  logic [2:0]      q_wp, q_rp;
  logic [3:0]      q_cnt;

  always_comb begin
    busy = '0;
    for (int i = 0; i < QD; i++) if (q_vld[i]) busy[q_ch[i][3:0]] = 1'b1;
    recent = hist[0] | hist[1] | hist[2] | hist[3];
  end

  // Keys of the search started this clock.
  always_comb begin
    for (int s = 0; s < 16; s++) begin
      logic [4:0] c;
      c = {side_hr, 4'(s)};
      keys[s] = (ch_empty[c] || busy[s] || taken[s]) ? KEY_EMPTY : ts_key(ch_data[c].bx, bx_ref);
    end
  end

  csp_min2_tree u_tree (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .keys(keys),
    .out_valid(tree_valid), .min1(min1), .min2(min2));

  // Use of the returning result: up to four channels, packed to the front.
  logic [1:0] use_strip;
  logic [4:0] cand_ch [4];
  logic [3:0] cand_ok;
  logic [4:0] pack_ch [4];
  logic [2:0] pack_n;
  logic       push;
  always_comb begin
    use_strip[0] = tree_valid && min1.key != KEY_EMPTY && !recent[min1.idx] && !busy[min1.idx];
    use_strip[1] = tree_valid && min2.key != KEY_EMPTY && !recent[min2.idx] && !busy[min2.idx];
    cand_ch = '{{1'b1, min1.idx}, {1'b0, min1.idx}, {1'b1, min2.idx}, {1'b0, min2.idx}};
    for (int k = 0; k < 4; k++) cand_ok[k] = use_strip[k / 2] && !ch_empty[cand_ch[k]];
    pack_n = '0;
    for (int k = 0; k < 4; k++) pack_ch[k] = '0;
    for (int k = 0; k < 4; k++) begin
      if (cand_ok[k]) begin
        pack_ch[pack_n[1:0]] = cand_ch[k];
        pack_n = pack_n + 3'd1;
      end
    end
    // room is counted before this clock's pop
    push  = (pack_n != '0) && ({1'b0, q_cnt} + {2'b0, pack_n} <= 5'(QD));
    taken = '0;
    if (push) begin
      if (cand_ok[0] || cand_ok[1]) taken[min1.idx] = 1'b1;
      if (cand_ok[2] || cand_ok[3]) taken[min2.idx] = 1'b1;
    end
  end

  // Pop: one word per clock from the queue head. A queued FIFO cannot become
  // empty before its turn, since only this block pops it.
  logic pop;
  always_comb begin
    pop      = q_vld[q_rp] && !tdc_full;
    ch_rd    = '0;
    if (pop) ch_rd[q_ch[q_rp]] = 1'b1;
    tdc_wr   = pop;
    tdc_data = ch_data[q_ch[q_rp]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      side_hr  <= 1'b1;
      q_vld    <= '0;
      q_wp     <= '0;
      q_rp     <= '0;
      q_cnt    <= '0;
      for (int i = 0; i < 4; i++) hist[i] <= '0;
      for (int i = 0; i < QD; i++) q_ch[i] <= '0;
    end else begin
      side_hr  <= !side_hr;
      hist[0]  <= taken;
      for (int i = 1; i < 4; i++) hist[i] <= hist[i-1];
      if (pop) begin
        q_vld[q_rp] <= 1'b0;
        q_rp        <= q_rp + 3'd1;
      end
      if (push) begin
        for (int k = 0; k < 4; k++) begin
          if (3'(k) < pack_n) begin
            q_ch[q_wp + 3'(k)]  <= pack_ch[k];
            q_vld[q_wp + 3'(k)] <= 1'b1;
          end
        end
        q_wp <= q_wp + pack_n;
      end
      q_cnt <= q_cnt + (push ? {1'b0, pack_n} : 4'd0) - (pop ? 4'd1 : 4'd0);
    end
  end

`ifndef SYNTHESIS
  // Only one channel FIFO is popped per clock, and only when it holds a word.
  a_one_pop: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ch_rd));
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) (ch_rd & ch_empty) == '0);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) q_cnt <= 4'(QD));
`endif
endmodule
