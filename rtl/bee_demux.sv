// Back-end receive check: sending delay and Demux window (40 MHz domain).
//
// The back end rebuilds the hit map from the frames by placing every word back at
// its generation BX, which the word carries. A word is only usable if it arrives
// within the Demux window: its sending delay, the BX in which it was sent minus
// the BX in which it was generated, must not exceed DEMUX_WINDOW (23 BX by default,
// 8 BX in the earlier system). This block keeps its own BX counter, reset together
// with the front end's, computes every word's sending delay, passes on the words
// inside the window and counts those outside it. Window, delay definition and the
// 23 BX value follow the design.
//
// This design's choices: the counters and the maximum-delay register, and
// FIXED_LAT, the fixed latency subtracted from every delay so that the window only
// has to cover the part of the delay that varies. FIXED_LAT counts the clocks of the
// link (1 for the direct frame register of irpc_csp_top) plus the shortest time a
// word can spend in the front end. A word that arrives sooner than FIXED_LAT after
// its generation gets a negative delay, which wraps to a large value and is counted
// late, so FIXED_LAT must not exceed the true minimum.
//
// Timing: outputs are registered, one clock after the frame.
module bee_demux
  import csp_pkg::*;
#(
  parameter int unsigned DEMUX_WINDOW = 23,
  parameter int unsigned FIXED_LAT    = 4
) (
  input  logic            clk,            // 40 MHz
  input  logic            rst_n,          // synchronous to clk, released with the FEE's
  input  frame_t          frame,
  output logic [2:0]      acc_valid,      // word k accepted (inside the window)
  output word_t           acc_word [3],
  output logic [BX_W-1:0] acc_delay [3],  // its sending delay in BX
  output logic [31:0]     n_accepted,
  output logic [31:0]     n_late,
  output logic [BX_W-1:0] max_delay
);
  logic [BX_W-1:0] bx;
  logic [BX_W-1:0] dly [3];
  logic [1:0]      n_acc_now, n_late_now;

  // running maximum including this frame's words
  logic [BX_W-1:0] max_now;

  always_comb begin
    n_acc_now  = '0;
    n_late_now = '0;
    max_now    = max_delay;
    for (int k = 0; k < 3; k++) begin
      dly[k] = bx - frame.word[k].bx - BX_W'(FIXED_LAT);
      if (frame.valid[k]) begin
        if (dly[k] <= BX_W'(DEMUX_WINDOW)) n_acc_now  = n_acc_now + 2'd1;
        else                               n_late_now = n_late_now + 2'd1;
        if (dly[k] > max_now) max_now = dly[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bx         <= '0;
      acc_valid  <= '0;
      n_accepted <= '0;
      n_late     <= '0;
      max_delay  <= '0;
      for (int k = 0; k < 3; k++) begin
        acc_word[k]  <= '0;
        acc_delay[k] <= '0;
      end
    end else begin
      bx         <= bx + 1'b1;
      n_accepted <= n_accepted + 32'(n_acc_now);
      n_late     <= n_late + 32'(n_late_now);
      max_delay  <= max_now;
      for (int k = 0; k < 3; k++) begin
        acc_valid[k] <= frame.valid[k] && (dly[k] <= BX_W'(DEMUX_WINDOW));
        acc_word[k]  <= frame.word[k];
        acc_delay[k] <= dly[k];
      end
    end
  end
endmodule
