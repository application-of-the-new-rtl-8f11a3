// Back-end hit reconstruction: pairs the two end words of a strip and computes
// where along the strip the hit was.
//
// Every fired strip gives one word from its low-radius (LR) end and one from its
// high-radius (HR) end, with the same generation BX. With t1 the LR and t2 the HR
// TDC value, a strip of length L and a signal speed v along it, the hit lies at
//     r = L/2 - (t2 - t1) * v / 2
// from the LR end: a hit nearer the LR end reaches it first (t1 < t2). This block
// keeps, for each of the 48 strips and each end, the last unpaired word (its BX and
// TDC value). When a word arrives and the other end of its strip holds a word of
// the same BX, the pair is complete: r is computed and the stored word is released.
// Otherwise the word is stored, replacing any older unpaired word of that end,
// which is counted as unpaired. The up to three words of a frame are handled in
// order within one clock, so both ends arriving in the same frame pair at once.
// The BX number is 8 bits, so a word left unpaired would match a new word of the
// same BX number 256 BX later. To prevent that, a sweep visits one strip per clock
// (every strip every 48 BX) and releases stored words more than 127 BX old, by the
// block's own BX counter; such a word is also counted as unpaired.
//
// The formula and the two-word pairing follow the design. This design's choices:
// pairing on equal BX only, the replacement rule, the age sweep, r = (L - (t2 - t1) * V) >>> 1 in
// signed arithmetic with L in length units and V in length units per TDC count
// (STRIP_LEN and V_PER_TDC, both placeholders to be set for a real chamber), and the
// counters.
//
// Interface: in_valid/in_word are the words accepted by the Demux window.
// Outputs are registered, one clock after the words: pos_valid/pos_strip/pos_bx/
// pos_r for up to three completed pairs, n_pairs and n_unpaired counters.
module bee_hit_position
  import csp_pkg::*;
#(
  parameter int STRIP_LEN = 1600,       // L, in length units (e.g. mm)
  parameter int V_PER_TDC = 20,         // v, in length units per TDC count
  parameter int R_W       = 24          // width of the signed position
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [2:0]            in_valid,
  input  word_t                 in_word   [3],
  output logic [2:0]            pos_valid,
  output logic [5:0]            pos_strip [3],   // 16 * device + strip in device
  output logic [BX_W-1:0]       pos_bx    [3],
  output logic signed [R_W-1:0] pos_r     [3],
  output logic [31:0]           n_pairs,
  output logic [31:0]           n_unpaired
);
  localparam int NS = 48;

  // stored unpaired word per strip and end (index 0 = LR, 1 = HR)
  logic            st_v  [NS][2];
  logic [BX_W-1:0] st_bx [NS][2];
  logic [TDC_W-1:0] st_t [NS][2];

  // next state of the store and this clock's results
  logic            nx_v  [NS][2];
  logic [BX_W-1:0] nx_bx [NS][2];
  logic [TDC_W-1:0] nx_t [NS][2];
  logic [2:0]            p_valid;
  logic [5:0]            p_strip [3];
  logic [BX_W-1:0]       p_bx    [3];
  logic signed [R_W-1:0] p_r     [3];
  logic [1:0]            n_pair_now;
  logic [2:0]            n_lost_now;
  logic [BX_W-1:0]       bx_now;        // BX counter, reset together with the front end's
  logic [5:0]            sweep;         // strip visited by the age sweep

  function automatic logic signed [R_W-1:0] position(logic [TDC_W-1:0] t_lr, logic [TDC_W-1:0] t_hr);
    int dt;
    dt = int'(t_hr) - int'(t_lr);
    return R_W'((STRIP_LEN - dt * V_PER_TDC) >>> 1);
  endfunction

  always_comb begin
    nx_v = st_v; nx_bx = st_bx; nx_t = st_t;
    n_pair_now = '0; n_lost_now = '0;
    for (int k = 0; k < 3; k++) begin
      int         si;
      logic [5:0] s;
      logic       e;
      si = 16 * int'(in_word[k].dev) + int'(in_word[k].ch[3:0]);
      s  = 6'(si);
      e = in_word[k].ch[4];
      p_valid[k] = 1'b0;
      p_strip[k] = s;
      p_bx[k]    = in_word[k].bx;
      p_r[k]     = '0;
      if (in_valid[k] && si < NS) begin
        if (nx_v[s][!e] && nx_bx[s][!e] == in_word[k].bx) begin
          p_valid[k]   = 1'b1;
          p_r[k]       = e ? position(nx_t[s][0], in_word[k].tdc) : position(in_word[k].tdc, nx_t[s][1]);
          nx_v[s][!e]  = 1'b0;
          n_pair_now   = n_pair_now + 2'd1;
        end else begin
          if (nx_v[s][e]) n_lost_now = n_lost_now + 3'd1;
          nx_v[s][e]  = 1'b1;
          nx_bx[s][e] = in_word[k].bx;
          nx_t[s][e]  = in_word[k].tdc;
        end
      end
    end
    for (int j = 0; j < 2; j++) begin
      logic [BX_W-1:0] age;
      age = bx_now - nx_bx[sweep][j];
      if (nx_v[sweep][j] && age[BX_W-1]) begin
        nx_v[sweep][j] = 1'b0;
        n_lost_now     = n_lost_now + 3'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        st_v[s][0] <= 1'b0; st_v[s][1] <= 1'b0;
        st_bx[s][0] <= '0;  st_bx[s][1] <= '0;
        st_t[s][0] <= '0;   st_t[s][1] <= '0;
      end
      pos_valid  <= '0;
      for (int k = 0; k < 3; k++) begin
        pos_strip[k] <= '0; pos_bx[k] <= '0; pos_r[k] <= '0;
      end
      n_pairs    <= '0;
      n_unpaired <= '0;
      bx_now     <= '0;
      sweep      <= '0;
    end else begin
      bx_now     <= bx_now + 1'b1;
      sweep      <= (sweep == 6'(NS - 1)) ? '0 : sweep + 6'd1;
      st_v <= nx_v; st_bx <= nx_bx; st_t <= nx_t;
      pos_valid <= p_valid;
      pos_strip <= p_strip;
      pos_bx    <= p_bx;
      pos_r     <= p_r;
      n_pairs    <= n_pairs + 32'(n_pair_now);
      n_unpaired <= n_unpaired + 32'(n_lost_now);
    end
  end
endmodule
