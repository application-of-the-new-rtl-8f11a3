// Check-Sort-Push readout of one iRPC half-chamber, from the 96 TDC channels of
// the front end to the Demux window check of the back end.
//
// The front end (csp_fee) checks every channel each BX, sorts the stored words by
// generation time in two steps and pushes up to three of the earliest per BX into
// a link frame. The high-speed serial link between front and back end is not part
// of this RTL: the frame goes straight, registered, to bee_demux, which measures
// each word's sending delay and applies the Demux window. bee_hit_position then
// pairs the LR and HR words of each strip among the accepted words and computes the
// hit position along the strip. The delay bee_demux reports has
// FIXED_LAT subtracted: one clock for the frame register and three for the
// shortest path through the front end (the measured minimum is 4 to 5 BX,
// depending on where a hit falls relative to the faster clocks). Both ends run from the
// same 40 MHz BX clock and are reset together, so their BX counters agree.
//
// Ports: three clocks (40, 160 and 120 MHz), an asynchronous active-low reset,
// per channel a hit flag and a TDC value each BX, and as outputs the link frame,
// the accepted words with their delays, the hit positions and the counters.
module irpc_csp_top
  import csp_pkg::*;
#(
  parameter int unsigned CH_AW        = 4,
  parameter int unsigned TDC_AW       = 6,
  parameter int unsigned CONC_AW      = 5,
  parameter int unsigned DEMUX_WINDOW = 23,
  parameter int unsigned FIXED_LAT    = 4,   // link (1) + shortest front-end latency (3), in BX
  parameter int          STRIP_LEN    = 1600, // strip length, in length units
  parameter int          V_PER_TDC    = 20    // signal speed, in length units per TDC count
) (
  input  logic             clk40,
  input  logic             clk160,
  input  logic             clk120,
  input  logic             rst_n,
  input  logic [95:0]      hit,
  input  logic [TDC_W-1:0] tdc [96],
  output frame_t           frame,
  output logic [BX_W-1:0]  bx,
  output logic [15:0]      drop_count [3],
  output logic [2:0]       acc_valid,
  output word_t            acc_word [3],
  output logic [BX_W-1:0]  acc_delay [3],
  output logic [31:0]      n_accepted,
  output logic [31:0]      n_late,
  output logic [BX_W-1:0]  max_delay,
  output logic [2:0]       pos_valid,
  output logic [5:0]       pos_strip [3],
  output logic [BX_W-1:0]  pos_bx [3],
  output logic signed [23:0] pos_r [3],
  output logic [31:0]      n_pairs,
  output logic [31:0]      n_unpaired
);
  logic bee_rst_n;

  csp_fee #(.CH_AW(CH_AW), .TDC_AW(TDC_AW), .CONC_AW(CONC_AW)) u_fee (
    .clk40(clk40), .clk160(clk160), .clk120(clk120), .rst_n(rst_n),
    .hit(hit), .tdc(tdc), .frame(frame), .bx(bx), .drop_count(drop_count));

  csp_rst_sync u_bee_rs (.clk(clk40), .arst_n(rst_n), .rst_n(bee_rst_n));

  bee_demux #(.DEMUX_WINDOW(DEMUX_WINDOW), .FIXED_LAT(FIXED_LAT)) u_bee (
    .clk(clk40), .rst_n(bee_rst_n), .frame(frame),
    .acc_valid(acc_valid), .acc_word(acc_word), .acc_delay(acc_delay),
    .n_accepted(n_accepted), .n_late(n_late), .max_delay(max_delay));

  bee_hit_position #(.STRIP_LEN(STRIP_LEN), .V_PER_TDC(V_PER_TDC), .R_W(24)) u_pos (
    .clk(clk40), .rst_n(bee_rst_n), .in_valid(acc_valid), .in_word(acc_word),
    .pos_valid(pos_valid), .pos_strip(pos_strip), .pos_bx(pos_bx), .pos_r(pos_r),
    .n_pairs(n_pairs), .n_unpaired(n_unpaired));
endmodule
