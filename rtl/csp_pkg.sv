// Shared types and constants of the Check-Sort-Push (CSP) front-end readout.
//
// A TDC data word is 32 bits: the 8-bit bunch-crossing (BX) number in which the hit
// was seen (its generation time), the TDC device ID, the channel ID within that
// device and the measured TDC value. The word carries those four fields as the
// design describes; the field widths and their order are this design's choice.
//
// Sorting compares 8-bit keys. An empty FIFO is given the key 255, the largest
// value, so it never wins. A stored timestamp is turned into a key relative to the
// current BX (see ts_key) so that the order stays right when the 8-bit BX number
// wraps around; valid keys are clamped to 254 so that they never equal the
// empty value. This rebasing is this design's addition.
package csp_pkg;

  localparam int unsigned BX_W   = 8;   // timestamp width (8-bit compare inputs)
  localparam int unsigned DEV_W  = 3;   // TDC device (FPGA) ID width
  localparam int unsigned CH_W   = 5;   // channel ID within a 32-channel TDC
  localparam int unsigned TDC_W  = 16;  // TDC measurement width
  localparam int unsigned WORD_W = BX_W + DEV_W + CH_W + TDC_W;  // 32

  localparam logic [BX_W-1:0] KEY_EMPTY = '1;          // 255
  localparam logic [BX_W-1:0] KEY_MAX   = KEY_EMPTY - 1; // 254, largest valid key
  // A word generated KEY_OFFSET BX before the reference gets key 0; words up to
  // (254 - KEY_OFFSET) BX ahead of a lagging reference still order correctly.
  localparam logic [BX_W-1:0] KEY_OFFSET = 8'd250;

  typedef struct packed {
    logic [BX_W-1:0]  bx;   // generation time (BX number, modulo 256)
    logic [DEV_W-1:0] dev;  // device (TDC FPGA) ID
    logic [CH_W-1:0]  ch;   // channel ID, 0-15 low-radius end, 16-31 high-radius end
    logic [TDC_W-1:0] tdc;  // TDC value
  } word_t;

  // Candidate of the earliest-timestamp search: key and strip index.
  typedef struct packed {
    logic [BX_W-1:0] key;
    logic [3:0]      idx;
  } cand_t;

  // Data part of one link frame: three words and their valid flags.
  typedef struct packed {
    logic [2:0]  valid;
    word_t [2:0] word;
  } frame_t;

  // Sort key of a stored word, relative to the BX reference of the sorting domain.
  function automatic logic [BX_W-1:0] ts_key(input logic [BX_W-1:0] ts,
                                             input logic [BX_W-1:0] bx_ref);
    logic [BX_W-1:0] k;
    k = ts - bx_ref + KEY_OFFSET;
    return (k > KEY_MAX) ? KEY_MAX : k;
  endfunction

  function automatic logic [BX_W-1:0] gray2bin(input logic [BX_W-1:0] g);
    logic [BX_W-1:0] b;
    b[BX_W-1] = g[BX_W-1];
    for (int i = BX_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
