// Push step of the CSP readout (40 MHz domain).
//
// Once per BX it takes up to three of the earliest words waiting in the
// concentrator FIFO and places them, with one valid flag each, into the data part
// of the outgoing link frame. Three words per frame with valid flags follow the
// design; the frame layout (frame_t: valid[2:0], then word[2] .. word[0], word[0]
// the earliest) is this design's choice. The frame is registered: words popped in
// one clock appear on frame in the next.
module csp_push
  import csp_pkg::*;
(
  input  logic       clk,        // 40 MHz BX clock
  input  logic       rst_n,
  input  logic [2:0] avail,      // from csp_concentrator_fifo
  input  word_t      head [3],
  output logic [1:0] rd_cnt,
  output frame_t     frame
);
  always_comb begin
    rd_cnt = 2'($countones(avail));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) frame <= '0;
    else begin
      frame.valid <= avail;
      for (int k = 0; k < 3; k++) frame.word[k] <= avail[k] ? head[k] : '0;
    end
  end
endmodule
