// Two-flop synchronizer for a Gray-coded counter value.
//
// The source domain changes the value by one count at a time, so in Gray code only
// one bit changes and the destination never samples a mixture of two values. The
// output is the synchronized Gray value, two destination clocks late. Used for the
// FIFO pointers and for carrying the 40 MHz BX number into the sorting clock
// domains. This is standard clock-domain-crossing practice, not taken from the
// design description beyond its use of dual-clock FIFOs.
module csp_gray_sync #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] gray_in,
  output logic [W-1:0] gray_out
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta     <= '0;
      gray_out <= '0;
    end else begin
      meta     <= gray_in;
      gray_out <= meta;
    end
  end
endmodule
