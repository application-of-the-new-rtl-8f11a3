// Reset synchronizer: asserts asynchronously, releases two clocks after the
// asynchronous reset input is released, in step with clk. One per clock domain.
module csp_rst_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic q;
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) {rst_n, q} <= 2'b00;
    else         {rst_n, q} <= {q, 1'b1};
  end
endmodule
