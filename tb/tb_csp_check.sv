// Self-checking test of csp_check: random hits on 32 channels with random TDC
// values and random full flags. Every clock the write strobes, the four word
// fields (BX, device, channel, TDC value) and the drop counter are compared with
// values computed here.
module tb_csp_check;
  import csp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] bx = 0;
  logic [31:0] hit = 0, fifo_full = 0, fifo_wr;
  logic [15:0] tdc [32];
  word_t fifo_data [32];
  logic [15:0] drop_count;
  int checks = 0, failures = 0;
  int exp_drops = 0;

  csp_check #(.N_CH(32), .DEV_ID(3'd2)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) tdc[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      bx = 8'($urandom);
      hit = $urandom & $urandom;
      fifo_full = (n % 3 == 0) ? $urandom & $urandom & $urandom : '0;
      for (int i = 0; i < 32; i++) tdc[i] = 16'($urandom);
      #1;
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (fifo_wr[i] !== (hit[i] && !fifo_full[i]) ||
            (hit[i] && (fifo_data[i].bx !== bx || fifo_data[i].dev !== 3'd2 ||
                        fifo_data[i].ch !== 5'(i) || fifo_data[i].tdc !== tdc[i]))) begin
          failures++;
          $display("FAIL ch %0d wr %b data %h", i, fifo_wr[i], fifo_data[i]);
        end
        if (hit[i] && fifo_full[i]) exp_drops++;
      end
      @(posedge clk); #1;
      checks++;
      if (drop_count !== 16'(exp_drops)) begin
        failures++; $display("FAIL drops %0d expected %0d", drop_count, exp_drops);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
