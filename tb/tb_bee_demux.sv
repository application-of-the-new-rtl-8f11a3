// Self-checking test of bee_demux: frames whose words were generated a chosen
// number of BX earlier (0 to 40, around the 23 BX window, across the 8-bit wrap of
// the BX number). Checks the reported delay, the accept/late decision and the
// counters and maximum delay.
module tb_bee_demux;
  import csp_pkg::*;
  logic clk = 0, rst_n = 0;
  frame_t frame = '0;
  logic [2:0] acc_valid;
  word_t acc_word [3];
  logic [7:0] acc_delay [3];
  logic [31:0] n_accepted, n_late;
  logic [7:0] max_delay;
  int checks = 0, failures = 0;
  int exp_acc = 0, exp_late = 0, exp_max = 0;
  logic [7:0] bx_tb = 0;   // follows the block's BX counter

  bee_demux #(.DEMUX_WINDOW(23), .FIXED_LAT(4)) dut (.*);

  always #12.5 clk = ~clk;
  always @(posedge clk) if (rst_n) bx_tb <= bx_tb + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int d [3];
      logic [2:0] v;
      @(negedge clk);
      v = 3'($urandom);
      for (int k = 0; k < 3; k++) begin
        d[k] = $urandom_range(40);
        frame.word[k] = word_t'($urandom);
        frame.word[k].bx = bx_tb - 8'(d[k]) - 8'd4;     // d BX later than the fixed latency
        if (v[k]) begin
          if (d[k] <= 23) exp_acc++; else exp_late++;
          if (d[k] > exp_max) exp_max = d[k];
        end
      end
      frame.valid = v;
      @(posedge clk); #1;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (acc_valid[k] !== (v[k] && d[k] <= 23) || (v[k] && acc_delay[k] != 8'(d[k])) ||
            (acc_valid[k] && acc_word[k] !== frame.word[k])) begin
          failures++;
          $display("FAIL word %0d: delay %0d reported %0d valid %b", k, d[k], acc_delay[k], acc_valid[k]);
        end
      end
      checks++;
      if (n_accepted != 32'(exp_acc) || n_late != 32'(exp_late) || max_delay != 8'(exp_max)) begin
        failures++; $display("FAIL counters %0d %0d %0d", n_accepted, n_late, max_delay);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
