// tb_coarse_counter: checks reset, counting and the wrap of the coarse counter
// against a cycle count kept by the testbench.
`include "tb_util.svh"
module tb_coarse_counter;
  timeunit 1ns; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [14:0] q;
  int unsigned n;
  always #1 clk = ~clk;
  initial #0.2 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  coarse_counter dut (.clk, .rst_n, .count_o(q));
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    `TB_DONE
  end
  initial begin
    @(negedge clk); `TB_CHECK(q == 0, "reset value")
    rst_n = 1'b1;
    n = 0;
    repeat (32768 + 100) begin
      @(negedge clk);
      n++;
      if (n % 97 == 0 || n == 32767 || n == 32768 || n == 32769)
        `TB_CHECK(q == 15'(n % 32768), $sformatf("count %0d got %0d", n, q))
    end
    `TB_DONE
  end
endmodule
