// tb_enc8b10b: checks the 8b/10b encoder against code words taken from the
// published code tables (K28.5, K28.1, D0.0, D21.5, D23.7, D17.7), with the
// running disparity before each symbol known, and checks for all 256 data
// bytes in sequence that every symbol has 4 to 6 ones and that the running
// digital sum of the stream stays bounded.
`include "tb_util.svh"
module tb_enc8b10b;
  timeunit 1ns; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, k = 1'b0;
  logic [7:0] d = '0;
  logic [9:0] q;
  int rds;
  always #1 clk = ~clk;
  initial #0.2 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  enc8b10b dut (.clk, .rst_n, .en, .k, .d, .q);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    `TB_DONE
  end

  task automatic send(input logic kk, input logic [7:0] dd, input logic [9:0] expect_q,
                      input bit do_check, input string name);
    @(negedge clk);
    k = kk; d = dd; en = 1'b1;
    #0.1;
    if (do_check) `TB_CHECK(q == expect_q, $sformatf("%s got %b", name, q))
    @(posedge clk); #0.1 en = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // RD- start
    send(1, 8'hBC, 10'b0011111010, 1, "K28.5 RD-");   // -> RD+
    send(1, 8'hBC, 10'b1100000101, 1, "K28.5 RD+");   // -> RD-
    send(1, 8'h3C, 10'b0011111001, 1, "K28.1 RD-");   // -> RD+
    send(0, 8'h00, 10'b0110001011, 1, "D0.0 RD+");    // -> RD+
    send(0, 8'h00, 10'b0110001011, 1, "D0.0 RD+ again"); // -> RD+
    send(0, 8'hB5, 10'b1010101010, 1, "D21.5 RD+");   // balanced -> RD+
    send(0, 8'hF7, 10'b0001011110, 1, "D23.7 RD+");   // -> RD+
    send(0, 8'hF1, 10'b1000110001, 1, "D17.7 RD+");   // -> RD-
    send(0, 8'hF1, 10'b1000110111, 1, "D17.7 RD- alternate"); // -> RD+
    send(0, 8'h00, 10'b0110001011, 1, "D0.0 RD+ last"); // -> RD+
    rds = 0;
    for (int i = 0; i < 512; i++) begin
      send(0, 8'(i), '0, 0, "");
      `TB_CHECK($countones(q) >= 4 && $countones(q) <= 6, "symbol weight")
      rds += 2 * $countones(q) - 10;
      `TB_CHECK(rds >= -4 && rds <= 4, $sformatf("running sum %0d", rds))
    end
    `TB_DONE
  end
endmodule
