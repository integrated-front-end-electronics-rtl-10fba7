// tb_pixel_config: checks the reset value, that shifting does not disturb
// the active register before update, the shift-out order, and a chain of
// three registers loaded with three different settings.
`include "tb_util.svh"
module tb_pixel_config;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, shift = 1'b0, update = 1'b0, din = 1'b0;
  logic c01, c12, dout;
  pixel_cfg_t cfg [3];
  logic [7:0] pattern [3];
  logic [23:0] stream, seen;
  always #1 clk = ~clk;
  initial #0.2 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  pixel_config u0 (.clk, .rst_n, .shift, .update, .cfg_in(din), .cfg_out(c01), .cfg(cfg[0]));
  pixel_config u1 (.clk, .rst_n, .shift, .update, .cfg_in(c01), .cfg_out(c12), .cfg(cfg[1]));
  pixel_config u2 (.clk, .rst_n, .shift, .update, .cfg_in(c12), .cfg_out(dout), .cfg(cfg[2]));
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    `TB_DONE
  end
  initial begin
    repeat (2) @(negedge clk);
    for (int i = 0; i < 3; i++) `TB_CHECK(cfg[i] == 8'hF9, "reset value 0xF9")
    rst_n = 1'b1;
    pattern = '{8'h13, 8'hA6, 8'h5B};
    // the last pixel of the chain (u2) needs its bits first
    stream = {pattern[2], pattern[1], pattern[0]};
    seen = '0;
    for (int b = 23; b >= 0; b--) begin
      @(negedge clk);
      shift = 1'b1; din = stream[b];
      seen = {seen[22:0], dout};
    end
    @(negedge clk); shift = 1'b0;
    // before update the active registers keep the reset value
    for (int i = 0; i < 3; i++) `TB_CHECK(cfg[i] == 8'hF9, "no change before update")
    // what left the chain is the three reset values
    `TB_CHECK(seen == {3{8'hF9}}, $sformatf("shift-out %06x", seen))
    update = 1'b1;
    @(negedge clk); update = 1'b0;
    for (int i = 0; i < 3; i++) `TB_CHECK(cfg[i] == pattern[i], $sformatf("cfg[%0d]=%02x", i, cfg[i]))
    `TB_CHECK(cfg[0].tot_mode == 1'b1 && cfg[0].enable == 1'b1 && cfg[0].tdc_mask == 4'h2, "field layout")
    `TB_DONE
  end
endmodule
