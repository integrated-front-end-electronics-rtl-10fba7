// tb_sync_fifo: random pushes and pops on the pixel FIFO (4 x 32) compared
// with a queue model; checks full/empty/level and ignored writes when full.
`include "tb_util.svh"
module tb_sync_fifo;
  timeunit 1ns; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic wr, rd, full, empty;
  logic [31:0] wd, rdata;
  logic [2:0] level;
  logic [31:0] model[$];
  int n_full = 0;
  always #1 clk = ~clk;
  initial #0.2 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  sync_fifo #(.WIDTH(32), .DEPTH(4)) dut (.clk, .rst_n, .wr_en(wr), .wr_data(wd),
    .rd_en(rd), .rd_data(rdata), .full, .empty, .level);
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    `TB_DONE
  end
  initial begin
    wr = 0; rd = 0; wd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2000) begin
      @(negedge clk);
      `TB_CHECK(level == 3'(model.size()), "level")
      `TB_CHECK(empty == (model.size() == 0), "empty")
      `TB_CHECK(full == (model.size() == 4), "full")
      if (model.size() > 0) `TB_CHECK(rdata == model[0], "head word")
      if (full) n_full++;
      wr = ($urandom % 3) != 0;
      rd = ($urandom % 2) != 0;
      wd = $urandom;
      @(posedge clk);
      if (rd && model.size() > 0) begin
        void'(model.pop_front());
        if (wr) model.push_back(wd);
      end else if (wr && model.size() < 4) model.push_back(wd);
    end
    `TB_CHECK(n_full > 10, "full state reached")
    `TB_DONE
  end
endmodule
