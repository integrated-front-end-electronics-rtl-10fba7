// tb_eoc_col_ctrl: the EoC column controller against a behavioural column
// that holds a queue of words and follows the pixel side of the protocol.
// Checks the request-to-freeze delay (synchroniser plus one cycle), the
// freeze-to-write-enable lead, 4-cycle slots 7 cycles apart, the words
// written to the FIFO and their order, freeze release after the last word,
// and that no slot starts while the FIFO is full.
`include "tb_util.svh"
module tb_eoc_col_ctrl;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic req, freeze, wen, tok, full = 1'b0, wr_en;
  logic [31:0] data, wr_data;
  logic [31:0] col_q[$], out_q[$], sent[$];
  int wcnt = 0, cyc = 0, t_req = -1, t_freeze = -1, t_wen[$];
  bit freeze_q = 0;

  always #1 clk = ~clk;
  initial #0.2 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  always @(posedge clk) cyc++;

  eoc_col_ctrl dut (.clk, .rst_n, .req, .freeze, .wen, .tok, .data,
                    .fifo_full(full), .wr_en, .wr_data);

  // behavioural column
  assign req  = col_q.size() > 0;
  assign tok  = wen && col_q.size() > 0;
  assign data = tok ? col_q[0] : IDLE_WORD;
  always @(posedge clk) begin
    if (wen && col_q.size() > 0) begin
      if (wcnt == 3) begin void'(col_q.pop_front()); wcnt <= 0; end
      else wcnt <= wcnt + 1;
    end
    if (wr_en) out_q.push_back(wr_data);
    if (wen && !$past(wen)) t_wen.push_back(cyc);
    if (freeze && !freeze_q) t_freeze = cyc;
    freeze_q <= freeze;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    `TB_DONE
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    `TB_CHECK(!freeze && !wen, "idle after reset")
    for (int i = 0; i < 5; i++) begin
      col_q.push_back(32'hC0DE_0000 + i);
      sent.push_back(32'hC0DE_0000 + i);
    end
    t_req = cyc;
    wait (col_q.size() == 0);
    repeat (8) @(negedge clk);
    `TB_CHECK(!freeze, "freeze released after the last word")
    `TB_CHECK(t_freeze - t_req >= 2 && t_freeze - t_req <= 4, $sformatf("request to freeze %0d cycles", t_freeze - t_req))
    `TB_CHECK(t_wen.size() == 5, $sformatf("%0d slots", t_wen.size()))
    if (t_wen.size() == 5) begin
      `TB_CHECK(t_wen[0] - t_freeze == 2, "freeze to write enable")
      for (int i = 1; i < 5; i++) `TB_CHECK(t_wen[i] - t_wen[i-1] == 7, "7 cycles per word")
    end
    `TB_CHECK(out_q == sent, "words written in order")
    // FIFO full: no slot until it clears
    out_q.delete(); t_wen.delete();
    full = 1'b1;
    col_q.push_back(32'h1234_5678);
    repeat (30) @(negedge clk);
    `TB_CHECK(t_wen.size() == 0 && freeze, "frozen but no slot while FIFO full")
    full = 1'b0;
    repeat (12) @(negedge clk);
    `TB_CHECK(out_q.size() == 1 && out_q[0] == 32'h1234_5678, "word after FIFO frees")
    `TB_DONE
  end
endmodule
