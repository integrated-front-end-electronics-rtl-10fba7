// tb_column: a 4-pixel column with the testbench as End-of-Column. All
// four pixels fire within a few nanoseconds; the words must come out in
// one freeze round, nearest pixel to the EoC first (pixel 3, 2, 1, 0), one
// per 7 cycles, each with the expected fields. A second burst fires pixel 0
// twice and pixel 2 once: two rounds. Also checks that a word from pixel k
// passes unchanged through the links of the pixels below it.
`include "tb_util.svh"
module tb_column;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 1fs;
  `include "tb_tdc_model.svh"
  localparam realtime T = 3.125;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [3:0] trig1 = '0, trig2 = '0, fe_en;
  logic cfg_out, req, freeze = 1'b0, wen = 1'b0, tok;
  logic [31:0] data;
  logic [31:0] words[$], exp_w[$];
  int rounds[$];
  int cnt = 0, round_no = 0, link_checks = 0;
  bit eoc_hold = 1'b1;   // the EoC ignores requests while set

  always #(T/2) clk = ~clk;
  initial #0.2 rst_n = 1'b0;
  always @(posedge clk) if (rst_n) cnt <= cnt + 1;

  column #(.N_PIX(4), .COL_ID(3'd3)) dut (
    .clk, .rst_n, .trig1, .trig2, .fe_enable(fe_en), .cfg_shift(1'b0),
    .cfg_update(1'b0), .cfg_in(1'b0), .cfg_out, .req, .freeze, .wen, .tok, .data);

  initial forever begin
    @(negedge clk);
    if (req && !eoc_hold) begin
      freeze = 1'b1; round_no++;
      repeat (2) @(negedge clk);
      while (req) begin
        wen = 1'b1;
        repeat (3) @(negedge clk);
        @(posedge clk);
        if (tok) begin
          words.push_back(data); rounds.push_back(round_no);
          // the word is visible on every link below its pixel
          for (int k = data[28:26] + 1; k <= 4; k++) begin
            `TB_CHECK(dut.data_c[k] == data, "word passes the pixels below")
            link_checks++;
          end
        end
        @(negedge clk);
        wen = 1'b0;
        repeat (3) @(negedge clk);
      end
      freeze = 1'b0;
    end
  end

  task automatic fire(input int pix, input int tdc);
    realtime t;
    trig1[pix] = 1'b1;
    t = $realtime;
    fork
      begin
        #(stop_edge(t, T) - t + 0.1);
        exp_w.push_back({3'd3, 3'(pix), 2'(tdc), 15'(cnt), 9'(fine_bins(t, T))});
      end
    join_none
    #1.5 trig1[pix] = 1'b0;
  endtask

  initial begin
    #300us;
    failures++;
    `TB_DONE
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    // burst 1: pixels 0..3, a fraction of a cycle apart
    #0.31 fire(0, 0);
    #0.77 fire(2, 0);
    #0.45 fire(1, 0);
    #1.13 fire(3, 0);
    // let all four conversions finish, then open the EoC
    repeat (150) @(posedge clk);
    eoc_hold = 1'b0;
    repeat (150) @(posedge clk);
    `TB_CHECK(words.size() == 4, $sformatf("burst 1: %0d words", words.size()))
    if (words.size() == 4) begin
      for (int i = 0; i < 4; i++) `TB_CHECK(words[i][28:26] == 3'(3 - i), $sformatf("order: word %0d from pixel %0d", i, words[i][28:26]))
      `TB_CHECK(rounds[0] == rounds[3], "one freeze round")
    end
    foreach (exp_w[i]) begin
      int f = -1;
      foreach (words[j]) if (words[j] == exp_w[i]) f = j;
      `TB_CHECK(f >= 0, $sformatf("word %08x", exp_w[i]))
    end
    words.delete(); exp_w.delete(); rounds.delete();
    // burst 2: pixel 0 twice (TDC 1, then TDC 2), pixel 2 once (TDC 1)
    eoc_hold = 1'b1;
    @(posedge clk); #0.5 fire(0, 1);
    #0.9 fire(2, 1);
    repeat (8) @(posedge clk);
    #1.7 fire(0, 2);
    repeat (150) @(posedge clk);
    eoc_hold = 1'b0;
    repeat (150) @(posedge clk);
    `TB_CHECK(words.size() == 3, $sformatf("burst 2: %0d words", words.size()))
    if (words.size() == 3) begin
      `TB_CHECK(words[0][28:26] == 3'd2 && words[1][28:26] == 3'd0 && words[2][28:26] == 3'd0, "burst 2 order")
      `TB_CHECK(rounds[2] != rounds[1], "second word of pixel 0 in a new round")
    end
    foreach (exp_w[i]) begin
      int f = -1;
      foreach (words[j]) if (words[j] == exp_w[i]) f = j;
      `TB_CHECK(f >= 0, $sformatf("word %08x", exp_w[i]))
    end
    `TB_CHECK(link_checks > 6, "link forwarding observed")
    `TB_DONE
  end
endmodule
