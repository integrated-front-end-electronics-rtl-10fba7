// tb_pixel: one pixel with its four TDC models; the testbench loads the
// configuration chain and plays the End-of-Column. Triggers come at random
// clock phases. Checks every event word against values worked out from the
// trigger times: column and pixel number, TDC address (round robin),
// coarse time (the coarse counter value after the TDC stop edge) and fine
// time (50 ps bins to the stop edge). Covers single-photon mode on trig1,
// the trigger select (trig2) and ToT mode (leading and trailing words).
`include "tb_util.svh"
module tb_pixel;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 1fs;
  `include "tb_tdc_model.svh"
  localparam realtime T = 3.125;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, trig1 = 1'b0, trig2 = 1'b0, fe_en;
  logic shift = 1'b0, update = 1'b0, cfg_in = 1'b0, cfg_out;
  logic req, freeze = 1'b0, wen = 1'b0, wen_up, tok;
  logic [31:0] data;
  logic [31:0] words[$], exp_q[$];
  int cnt = 0;

  always #(T/2) clk = ~clk;
  initial #0.2 rst_n = 1'b0;
  always @(posedge clk) if (rst_n) cnt <= cnt + 1;   // mirrors the coarse counter

  pixel #(.COL_ID(3'd2), .PIX_ID(3'd1)) dut (
    .clk, .rst_n, .trig1, .trig2, .fe_enable(fe_en),
    .cfg_shift(shift), .cfg_update(update), .cfg_in, .cfg_out,
    .req_up(1'b0), .req_dn(req), .freeze, .wen_dn(wen), .wen_up,
    .tok_up(1'b0), .tok_dn(tok), .data_up(IDLE_WORD), .data_dn(data));

  // End-of-Column: serve requests, one word per 7 cycles
  initial forever begin
    @(negedge clk);
    if (req) begin
      freeze = 1'b1;
      repeat (2) @(negedge clk);
      while (req) begin
        wen = 1'b1;
        repeat (3) @(negedge clk);
        @(posedge clk) if (tok) words.push_back(data);
        @(negedge clk);
        wen = 1'b0;
        repeat (3) @(negedge clk);
      end
      freeze = 1'b0;
    end
  end

  task automatic load_cfg(input logic [7:0] c);
    for (int b = 7; b >= 0; b--) begin
      @(negedge clk) shift = 1'b1; cfg_in = c[b];
    end
    @(negedge clk) shift = 1'b0; update = 1'b1;
    @(negedge clk) update = 1'b0;
  endtask

  // a trigger edge at a random phase; the expected word is formed when the
  // counter has passed the stop edge
  task automatic edge_at(input int which, input logic level, input int tdc);
    realtime t;
    @(posedge clk);
    #(0.07 + ($urandom % 2900) / 1000.0);
    if (which == 1) trig1 = level; else trig2 = level;
    t = $realtime;
    fork
      begin
        #(stop_edge(t, T) - t + 0.1);
        exp_q.push_back({3'd2, 3'd1, 2'(tdc), 15'(cnt), 9'(fine_bins(t, T))});
      end
    join_none
  endtask

  task automatic compare(input string phase);
    repeat (400) @(posedge clk);
    `TB_CHECK(words.size() == exp_q.size(), $sformatf("%s: %0d words, expected %0d", phase, words.size(), exp_q.size()))
    foreach (exp_q[i]) begin
      int f = -1;
      foreach (words[j]) if (words[j] == exp_q[i]) f = j;
      `TB_CHECK(f >= 0, $sformatf("%s: missing word %08x", phase, exp_q[i]))
      if (f >= 0) words.delete(f);
    end
    words.delete(); exp_q.delete();
  endtask

  initial begin
    #300us;
    failures++;
    `TB_DONE
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    `TB_CHECK(fe_en == 1'b1, "front end enabled after reset")
    // single-photon mode, trig1: four triggers go to TDCs 0..3
    for (int k = 0; k < 4; k++) begin
      edge_at(1, 1'b1, k);
      #2 trig1 = 1'b0;
      repeat (5) @(posedge clk);
    end
    compare("single-photon");
    // select trig2: trig1 is ignored
    load_cfg({1'b1, 4'hF, 1'b1, 1'b0, 1'b1});
    @(posedge clk) trig1 = 1'b1; #2 trig1 = 1'b0;
    repeat (200) @(posedge clk);
    `TB_CHECK(words.size() == 0, "trig1 ignored when trig2 selected")
    edge_at(2, 1'b1, 0);
    #2 trig2 = 1'b0;
    compare("trig2");
    // ToT mode on trig1, TDC pair {2,3} is next after the pointer moved on
    load_cfg({1'b1, 4'hF, 1'b0, 1'b1, 1'b1});
    repeat (5) @(posedge clk);
    edge_at(1, 1'b1, 2);
    repeat (6) @(posedge clk);
    edge_at(1, 1'b0, 3);
    compare("ToT");
    // disabled pixel
    load_cfg({1'b0, 4'hF, 1'b0, 1'b0, 1'b0});
    `TB_CHECK(fe_en == 1'b0, "front-end enable bit out")
    @(posedge clk) trig1 = 1'b1; #2 trig1 = 1'b0;
    compare("disabled");
    `TB_DONE
  end
endmodule
