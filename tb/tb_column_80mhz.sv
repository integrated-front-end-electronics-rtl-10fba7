// tb_column_80mhz: one column at the lowest clock frequency, 80 MHz.
//
// At 80 MHz the TDC interval of 0.5 to 1.5 clock periods (6.25 to 18.75 ns)
// gives fine counts of 125 to 375 in 50 ps bins, so the whole 9-bit fine
// counter is needed, and the run-down, one clock cycle per count, lasts up
// to 4.7 us. The column is read by a real End-of-Column controller into a
// 16 x 32 column FIFO drained every cycle. Each pixel gets 1 ns pulses with
// exponentially distributed gaps of mean 5 us (a low-rate use at the slow
// clock) for 300 us. Checks:
//  * every word read is the word of a pulse, and no pulse gives two words;
//  * fine counts above 255 occur and none exceeds 375;
//  * words are written into the column FIFO at least 7 cycles apart;
//  * the column FIFO never fills and the pixel FIFOs are full in less than
//    1 % of the cycles;
//  * at least 85 % of the pulses are measured;
//  * everything has drained at the end.
// Counted: freeze rounds with several words, pulses lost to TDC dead time.
`include "tb_util.svh"
module tb_column_80mhz;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 1fs;
  `include "tb_tdc_model.svh"
  localparam realtime T = 12.5;            // 80 MHz
  localparam realtime MEAN_GAP = 5000.0;    // 200 kHz per pixel
  localparam realtime RUN_TIME = 300000.0;  // 300 us of pulses
  localparam int      NP = 4;
  localparam logic [COL_W-1:0] COL = 3'd6;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [NP-1:0] trig1 = '0, fe_en;
  logic cfg_out, req, freeze, wen, tok, fifo_full, fifo_empty, wr_en;
  logic [31:0] data, wr_data, rd_data;
  logic [4:0] fifo_level;
  int cnt = 0;

  always #(T/2) clk = ~clk;
  initial #0.2 rst_n = 1'b0;
  always @(posedge clk) if (rst_n) cnt <= cnt + 1;

  column #(.COL_ID(COL)) dut (
    .clk, .rst_n, .trig1, .trig2('0), .fe_enable(fe_en), .cfg_shift(1'b0),
    .cfg_update(1'b0), .cfg_in(1'b0), .cfg_out, .req, .freeze, .wen, .tok, .data);

  eoc_col_ctrl u_eoc (
    .clk, .rst_n, .req, .freeze, .wen, .tok, .data,
    .fifo_full, .wr_en, .wr_data);

  sync_fifo #(.WIDTH(32), .DEPTH(16)) u_fifo (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en(!fifo_empty), .rd_data,
    .full(fifo_full), .empty(fifo_empty), .level(fifo_level));

  // ---------------- expected words ----------------
  int exp_idx[logic [31:0]];   // word without TDC field -> pulses not yet seen
  int n_pulses = 0, n_words = 0, n_bad = 0;

  function automatic logic [31:0] no_tdc(logic [31:0] w);
    return {w[31:26], 2'b00, w[23:0]};
  endfunction

  task automatic expect_edge(input int p, input realtime t);
    fork
      begin
        logic [31:0] w;
        #(stop_edge(t, T) - t + 0.1);
        w = {COL, 3'(p), 2'b00, 15'(cnt), 9'(fine_bins(t, T))};
        if (exp_idx.exists(w)) exp_idx[w]++; else exp_idx[w] = 1;
      end
    join_none
  endtask

  task automatic pixel_stim(input int p);
    realtime gap, t;
    real u;
    while ($realtime < RUN_TIME) begin
      u   = real'($urandom % 1000000 + 1) / 1000001.0;
      gap = -MEAN_GAP * $ln(u);
      if (gap < 2.0) gap = 2.0;
      #(gap - 1.0);
      trig1[p] = 1'b1; t = $realtime; expect_edge(p, t); n_pulses++;
      #1.0 trig1[p] = 1'b0;
    end
  endtask

  // ---------------- monitors ----------------
  int last_wr = -100, min_gap = 1000, rounds = 0, multi_rounds = 0, in_round = 0;
  int pix_full = 0, col_full = 0, max_level = 0, max_fine = 0, min_fine = 1000;
  logic freeze_q = 1'b0;

  always @(posedge clk) begin
    if (wr_en) begin
      if (cnt - last_wr < min_gap) min_gap = cnt - last_wr;
      last_wr = cnt;
      in_round++;
    end
    if (freeze && !freeze_q) begin rounds++; in_round = 0; end
    if (!freeze && freeze_q && in_round > 1) multi_rounds++;
    freeze_q = freeze;
    if (fifo_full) col_full++;
    if (int'(fifo_level) > max_level) max_level = int'(fifo_level);
    if (!fifo_empty) begin
      logic [31:0] w;
      w = no_tdc(rd_data);
      n_words++;
      if (int'(rd_data[8:0]) > max_fine) max_fine = int'(rd_data[8:0]);
      if (int'(rd_data[8:0]) < min_fine) min_fine = int'(rd_data[8:0]);
      if (exp_idx.exists(w) && exp_idx[w] > 0) exp_idx[w]--;
      else n_bad++;
    end
  end

  for (genvar k = 0; k < NP; k++) begin : g_mon
    always @(posedge clk) if (dut.g_pix[k].u_pix.u_data.full) pix_full++;
  end

  initial begin
    #5ms;
    failures++;
    begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  end

  initial begin
    int lost;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    fork
      pixel_stim(0); pixel_stim(1); pixel_stim(2); pixel_stim(3);
    join
    repeat (4000) @(posedge clk);
    lost = n_pulses - n_words;
    $display("pulses %0d, words %0d, lost to dead time %0d (%0.1f %%), rounds %0d, multi-word rounds %0d, min word spacing %0d, column FIFO max level %0d, pixel FIFO full cycles %0d",
             n_pulses, n_words, lost, 100.0 * lost / n_pulses, rounds, multi_rounds, min_gap, max_level, pix_full);
    $display("fine counts %0d..%0d", min_fine, max_fine);
    `TB_CHECK(n_pulses > 4 * 40, $sformatf("pulses sent: %0d", n_pulses))
    `TB_CHECK(max_fine > 255 && max_fine <= 375 && min_fine >= 125, "fine counts use 9 bits and stay in 125..375")
    `TB_CHECK(n_bad == 0, $sformatf("%0d words match no pulse", n_bad))
    `TB_CHECK(min_gap >= 7, $sformatf("word spacing %0d cycles", min_gap))
    `TB_CHECK(pix_full < cnt / 100, $sformatf("pixel FIFO full for %0d cycles", pix_full))
    `TB_CHECK(col_full == 0, $sformatf("column FIFO full for %0d cycles", col_full))
    `TB_CHECK(n_words >= n_pulses * 85 / 100, "at least 85 % of the pulses measured")
    `TB_CHECK(multi_rounds > 0, "freeze rounds with several words")
    `TB_CHECK(!req && !freeze && fifo_empty, "column drained")
    begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  end
endmodule
