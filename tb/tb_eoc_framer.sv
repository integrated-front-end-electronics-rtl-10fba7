// tb_eoc_framer: column FIFO plus framer, random event words and random
// back-pressure, frame ticks every WIN cycles. Each received frame is
// checked: HEADER, consecutive frame numbers, exactly the words written
// during its window in order, the STATUS word count and column, the CRC-32
// (computed here bit by bit) and the control flag / hold outputs.
`include "tb_util.svh"
module tb_eoc_framer;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 1fs;
  localparam int WIN = 120;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, tick = 1'b0;
  logic wr = 1'b0, rd, full, empty, ov, ordy = 1'b0, ohold;
  logic [31:0] wd, rdata;
  logic [4:0] level;
  logic [32:0] od;
  logic [31:0] win_words[$][$];
  logic [32:0] rx[$];
  logic [31:0] cur[$];
  bit hold_q[$];
  int cyc = 0, nwin = 0;

  always #1 clk = ~clk;
  initial #0.2 rst_n = 1'b0;   // a real falling edge for the asynchronous resets

  sync_fifo #(.WIDTH(32), .DEPTH(16)) u_fifo (.clk, .rst_n, .wr_en(wr), .wr_data(wd),
    .rd_en(rd), .rd_data(rdata), .full, .empty, .level);
  eoc_framer #(.COL_ID(3'd6)) dut (.clk, .rst_n, .frame_tick(tick), .fifo_empty(empty),
    .fifo_data(rdata), .fifo_level(level), .fifo_rd(rd), .out_valid(ov),
    .out_ready(ordy), .out_data(od), .out_hold(ohold));

  function automatic logic [31:0] crc_step(logic [31:0] c, logic [31:0] d);
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[31] ^ d[i];
      c = {c[30:0], 1'b0};
      if (fb) c ^= 32'h04C1_1DB7;
    end
    return c;
  endfunction

  // stimulus on the falling edge, sampling on the rising edge
  always @(negedge clk) if (rst_n) begin
    tick = (cyc % WIN == WIN - 1);
    wr = !full && ($urandom % 4 == 0);
    wd = $urandom;
    ordy = ($urandom % 4) != 0;
  end
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    // a write on the tick cycle belongs to the new window
    if (tick) begin
      win_words.push_back(cur);
      cur.delete();
    end
    if (wr && !full) cur.push_back(wd);
    if (ov && ordy) begin rx.push_back(od); hold_q.push_back(ohold); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    `TB_DONE
  end

  initial begin
    int p, nframes;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (WIN * 8 + 60) @(posedge clk);
    // parse
    p = 0; nframes = 0;
    for (int f = 0; f < 8; f++) begin
      logic [31:0] crc, cnt;
      crc = '1;
      if (p + 4 > rx.size()) break;
      `TB_CHECK(rx[p] == {1'b1, 8'hA5, 5'b0, 3'd6, 16'h0}, $sformatf("header %09x", rx[p]))
      `TB_CHECK(hold_q[p] == 1'b1, "hold on header")
      crc = crc_step(crc, rx[p][31:0]); p++;
      `TB_CHECK(rx[p] == {1'b1, 32'(f)}, "frame number")
      `TB_CHECK(hold_q[p] == 1'b0, "no hold on frame number")
      crc = crc_step(crc, rx[p][31:0]); p++;
      if (f >= win_words.size()) break;
      cnt = 0;
      foreach (win_words[f][i]) begin
        `TB_CHECK(rx[p] == {1'b0, win_words[f][i]}, $sformatf("frame %0d data %0d", f, i))
        crc = crc_step(crc, rx[p][31:0]); p++; cnt++;
      end
      `TB_CHECK(rx[p][32] && rx[p][31:16] == cnt[15:0] && rx[p][2:0] == 3'd6, "status word")
      crc = crc_step(crc, rx[p][31:0]); p++;
      `TB_CHECK(rx[p] == {1'b1, crc}, "crc word")
      p++;
      nframes++;
    end
    `TB_CHECK(nframes >= 7, $sformatf("%0d complete frames", nframes))
    `TB_DONE
  end
endmodule
