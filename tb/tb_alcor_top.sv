// tb_alcor_top: end-to-end test of the full 32-pixel readout at its default
// size, over three time windows of 2^15 clock cycles at 320 MHz.
//
// The testbench loads the configuration chain over SPI (reading the old
// contents back on miso), fires discriminator pulses at random clock phases
// on every pixel, and decodes the four serial links: it rebuilds the 8b/10b
// symbols from the two bits per cycle, decodes them with a table it builds
// from a reference encoder, splits the symbol stream into words, the words
// into per-column frames, and checks every frame (header, frame number,
// data word count, CRC-32). Every expected event word (column, pixel,
// coarse time, fine time, worked out from the pulse times) must arrive
// exactly once. Special pixels: column 1 pixel 2 in ToT mode (two words per
// pulse), column 5 pixel 0 on discriminator 2 (pulses on discriminator 1
// are ignored), and column 3 pixel 1 gets a burst of five pulses 4 cycles
// apart, of which the fifth finds all four TDCs busy and is lost.
// Mechanisms counted: ToT pairs, trigger-2 words, lost trigger, each TDC
// address used, freeze rounds with several words, frames closed, K28.1
// control words, idle commas, SPI read-back.
`include "tb_util.svh"
module tb_alcor_top;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 1fs;
  `include "tb_tdc_model.svh"
  localparam realtime T = 3.125;
  localparam int NC = 8, NP = 4, NL = 4;
  localparam int RUN_CYCLES = 3 * 32768 + 2000;
  localparam int TOT_C = 1, TOT_P = 2, T2_C = 5, T2_P = 0, BU_C = 3, BU_P = 1;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [NC*NP-1:0] trig1 = '0, trig2 = '0, fe_en;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic [1:0] ddr [NL];
  int cnt = 0;
  bit stop_trig = 0;

  always #(T/2) clk = ~clk;
  initial #0.2 rst_n = 1'b0;
  always @(posedge clk) if (rst_n) cnt <= cnt + 1;

  alcor_top dut (.clk, .rst_n, .trig1, .trig2, .fe_enable(fe_en), .spi_sclk(sclk),
                 .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso), .ddr);

  // ---------------- expected events ----------------
  logic [31:0] exp_w[$];      // expected words with the TDC field cleared
  int n_tot_exp = 0, n_t2_exp = 0;

  function automatic logic [31:0] no_tdc(logic [31:0] w);
    return {w[31:26], 2'b00, w[23:0]};
  endfunction

  task automatic expect_edge(input int c, input int p, input realtime t);
    fork
      begin
        #(stop_edge(t, T) - t + 0.1);
        exp_w.push_back({3'(c), 3'(p), 2'b00, 15'(cnt), 9'(fine_bins(t, T))});
      end
    join_none
  endtask

  task automatic pixel_stim(input int c, input int p);
    int idx = c * NP + p;
    realtime t;
    repeat (6000 + $urandom % 1500) @(posedge clk);
    while (!stop_trig) begin
      #(0.05 + ($urandom % 3000) / 1000.0);
      if (c == T2_C && p == T2_P) begin
        trig1[idx] = 1'b1; #1.0 trig1[idx] = 1'b0;    // ignored
        repeat (40) @(posedge clk);
        #(0.05 + ($urandom % 3000) / 1000.0);
        trig2[idx] = 1'b1; t = $realtime; expect_edge(c, p, t); n_t2_exp++;
        #1.2 trig2[idx] = 1'b0;
      end else if (c == TOT_C && p == TOT_P) begin
        trig1[idx] = 1'b1; t = $realtime; expect_edge(c, p, t);
        #(4.0 + ($urandom % 20000) / 1000.0);
        trig1[idx] = 1'b0; t = $realtime; expect_edge(c, p, t);
        n_tot_exp++;
      end else if (c == BU_C && p == BU_P && cnt > 40000 && cnt < 50000) begin
        for (int k = 0; k < 5; k++) begin
          trig1[idx] = 1'b1; t = $realtime;
          if (k < 4) expect_edge(c, p, t);
          #1.0 trig1[idx] = 1'b0;
          repeat (4) @(posedge clk);
        end
        repeat (12000) @(posedge clk);
      end else begin
        trig1[idx] = 1'b1; t = $realtime; expect_edge(c, p, t);
        #(1.0 + ($urandom % 3000) / 1000.0) trig1[idx] = 1'b0;
      end
      repeat (700 + $urandom % 2500) @(posedge clk);
    end
  endtask

  // ---------------- SPI configuration ----------------
  int spi_readback_ok = 0;
  task automatic spi_load();
    logic [7:0] cfg [NC*NP];
    for (int i = 0; i < NC * NP; i++) cfg[i] = 8'hF9;
    cfg[TOT_C * NP + TOT_P] = 8'hFB;     // ToT mode
    cfg[T2_C * NP + T2_P]   = 8'hFD;     // discriminator 2
    cs_n = 1'b0;
    #20;
    // the chain runs up column 0, then up column 1, ...: send the far end first
    for (int c = NC - 1; c >= 0; c--)
      for (int p = 0; p < NP; p++)
        for (int b = 7; b >= 0; b--) begin
          mosi = cfg[c * NP + p][b];
          #25;
          if (miso == CFG_RESET[b]) spi_readback_ok++;
          sclk = 1'b1; #25 sclk = 1'b0;
        end
    #20 cs_n = 1'b1;
    #100;
  endtask

  // ---------------- serial links ----------------
  bit lbits [NL][$];
  always @(posedge clk) if (rst_n)
    for (int l = 0; l < NL; l++) begin
      lbits[l].push_back(ddr[l][1]);
      lbits[l].push_back(ddr[l][0]);
    end

  // decode table from a reference encoder: symbol -> {k, byte}
  logic rrst_n = 1'b1, ren = 1'b0, rk = 1'b0, rclk = 1'b0;
  logic [7:0] rd8 = '0;
  logic [9:0] rq;
  int dec [logic [9:0]];
  enc8b10b u_ref (.clk(rclk), .rst_n(rrst_n), .en(ren), .k(rk), .d(rd8), .q(rq));
  task automatic build_table();
    for (int v = 0; v < 258; v++) begin
      logic kk = (v >= 256);
      logic [7:0] dd = (v == 256) ? K28_5 : (v == 257) ? K28_1 : 8'(v);
      rrst_n = 1'b0; #0.01 rrst_n = 1'b1;          // negative disparity
      rk = kk; rd8 = dd; #0.01 dec[rq] = {kk, dd};
      rk = 1'b1; rd8 = K28_5; ren = 1'b1; #0.01 rclk = 1'b1; #0.01 rclk = 1'b0; ren = 1'b0;
      rk = kk; rd8 = dd; #0.01 dec[rq] = {kk, dd};  // positive disparity
    end
  endtask

  // ---------------- mechanism counters ----------------
  int multi_word_rounds = 0, frames_closed[NC], crc_ok = 0, k281 = 0, commas = 0;
  int tdc_used[4] = '{0, 0, 0, 0}, tot_pairs = 0, t2_words = 0, data_rx = 0;
  // words read by the EoC per freeze round
  for (genvar c = 0; c < NC; c++) begin : g_mon
    int n = 0;
    always @(posedge clk) begin
      if (dut.g_col[c].u_ctrl.wr_en) n <= n + 1;
      if (!dut.g_col[c].u_ctrl.freeze) begin
        if (n >= 2) multi_word_rounds++;
        n <= 0;
      end
    end
  end

  initial begin
    repeat (RUN_CYCLES + 200000) @(posedge clk);
    failures++;
    `TB_DONE
  end

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    build_table();
    spi_load();
    `TB_CHECK(spi_readback_ok == NC * NP * 8, $sformatf("SPI read-back %0d bits", spi_readback_ok))
    `TB_CHECK(fe_en == '1, "front ends enabled")
    for (int c = 0; c < NC; c++)
      for (int p = 0; p < NP; p++)
        fork
          automatic int cc = c, pp = p;
          pixel_stim(cc, pp);
        join_none
    wait (cnt >= RUN_CYCLES - 3000);
    stop_trig = 1;
    wait (cnt >= RUN_CYCLES);
    check_links();
    `TB_DONE
  end

  task automatic check_links();
    logic [31:0] rx_data[$];
    for (int l = 0; l < NL; l++) begin
      int p = -1, st[2], fno[2], nwords[2];
      logic [31:0] crc[2];
      logic [31:0] words[$];
      bit ctrl[$];
      st = '{0, 0}; fno = '{0, 0}; nwords = '{0, 0};
      for (int i = 0; i + 10 <= lbits[l].size(); i++) begin
        logic [9:0] s;
        for (int b = 0; b < 10; b++) s[9 - b] = lbits[l][i + b];
        if (s == 10'b0011111010) begin p = i; break; end
      end
      `TB_CHECK(p >= 0, "link aligned")
      // symbols -> words
      while (p + 10 <= lbits[l].size()) begin
        logic [9:0] s;
        int v;
        for (int b = 0; b < 10; b++) s[9 - b] = lbits[l][p + b];
        p += 10;
        if (!dec.exists(s)) begin `TB_CHECK(0, "invalid symbol") break; end
        v = dec[s];
        if (v == {1'b1, K28_5}) begin commas++; continue; end
        begin
          bit is_ctrl = (v == {1'b1, K28_1});
          logic [31:0] w;
          if (is_ctrl) k281++;
          if (is_ctrl) p += 0;
          else p -= 10;
          if (p + 40 > lbits[l].size()) break;
          for (int by = 0; by < 4; by++) begin
            for (int b = 0; b < 10; b++) s[9 - b] = lbits[l][p + b];
            p += 10;
            `TB_CHECK(dec.exists(s) && dec[s] < 256, "data byte")
            w = {w[23:0], 8'(dec[s])};
          end
          words.push_back(w); ctrl.push_back(is_ctrl);
        end
      end
      // words -> frames; st: 0 expect header, 1 expect frame number, 2 in frame,
      // 3 expect CRC
      foreach (words[i]) begin
        logic [31:0] w = words[i];
        if (!ctrl[i]) begin
          int c = w[31:29];
          int s = c - 2 * l;
          `TB_CHECK(s == 0 || s == 1, "data word column on this link")
          if (s == 0 || s == 1) begin
            `TB_CHECK(st[s] == 2, "data word inside a frame")
            crc[s] = crc_step(crc[s], w); nwords[s]++;
          end
          rx_data.push_back(w);
          continue;
        end
        begin
          int s = -1;
          for (int k = 0; k < 2; k++)
            if (st[k] == 0 && w[31:24] == 8'hA5 && w[15:0] == 16'h0 && w[18:16] == 3'(2 * l + k)) s = k;
          if (s < 0) for (int k = 0; k < 2; k++) if (st[k] == 1 || st[k] == 3) s = k;
          if (s < 0) for (int k = 0; k < 2; k++) if (st[k] == 2 && w[2:0] == 3'(2 * l + k)) s = k;
          `TB_CHECK(s >= 0, $sformatf("control word %08x placed", w))
          if (s < 0) continue;
          case (st[s])
            0: begin crc[s] = crc_step(32'hFFFF_FFFF, w); st[s] = 1; end
            1: begin `TB_CHECK(w == 32'(fno[s]), "frame number") crc[s] = crc_step(crc[s], w);
                     st[s] = 2; nwords[s] = 0; end
            2: begin `TB_CHECK(w[31:16] == 16'(nwords[s]), "status word count")
                     crc[s] = crc_step(crc[s], w); st[s] = 3; end
            3: begin `TB_CHECK(w == crc[s], "frame CRC") if (w == crc[s]) crc_ok++;
                     frames_closed[2 * l + s]++; fno[s]++; st[s] = 0; end
          endcase
        end
      end
    end
    // event words
    `TB_CHECK(rx_data.size() == exp_w.size(), $sformatf("%0d event words, expected %0d", rx_data.size(), exp_w.size()))
    begin
      int idx [logic [31:0]];
      foreach (rx_data[i]) begin
        logic [31:0] w = rx_data[i];
        tdc_used[w[25:24]]++;
        if (w[31:29] == TOT_C && w[28:26] == TOT_P && w[24]) tot_pairs++;
        if (w[31:29] == T2_C && w[28:26] == T2_P) t2_words++;
        if (idx.exists(no_tdc(w))) idx[no_tdc(w)]++; else idx[no_tdc(w)] = 1;
      end
      foreach (exp_w[i]) begin
        `TB_CHECK(idx.exists(exp_w[i]) && idx[exp_w[i]] > 0, $sformatf("event %08x received", exp_w[i]))
        if (idx.exists(exp_w[i])) idx[exp_w[i]]--;
      end
    end
    $display("events %0d, ToT pairs %0d, trig2 words %0d, TDC use %0d/%0d/%0d/%0d, multi-word rounds %0d, CRC ok %0d, K28.1 %0d, commas %0d",
             rx_data.size(), tot_pairs, t2_words, tdc_used[0], tdc_used[1], tdc_used[2], tdc_used[3],
             multi_word_rounds, crc_ok, k281, commas);
    `TB_CHECK(tot_pairs == n_tot_exp && tot_pairs > 0, "ToT pairs")
    `TB_CHECK(t2_words == n_t2_exp && t2_words > 0, "discriminator-2 words")
    for (int t = 0; t < 4; t++) `TB_CHECK(tdc_used[t] > 0, $sformatf("TDC %0d used", t))
    `TB_CHECK(multi_word_rounds > 0, "freeze rounds with several words")
    for (int c = 0; c < NC; c++) `TB_CHECK(frames_closed[c] >= 2, $sformatf("column %0d frames %0d", c, frames_closed[c]))
    `TB_CHECK(k281 > 0 && commas > 0, "control and idle symbols")
  endtask

  function automatic logic [31:0] crc_step(logic [31:0] c, logic [31:0] d);
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[31] ^ d[i];
      c = {c[30:0], 1'b0};
      if (fb) c ^= 32'h04C1_1DB7;
    end
    return c;
  endfunction
endmodule
