// tb_link_load: the output link of one column pair under the rated pixel
// load, with the full 32-pixel chip at its default parameters.
//
// The eight pixels of columns 0 and 1, which share link 0, get 1 ns pulses
// with exponentially distributed gaps of mean 200 ns (5 MHz per pixel) for
// 60 us. That offers 40 Mwords/s to a link that carries 16 Mwords/s (640
// Mb/s, 10 bits per 8b/10b symbol, 4 symbols per word), so the link is the
// bottleneck: the 32 x 33 second-layer FIFO, the column FIFOs and the pixel
// FIFOs fill up in turn, and finally the TDCs stay busy and pulses are
// missed. The other six columns stay quiet. The testbench decodes all four
// links over two time windows (2^15 cycles each) and checks:
//  * every symbol is valid and every frame is well formed (header, frame
//    number, data word count, CRC-32);
//  * every event word received is the word of a pulse, none twice;
//  * while loaded, link 0 sends no idle commas after it has filled up,
//    i.e. it runs at its full rate;
//  * back-pressure reached each stage: second-layer FIFO, column FIFO and
//    pixel FIFO were all seen full.
// Counted: pulses, words received, pulses missed, full cycles per stage.
`include "tb_util.svh"
module tb_link_load;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 1fs;
  `include "tb_tdc_model.svh"
  localparam realtime T = 3.125;
  localparam realtime MEAN_GAP = 200.0;     // 5 MHz per pixel
  localparam realtime LOAD_END = 60000.0;   // pulses for 60 us
  localparam int NC = 8, NP = 4, NL = 4;
  localparam int RUN_CYCLES = 2 * 32768 + 2000;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [NC*NP-1:0] trig1 = '0, trig2 = '0, fe_en;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic [1:0] ddr [NL];
  int cnt = 0;

  always #(T/2) clk = ~clk;
  initial #0.2 rst_n = 1'b0;
  always @(posedge clk) if (rst_n) cnt <= cnt + 1;

  alcor_top dut (.clk, .rst_n, .trig1, .trig2, .fe_enable(fe_en), .spi_sclk(sclk),
                 .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso), .ddr);

  // ---------------- expected events ----------------
  int exp_idx [logic [31:0]];   // word without TDC field -> pulses not yet matched
  int n_pulses = 0;

  function automatic logic [31:0] no_tdc(logic [31:0] w);
    return {w[31:26], 2'b00, w[23:0]};
  endfunction

  task automatic expect_edge(input int c, input int p, input realtime t);
    fork
      begin
        logic [31:0] w;
        #(stop_edge(t, T) - t + 0.1);
        w = {3'(c), 3'(p), 2'b00, 15'(cnt), 9'(fine_bins(t, T))};
        if (exp_idx.exists(w)) exp_idx[w]++; else exp_idx[w] = 1;
      end
    join_none
  endtask

  task automatic pixel_stim(input int c, input int p);
    realtime gap, t;
    real u;
    while ($realtime < LOAD_END) begin
      u   = real'($urandom % 1000000 + 1) / 1000001.0;
      gap = -MEAN_GAP * $ln(u);
      if (gap < 2.0) gap = 2.0;
      #(gap - 1.0);
      trig1[c * NP + p] = 1'b1; t = $realtime; expect_edge(c, p, t); n_pulses++;
      #1.0 trig1[c * NP + p] = 1'b0;
    end
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

  // ---------------- back-pressure monitors ----------------
  int full_merge = 0, full_col = 0, full_pix = 0;
  always @(posedge clk) begin
    if (dut.g_link[0].u_merge.full) full_merge++;
    if (dut.g_col[0].u_fifo.full || dut.g_col[1].u_fifo.full) full_col++;
  end
  for (genvar c = 0; c < 2; c++) begin : g_pmon
    for (genvar p = 0; p < NP; p++) begin : g_p
      always @(posedge clk) if (dut.g_col[c].u_col.g_pix[p].u_pix.u_data.full) full_pix++;
    end
  end

  int crc_ok = 0, frames_closed[NC], commas = 0, load_commas = 0, load_units = 0;

  initial begin
    repeat (RUN_CYCLES + 200000) @(posedge clk);
    failures++;
    begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  end

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    build_table();
    repeat (100) @(posedge clk);
    for (int c = 0; c < 2; c++)
      for (int p = 0; p < NP; p++)
        fork
          automatic int cc = c, pp = p;
          pixel_stim(cc, pp);
        join_none
    wait (cnt >= RUN_CYCLES);
    check_links();
    begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
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
        // cycles 8000..18000: the link is full; 10000 cycles carry 500 words
        if (l == 0 && p / 2 >= 8000 && p / 2 < 18000) begin
          load_units++;
          if (v == {1'b1, K28_5}) load_commas++;
        end
        if (v == {1'b1, K28_5}) begin commas++; continue; end
        begin
          bit is_ctrl = (v == {1'b1, K28_1});
          logic [31:0] w;
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
    begin
      int n_bad = 0, lost;
      foreach (rx_data[i]) begin
        logic [31:0] w;
        w = no_tdc(rx_data[i]);
        if (exp_idx.exists(w) && exp_idx[w] > 0) exp_idx[w]--;
        else n_bad++;
      end
      lost = n_pulses - rx_data.size();
      $display("pulses %0d, words %0d, missed %0d (%0.1f %%), link 0 under load: %0d idle commas, %0d words, full cycles: merge FIFO %0d, column FIFOs %0d, pixel FIFOs %0d, CRC ok %0d",
               n_pulses, rx_data.size(), lost, 100.0 * lost / n_pulses, load_commas, load_units,
               full_merge, full_col, full_pix, crc_ok);
      `TB_CHECK(n_pulses > 8 * 250, $sformatf("pulses sent: %0d", n_pulses))
      `TB_CHECK(n_bad == 0, $sformatf("%0d event words match no pulse", n_bad))
      `TB_CHECK(lost > 0, "pulses missed under overload")
      `TB_CHECK(load_units >= 450 && load_commas == 0, "link 0 at full rate under load")
      `TB_CHECK(full_merge > 0, "second-layer FIFO back-pressure")
      `TB_CHECK(full_col > 0, "column FIFO back-pressure")
      `TB_CHECK(full_pix > 0, "pixel FIFO back-pressure")
      for (int c = 0; c < NC; c++) `TB_CHECK(frames_closed[c] >= 1, $sformatf("column %0d frames %0d", c, frames_closed[c]))
    end
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
