// tb_eoc_merge: two framer-like sources with bursts of control words
// (hold high on all but the last) and single data words, random read side.
// Checks that every word arrives once, each source's order is kept, no
// word of the other source lands inside a burst, and that the merge
// alternates word by word when both sources have data.
`include "tb_util.svh"
module tb_eoc_merge;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, rd, empty;
  logic [1:0] iv, ir, ih;
  logic [32:0] idata [2], rdata;
  typedef struct { logic [32:0] w; bit hold; } item_t;
  item_t src[2][$];
  logic [32:0] exp_q[2][$], got[$];
  int alternations = 0, bursts = 0;

  always #1 clk = ~clk;
  initial #0.2 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  eoc_merge dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(idata),
                 .in_hold(ih), .rd_en(rd), .rd_data(rdata), .empty);

  for (genvar s = 0; s < 2; s++) begin : g_s
    assign iv[s] = src[s].size() > 0;
    assign idata[s] = src[s].size() > 0 ? src[s][0].w : '0;
    assign ih[s] = src[s].size() > 0 ? src[s][0].hold : 1'b0;
  end
  always @(negedge clk) rd = ($urandom % 3) != 0;
  // decide at the edge, pop the source queues just after it
  always @(posedge clk) begin
    bit x[2];
    for (int s = 0; s < 2; s++) x[s] = iv[s] && ir[s];
    if (rd && !empty) got.push_back(rdata);
    #0.1;
    for (int s = 0; s < 2; s++) if (x[s]) void'(src[s].pop_front());
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    `TB_DONE
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 2; s++)
      for (int n = 0; n < 300; n++) begin
        logic [32:0] w;
        if ($urandom % 10 == 0) begin
          for (int b = 0; b < 4; b++) begin
            w = {1'b1, 1'(s), 3'(b), 12'(n), 16'hB000};
            src[s].push_back('{w: w, hold: b != 3});
            exp_q[s].push_back(w);
          end
        end else begin
          w = {1'b0, 1'(s), 31'(n)};
          src[s].push_back('{w: w, hold: 1'b0});
          exp_q[s].push_back(w);
        end
      end
    wait (src[0].size() == 0 && src[1].size() == 0);
    repeat (200) @(posedge clk);
    `TB_CHECK(got.size() == exp_q[0].size() + exp_q[1].size(), "all words arrive")
    begin
      int pos[2] = '{0, 0};
      int in_burst = -1;
      int prev = -1;
      foreach (got[i]) begin
        int s;
        s = got[i][31];
        if (in_burst >= 0) `TB_CHECK(s == in_burst, "burst not interleaved")
        `TB_CHECK(pos[s] < exp_q[s].size() && got[i] == exp_q[s][pos[s]], $sformatf("order of source %0d: i=%0d got %09x exp %09x", s, i, got[i], exp_q[s][pos[s]]))
        pos[s]++;
        if (got[i][32] && got[i][30:28] != 3) in_burst = s; else in_burst = -1;
        if (got[i][32] && got[i][30:28] == 3) bursts++;
        if (prev >= 0 && prev != s) alternations++;
        prev = s;
      end
    end
    `TB_CHECK(alternations > 300, $sformatf("%0d alternations", alternations))
    `TB_CHECK(bursts > 20, "bursts seen")
    `TB_DONE
  end
endmodule
