// tb_pixel_data_ctrl: three pixel data controllers chained as a column,
// with the testbench playing the End-of-Column. Checks the event word
// layout, the read-out order (nearest pixel to the EoC first, one word per
// pixel per freeze round), the 4-cycle word hold, the idle bus value, the
// 7-cycle slot rate and FIFO back-pressure at 4 words.
`include "tb_util.svh"
module tb_pixel_data_ctrl;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [2:0] ev_valid = '0, ev_ready;
  logic [1:0] ev_tdc [3];
  logic [14:0] ev_coarse [3];
  logic [8:0] ev_fine [3];
  logic req_c [4], tok_c [4], wen_c [4];
  logic [31:0] data_c [4];
  logic freeze = 1'b0;
  logic [31:0] words[$];
  int slot_starts[$];
  int cyc = 0;

  always #1 clk = ~clk;
  initial #0.2 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  always @(posedge clk) cyc++;

  assign req_c[0] = 1'b0;
  assign tok_c[0] = 1'b0;
  assign data_c[0] = IDLE_WORD;

  for (genvar k = 0; k < 3; k++) begin : g_p
    pixel_data_ctrl #(.COL_ID(3'd5), .PIX_ID(3'(k))) dut (
      .clk, .rst_n, .ev_valid(ev_valid[k]), .ev_ready(ev_ready[k]),
      .ev_tdc(ev_tdc[k]), .ev_coarse(ev_coarse[k]), .ev_fine(ev_fine[k]),
      .req_up(req_c[k]), .req_dn(req_c[k+1]), .freeze,
      .wen_dn(wen_c[k+1]), .wen_up(wen_c[k]),
      .tok_up(tok_c[k]), .tok_dn(tok_c[k+1]),
      .data_up(data_c[k]), .data_dn(data_c[k+1]));
  end

  logic wen = 1'b0;
  assign wen_c[3] = wen;

  // testbench End-of-Column: freeze, 2 cycles, then 4 on / 3 off per word
  task automatic eoc_round();
    @(negedge clk) freeze = 1'b1;
    repeat (2) @(negedge clk);
    do begin
      logic [31:0] w;
      slot_starts.push_back(cyc);
      wen = 1'b1;
      for (int c = 0; c < 4; c++) begin
        @(posedge clk);
        if (c == 0) w = data_c[3];
        if (tok_c[3]) `TB_CHECK(data_c[3] == w, "word held for 4 cycles")
        if (c == 3 && tok_c[3]) words.push_back(data_c[3]);
        @(negedge clk);
      end
      wen = 1'b0;
      repeat (3) begin
        @(posedge clk);
        `TB_CHECK(!tok_c[3] && data_c[3] == IDLE_WORD, "idle bus between words")
        @(negedge clk);
      end
    end while (req_c[3]);
    freeze = 1'b0;
  endtask

  task automatic push(input int k, input logic [1:0] t, input logic [14:0] c, input logic [8:0] f);
    @(negedge clk);
    ev_valid[k] = 1'b1; ev_tdc[k] = t; ev_coarse[k] = c; ev_fine[k] = f;
    @(negedge clk);
    ev_valid[k] = 1'b0;
  endtask

  function automatic logic [31:0] w(int pix, int t, int c, int f);
    return {3'd5, 3'(pix), 2'(t), 15'(c), 9'(f)};
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    `TB_DONE
  end

  initial begin
    foreach (ev_tdc[k]) begin ev_tdc[k] = 0; ev_coarse[k] = 0; ev_fine[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    `TB_CHECK(!req_c[3] && data_c[3] == IDLE_WORD && !tok_c[3], "quiet column at start")
    push(0, 1, 15'h1234, 9'h0AB);
    push(0, 3, 15'h7FFF, 9'h1FF);
    push(1, 2, 15'h0001, 9'h000);
    push(2, 0, 15'h4000, 9'h100);
    push(2, 1, 15'h2AAA, 9'h055);
    @(negedge clk);
    `TB_CHECK(req_c[3], "request reaches the EoC")
    eoc_round();
    `TB_CHECK(words.size() == 3, $sformatf("round 1: %0d words", words.size()))
    if (words.size() == 3) begin
      `TB_CHECK(words[0] == w(2, 0, 15'h4000, 9'h100), $sformatf("round 1 word 0 %08x", words[0]))
      `TB_CHECK(words[1] == w(1, 2, 15'h0001, 9'h000), $sformatf("round 1 word 1 %08x", words[1]))
      `TB_CHECK(words[2] == w(0, 1, 15'h1234, 9'h0AB), $sformatf("round 1 word 2 %08x", words[2]))
    end
    `TB_CHECK(slot_starts.size() == 3 && slot_starts[1] - slot_starts[0] == 7 &&
              slot_starts[2] - slot_starts[1] == 7, "one word per 7 cycles")
    words.delete();
    repeat (3) @(negedge clk);
    `TB_CHECK(req_c[3], "request again for the remaining words")
    eoc_round();
    `TB_CHECK(words.size() == 2, $sformatf("round 2: %0d words", words.size()))
    if (words.size() == 2) begin
      `TB_CHECK(words[0] == w(2, 1, 15'h2AAA, 9'h055), "round 2 word 0")
      `TB_CHECK(words[1] == w(0, 3, 15'h7FFF, 9'h1FF), "round 2 word 1")
    end
    repeat (3) @(negedge clk);
    `TB_CHECK(!req_c[3], "column empty")
    // back-pressure: pixel 1 accepts exactly 4 words
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      `TB_CHECK(ev_ready[1] == (i < 4), $sformatf("ev_ready with %0d words", i))
      ev_valid[1] = 1'b1; ev_tdc[1] = 2'(i); ev_coarse[1] = 15'(i); ev_fine[1] = 9'(i);
    end
    @(negedge clk) ev_valid[1] = 1'b0;
    words.delete();
    eoc_round();
    eoc_round();
    eoc_round();
    eoc_round();
    `TB_CHECK(words.size() == 4, "four buffered words")
    foreach (words[i]) `TB_CHECK(words[i] == w(1, i, i, i), "buffered word order")
    `TB_DONE
  end
endmodule
