// tb_serializer: feeds words to the serialiser from a queue standing in for
// the second-layer FIFO and rebuilds the symbol stream from the two bits
// per cycle. The stream is aligned on the first K28.5 comma and compared
// symbol by symbol with a reference built from the expected sequence:
// idle commas between words, K28.1 before control words, bytes MSB first.
// The reference uses its own encoder instance only to follow the running
// disparity. Also checks the rate: 10 bits per 5 clock cycles.
`include "tb_util.svh"
module tb_serializer;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, rd;
  logic [1:0] ddr;
  logic [32:0] q[$], words[$];
  logic empty;
  logic [32:0] head;
  bit bits[$];
  int cycles = 0;

  always #1 clk = ~clk;
  initial #0.2 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  assign empty = q.size() == 0;
  assign head  = q.size() > 0 ? q[0] : '0;
  serializer dut (.clk, .rst_n, .fifo_empty(empty), .fifo_data(head), .fifo_rd(rd), .ddr_o(ddr));
  always @(posedge clk) begin
    bit x;
    x = rd;
    if (rst_n) begin bits.push_back(ddr[1]); bits.push_back(ddr[0]); cycles++; end
    #0.1 if (x) void'(q.pop_front());
  end

  // reference encoder, driven by the checker below
  logic rk = 1'b0, ren = 1'b0, rclk = 1'b0;
  logic [7:0] rdd = '0;
  logic [9:0] rq;
  enc8b10b u_ref (.clk(rclk), .rst_n, .en(ren), .k(rk), .d(rdd), .q(rq));

  function automatic logic [9:0] sym_at(int i);
    logic [9:0] s;
    for (int b = 0; b < 10; b++) s[9 - b] = bits[i + b];
    return s;
  endfunction

  // code of (k, d) at the reference's current disparity; commit advances it
  task automatic code_of(input logic k, input logic [7:0] d, output logic [9:0] c);
    rk = k; rdd = d; #0.01; c = rq;
  endtask
  task automatic commit();
    ren = 1'b1; #0.01 rclk = 1'b1; #0.01 rclk = 1'b0; ren = 1'b0; #0.01;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    `TB_DONE
  end

  initial begin
    int p, idles, nsym;
    logic [9:0] c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (40) @(negedge clk);
    for (int i = 0; i < 30; i++) begin
      logic [32:0] w = {1'($urandom % 4 == 0), 32'($urandom)};
      words.push_back(w);
      q.push_back(w);
      if (i % 7 == 6) repeat (300) @(negedge clk);
    end
    wait (q.size() == 0);
    repeat (100) @(negedge clk);
    // align on the first comma (K28.5 with negative disparity)
    p = -1;
    for (int i = 0; i + 10 <= bits.size(); i++)
      if (sym_at(i) == 10'b0011111010) begin p = i; break; end
    `TB_CHECK(p >= 0 && p < 10, "comma found at the start")
    idles = 0; nsym = 0;
    foreach (words[wi]) begin
      forever begin
        code_of(1'b1, K28_5, c);
        if (sym_at(p) != c) break;
        commit(); idles++; p += 10;
      end
      if (words[wi][32]) begin
        code_of(1'b1, K28_1, c);
        `TB_CHECK(sym_at(p) == c, $sformatf("K28.1 before control word %0d", wi))
        commit(); p += 10;
      end
      for (int b = 3; b >= 0; b--) begin
        code_of(1'b0, words[wi][b*8 +: 8], c);
        `TB_CHECK(sym_at(p) == c, $sformatf("word %0d byte %0d", wi, b))
        commit(); p += 10; nsym++;
      end
    end
    `TB_CHECK(nsym == 120, "all bytes")
    // rate: every cycle carries two bits, so symbols = cycles * 2 / 10
    `TB_CHECK(bits.size() == 2 * cycles, "two bits per cycle")
    `TB_CHECK(idles > 5, $sformatf("%0d idle commas", idles))
    `TB_DONE
  end
endmodule
