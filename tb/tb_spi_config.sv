// tb_spi_config: SPI mode-0 master in the testbench, slow sclk (16 system
// clocks per bit). Checks one shift pulse per sclk rising edge with cs_n
// low, carrying the mosi bit, none with cs_n high, exactly one update pulse
// at the end of the transfer, and miso following the chain end.
`include "tb_util.svh"
module tb_spi_config;
  timeunit 1ns; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, chain = 1'b0;
  logic miso, shift, update, cfg_bit;
  bit got[$];
  int n_upd = 0;
  logic [39:0] pattern = 40'hA5_3C_0F_F0_96;

  always #1 clk = ~clk;
  initial #0.2 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  spi_config dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .chain_out(chain),
                  .shift, .update, .cfg_bit);
  always @(posedge clk) begin
    if (shift) got.push_back(cfg_bit);
    if (update) n_upd++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    `TB_DONE
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // clock pulses with cs_n high are ignored
    repeat (3) begin #16 sclk = 1'b1; #16 sclk = 1'b0; end
    #20 cs_n = 1'b0;
    for (int b = 39; b >= 0; b--) begin
      mosi = pattern[b];
      #16 sclk = 1'b1;
      #16 sclk = 1'b0;
    end
    #20 cs_n = 1'b1;
    #40;
    `TB_CHECK(got.size() == 40, $sformatf("%0d shift pulses", got.size()))
    foreach (got[i]) `TB_CHECK(got[i] == pattern[39 - i], "shifted bit")
    `TB_CHECK(n_upd == 1, $sformatf("%0d update pulses", n_upd))
    chain = 1'b1; #1 `TB_CHECK(miso == 1'b1, "miso follows chain end")
    chain = 1'b0; #1 `TB_CHECK(miso == 1'b0, "miso follows chain end")
    `TB_DONE
  end
endmodule
