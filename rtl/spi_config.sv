// spi_config: SPI slave that loads the pixel configuration chains.
//
// SPI mode 0: the master changes mosi while sclk is low and the slave takes
// it on the rising edge of sclk, while cs_n is low. sclk, cs_n and mosi are
// brought into the system clock domain with sync_cell, so sclk must stay high
// and low for at least 3 system clock cycles each. Each rising sclk edge
// gives a one-cycle shift pulse with cfg_bit = mosi; the rising edge of cs_n
// gives an update pulse that makes the shifted configuration active. miso
// returns the end of the configuration chain (chain_out), so what was shifted
// in can be read back; miso is a plain wire from chain_out. The design description states only that the chip is
// configured over SPI; there is no command or address layer here: the bits
// of one transfer go straight into the chain.
module spi_config (
  input  logic clk,
  input  logic rst_n,
  input  logic sclk,
  input  logic cs_n,
  input  logic mosi,
  output logic miso,
  input  logic chain_out,
  output logic shift,
  output logic update,
  output logic cfg_bit
);

  logic sclk_s, cs_s, mosi_s, sclk_q, cs_q;

  sync_cell u_s_sclk (.clk, .rst_n, .async_i(sclk), .sync_o(sclk_s));
  sync_cell u_s_csn  (.clk, .rst_n, .async_i(!cs_n), .sync_o(cs_s));
  sync_cell u_s_mosi (.clk, .rst_n, .async_i(mosi), .sync_o(mosi_s));

  // cs_s is the synchronised chip-select, active high
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_q <= 1'b0;
      cs_q <= 1'b0;
    end else begin
      sclk_q <= sclk_s;
      cs_q <= cs_s;
    end
  end

  assign shift   = cs_s && sclk_s && !sclk_q;
  assign update  = cs_q && !cs_s;
  assign cfg_bit = mosi_s;
  assign miso    = chain_out;

endmodule
