// pixel_config: configuration register of one pixel, part of a daisy chain.
//
// The chain runs up the column: bits enter at cfg_in from the pixel below,
// move one place per clock while shift is high, and leave at cfg_out towards
// the pixel above. The shift register is CFG_W bits long, the most
// significant bit leaving first. A pulse on update copies the shift register
// into the active register cfg, so the pixel keeps working with its old
// setting while a new one is shifted in. The chain direction follows the
// design description; the register length, field layout (see alcor_pkg) and
// reset value are this implementation's choices.
module pixel_config
  import alcor_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       shift,
  input  logic       update,
  input  logic       cfg_in,
  output logic       cfg_out,
  output pixel_cfg_t cfg
);

  logic [CFG_W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= CFG_RESET;
      cfg <= CFG_RESET;
    end else begin
      if (shift)  sr  <= {sr[CFG_W-2:0], cfg_in};
      if (update) cfg <= sr;
    end
  end

  assign cfg_out = sr[CFG_W-1];

endmodule
