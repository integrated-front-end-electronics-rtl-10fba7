// coarse_counter: the pixel's 15-bit coarse time counter.
//
// Counts system clock periods, so its bin equals the clock period (3.125 ns
// at 320 MHz). It wraps modulo 2^WIDTH; the EoC closes one readout frame per
// wrap, so the frame number extends the time range. Reset to zero is this
// implementation's choice.
module coarse_counter #(
  parameter int unsigned WIDTH = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] count_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count_o <= '0;
    else        count_o <= count_o + 1'b1;
  end

endmodule
