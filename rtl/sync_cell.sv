// sync_cell: synchroniser for the pixel/EoC handshake signals.
//
// The asynchronous input is first sampled on the falling clock edge and then
// passed through STAGES flops on the rising edge. An input that changes just
// before a falling edge appears at the output 1.5 clock periods later; one
// that changes just after a falling edge waits for the next falling edge and
// appears 2.5 periods later. That 1.5 to 2.5 period window is the behaviour
// the design description gives for its synchronisation module; the flop
// arrangement that produces it is this implementation's reading.
//
// Interface: clk, active-low asynchronous reset rst_n, async_i in, sync_o out.
module sync_cell #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic async_i,
  output logic sync_o
);

  logic              neg_q;
  logic [STAGES-1:0] pos_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) neg_q <= 1'b0;
    else        neg_q <= async_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pos_q <= '0;
    else        pos_q <= {pos_q[STAGES-2:0], neg_q};
  end

  assign sync_o = pos_q[STAGES-1];

endmodule
