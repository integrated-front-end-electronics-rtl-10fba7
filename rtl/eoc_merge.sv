// eoc_merge: second EoC layer for a pair of columns.
//
// Two framers (one per column) offer 33-bit words; the merge takes one word
// per cycle into a 32 x 33 FIFO, alternating between the two columns word by
// word. While a framer sends a control-word burst (out_hold high) the merge
// stays with it until the burst's last word, so frame boundaries are never
// interleaved. Every word stays self-describing: data words carry their
// column number, control words carry it in HEADER and STATUS. The serialiser
// reads the FIFO side (first-word fall-through). The FIFO size follows the
// design description; the arbitration is this implementation's choice.
module eoc_merge
  import alcor_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = WORD_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       in_valid,
  output logic [1:0]       in_ready,
  input  logic [WIDTH-1:0] in_data [2],
  input  logic [1:0]       in_hold,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  logic last, lock, sel, full, xfer;

  always_comb begin
    if (lock)                sel = last;
    else if (in_valid[!last]) sel = !last;
    else                     sel = last;
  end

  assign in_ready = full ? 2'b00 : (sel ? 2'b10 : 2'b01);
  assign xfer     = in_valid[sel] && !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last <= 1'b1;
      lock <= 1'b0;
    end else if (xfer) begin
      last <= sel;
      lock <= in_hold[sel];
    end
  end

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(xfer), .wr_data(in_data[sel]),
    .rd_en, .rd_data, .full, .empty, .level()
  );

endmodule
