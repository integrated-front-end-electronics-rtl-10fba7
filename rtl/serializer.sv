// serializer: 8b/10b serialiser for one output link.
//
// Reads 33-bit words from the second-layer FIFO and sends each as 8b/10b
// symbols, most significant byte first; a control word (bit 32 set) is
// preceded by a K28.1 symbol so the receiver can tell frame words from
// event words. With nothing to send the link carries K28.5 commas. Symbols
// leave two bits per clock cycle on ddr_o: ddr_o[1] is meant for the high
// clock phase and ddr_o[0] for the low phase of a double-data-rate output
// cell, so a 10-bit symbol takes 5 cycles and the link rate is twice the
// clock (640 Mb/s at 320 MHz). Bit a of each symbol goes first. The 8b/10b
// code and the double-data-rate 640 Mb/s link follow the design
// description; byte order and the use of K28.1 / K28.5 are this
// implementation's choices. The DDR output cell and LVDS driver are outside.
module serializer
  import alcor_pkg::*;
#(
  parameter int unsigned WIDTH = WORD_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fifo_empty,
  input  logic [WIDTH-1:0] fifo_data,
  output logic             fifo_rd,
  output logic [1:0]       ddr_o
);

  logic [WIDTH-1:0] word_q;
  logic [2:0]       idx, bitc;
  logic             busy, load, sym_k;
  logic [7:0]       sym_d;
  logic [9:0]       shreg, code;

  // symbol idx of word w: optional K28.1, then bytes MSB first
  function automatic logic [8:0] symbol(input logic [WIDTH-1:0] w,
                                        input logic [2:0] i);
    logic [2:0] b;
    if (w[WIDTH-1] && i == 3'd0) return {1'b1, K28_1};
    b = w[WIDTH-1] ? i - 3'd1 : i;
    return {1'b0, w[(3 - b) * 8 +: 8]};
  endfunction

  function automatic logic [2:0] n_symbols(input logic [WIDTH-1:0] w);
    return w[WIDTH-1] ? 3'd5 : 3'd4;
  endfunction

  assign load    = (bitc == 3'd4);
  assign fifo_rd = load && !busy && !fifo_empty;

  always_comb begin
    if (busy)             {sym_k, sym_d} = symbol(word_q, idx);
    else if (!fifo_empty) {sym_k, sym_d} = symbol(fifo_data, 3'd0);
    else                  {sym_k, sym_d} = {1'b1, K28_5};
  end

  enc8b10b u_enc (.clk, .rst_n, .en(load), .k(sym_k), .d(sym_d), .q(code));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q <= '0;
      idx    <= '0;
      bitc   <= 3'd4;
      busy   <= 1'b0;
      shreg  <= '0;
    end else if (load) begin
      bitc  <= '0;
      shreg <= code;
      if (busy) begin
        idx <= idx + 1'b1;
        if (idx + 3'd1 == n_symbols(word_q)) busy <= 1'b0;
      end else if (!fifo_empty) begin
        word_q <= fifo_data;
        idx    <= 3'd1;
        busy   <= 1'b1;
      end
    end else begin
      bitc  <= bitc + 1'b1;
      shreg <= {shreg[7:0], 2'b00};
    end
  end

  assign ddr_o = shreg[9:8];

endmodule
