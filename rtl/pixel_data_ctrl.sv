// pixel_data_ctrl: event word builder, pixel FIFO and column daisy-chain
// interface of one pixel.
//
// Every TDC result becomes a 32-bit event word {column, pixel, TDC, coarse,
// fine} and is queued in a 4-deep FIFO. While the FIFO is full the TDC
// result waits (ev_ready low), which keeps that TDC busy.
//
// Column protocol (all pixels of a column and the EoC share the clock):
//  * req_dn = own request OR req_up; the EoC sees the OR of the column.
//  * When the EoC raises freeze, the pixel latches whether it holds a word
//    ("selected"). While freeze stays high only selected pixels request, and
//    each sends exactly one word in this round.
//  * The EoC's write enable enters at the bottom of the column and travels
//    up (wen_dn -> wen_up). A selected pixel keeps it, so the selected pixel
//    nearest the EoC writes first.
//  * The writing pixel drives its word on data_dn for WORD_CYCLES cycles and
//    raises its pixel write enable, which travels down (tok_up -> tok_dn) so
//    the EoC knows a word is on the bus. Other pixels pass data_up through;
//    the top pixel's data_up is tied to the idle word 32'h1FFFFFFF.
//  * On the last cycle of its slot the pixel pops its FIFO and leaves the
//    round, dropping its request.
// The word format, the idle value, the 4-cycle hold, the depth-4 FIFO and the
// priority to the pixel nearest the EoC follow the design description; the
// selection latch and the signal wiring are this implementation's own.
module pixel_data_ctrl
  import alcor_pkg::*;
#(
  parameter logic [COL_W-1:0] COL_ID      = '0,
  parameter logic [PIX_W-1:0] PIX_ID      = '0,
  parameter int unsigned      FIFO_DEPTH  = 4,
  parameter int unsigned      WORD_CYCLES = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // from tdc_ctrl
  input  logic                ev_valid,
  output logic                ev_ready,
  input  logic [TDC_W-1:0]    ev_tdc,
  input  logic [COARSE_W-1:0] ev_coarse,
  input  logic [FINE_W-1:0]   ev_fine,
  // column daisy chain
  input  logic                req_up,
  output logic                req_dn,
  input  logic                freeze,
  input  logic                wen_dn,
  output logic                wen_up,
  input  logic                tok_up,
  output logic                tok_dn,
  input  logic [WORD_W-1:0]   data_up,
  output logic [WORD_W-1:0]   data_dn
);

  localparam int unsigned CW = $clog2(WORD_CYCLES + 1);

  event_word_t          wr_word;
  logic [WORD_W-1:0]    head;
  logic                 full, empty, pop;
  logic                 freeze_q, selected, own_wr, own_req;
  logic [CW-1:0]        cnt;

  assign wr_word  = '{col: COL_ID, pix: PIX_ID, tdc: ev_tdc,
                      coarse: ev_coarse, fine: ev_fine};
  assign ev_ready = !full;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(ev_valid && ev_ready), .wr_data(wr_word),
    .rd_en(pop), .rd_data(head),
    .full, .empty, .level()
  );

  assign own_req = (freeze && freeze_q) ? selected : !empty;
  assign req_dn  = own_req || req_up;
  assign own_wr  = selected && wen_dn;
  assign wen_up  = wen_dn && !selected;
  assign tok_dn  = tok_up || own_wr;
  assign data_dn = own_wr ? head : data_up;
  assign pop     = own_wr && (cnt == CW'(WORD_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      freeze_q <= 1'b0;
      selected <= 1'b0;
      cnt      <= '0;
    end else begin
      freeze_q <= freeze;
      if (freeze && !freeze_q) selected <= !empty;
      else if (pop || !freeze) selected <= 1'b0;
      if (pop || !own_wr) cnt <= '0;
      else                cnt <= cnt + 1'b1;
    end
  end

  // a word is only driven when the pixel holds one
  assert property (@(posedge clk) disable iff (!rst_n) own_wr |-> !empty);
  // the write enable only arrives inside a freeze round
  assert property (@(posedge clk) disable iff (!rst_n) wen_dn |-> freeze);

endmodule
