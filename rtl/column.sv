// column: one column of the pixel matrix, N_PIX pixels in a daisy chain.
//
// Pixel 0 is the top of the column and pixel N_PIX-1 sits next to the
// End-of-Column (EoC). Write request, pixel write enable (tok) and data flow
// down towards the EoC; the EoC's write enable flows up, so the pixel nearest
// the EoC has priority. The top pixel's data input carries the idle word.
// The configuration chain enters at the bottom pixel and leaves at the top.
// Four pixels per column follow the 4 x 8 matrix of the design description.
module column
  import alcor_pkg::*;
#(
  parameter int unsigned      N_PIX  = 4,
  parameter logic [COL_W-1:0] COL_ID = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_PIX-1:0]  trig1,
  input  logic [N_PIX-1:0]  trig2,
  output logic [N_PIX-1:0]  fe_enable,
  input  logic              cfg_shift,
  input  logic              cfg_update,
  input  logic              cfg_in,
  output logic              cfg_out,
  output logic              req,
  input  logic              freeze,
  input  logic              wen,
  output logic              tok,
  output logic [WORD_W-1:0] data
);

  // index k: signals entering pixel k from above (k = 0: column top)
  logic              req_c [N_PIX+1];
  logic              tok_c [N_PIX+1];
  logic [WORD_W-1:0] data_c[N_PIX+1];
  // index k: write enable / config entering pixel k from below
  logic              wen_c [N_PIX+1];
  logic              cfg_c [N_PIX+1];

  assign req_c[0]     = 1'b0;
  assign tok_c[0]     = 1'b0;
  assign data_c[0]    = IDLE_WORD;
  assign wen_c[N_PIX] = wen;
  assign cfg_c[N_PIX] = cfg_in;

  for (genvar k = 0; k < N_PIX; k++) begin : g_pix
    pixel #(.COL_ID(COL_ID), .PIX_ID(PIX_W'(k))) u_pix (
      .clk, .rst_n, .trig1(trig1[k]), .trig2(trig2[k]), .fe_enable(fe_enable[k]),
      .cfg_shift, .cfg_update, .cfg_in(cfg_c[k+1]), .cfg_out(cfg_c[k]),
      .req_up(req_c[k]), .req_dn(req_c[k+1]), .freeze,
      .wen_dn(wen_c[k+1]), .wen_up(wen_c[k]),
      .tok_up(tok_c[k]), .tok_dn(tok_c[k+1]),
      .data_up(data_c[k]), .data_dn(data_c[k+1])
    );
  end

  assign req     = req_c[N_PIX];
  assign tok     = tok_c[N_PIX];
  assign data    = data_c[N_PIX];
  assign cfg_out = cfg_c[0];

endmodule
