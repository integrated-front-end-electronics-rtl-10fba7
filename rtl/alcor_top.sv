// alcor_top: 32-pixel SiPM time-stamping readout, digital part.
//
// N_COL columns of N_PIX pixels (8 x 4). Each pixel time-stamps the
// discriminator edges of its SiPM channel with a 15-bit coarse counter and a
// 9-bit TDC fine time, and queues 32-bit event words. Each column is a daisy
// chain read by the End-of-Column (EoC) in three layers:
//   1. per column: handshake controller (one word per 7 cycles), a 16 x 32
//      FIFO and a framer that wraps each time window's words into a frame
//      with header, frame number, status and CRC-32;
//   2. per column pair: merge into a 32 x 33 FIFO;
//   3. per pair: 8b/10b serialiser, two bits per clock for a DDR LVDS link.
// The time window is one period of the coarse counter (2^15 cycles), kept by
// the EoC's own copy of the counter; all counters start together at reset.
// Configuration arrives over SPI and is shifted through one chain that runs
// up column 0, then up column 1, and so on; miso returns the chain's end.
// The analogue front ends, TDC interpolators (behavioural models here), DDR
// output cells and LVDS drivers are not part of the logic: trig1/trig2 come
// from the discriminators, fe_enable goes back to the front ends, and ddr
// goes to the output drivers. Pixel p of column c uses index c*N_PIX + p,
// pixel 0 being the top of the column.
module alcor_top
  import alcor_pkg::*;
#(
  parameter int unsigned N_COL  = 8,
  parameter int unsigned N_PIX  = 4,
  localparam int unsigned N_LINK = N_COL / 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_COL*N_PIX-1:0] trig1,
  input  logic [N_COL*N_PIX-1:0] trig2,
  output logic [N_COL*N_PIX-1:0] fe_enable,
  input  logic                   spi_sclk,
  input  logic                   spi_cs_n,
  input  logic                   spi_mosi,
  output logic                   spi_miso,
  output logic [1:0]             ddr [N_LINK]
);

  localparam int unsigned LW1 = $clog2(16 + 1);

  logic                cfg_shift, cfg_update, cfg_bit;
  logic                cfg_chain [N_COL+1];
  logic [COARSE_W-1:0] eoc_time;
  logic                frame_tick;

  logic              col_req   [N_COL];
  logic              col_freeze[N_COL];
  logic              col_wen   [N_COL];
  logic              col_tok   [N_COL];
  logic [WORD_W-1:0] col_data  [N_COL];
  logic              f_wr      [N_COL];
  logic [WORD_W-1:0] f_wdata   [N_COL];
  logic              f_full    [N_COL];
  logic              f_empty   [N_COL];
  logic              f_rd      [N_COL];
  logic [WORD_W-1:0] f_rdata   [N_COL];
  logic [LW1-1:0]    f_level   [N_COL];
  logic              fr_valid  [N_COL];
  logic              fr_ready  [N_COL];
  logic [WORD_W:0]   fr_data   [N_COL];
  logic              fr_hold   [N_COL];

  spi_config u_spi (
    .clk, .rst_n, .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi),
    .miso(spi_miso), .chain_out(cfg_chain[N_COL]),
    .shift(cfg_shift), .update(cfg_update), .cfg_bit
  );
  assign cfg_chain[0] = cfg_bit;

  coarse_counter #(.WIDTH(COARSE_W)) u_eoc_time (.clk, .rst_n, .count_o(eoc_time));
  assign frame_tick = &eoc_time;

  for (genvar c = 0; c < N_COL; c++) begin : g_col
    column #(.N_PIX(N_PIX), .COL_ID(COL_W'(c))) u_col (
      .clk, .rst_n,
      .trig1(trig1[c*N_PIX +: N_PIX]), .trig2(trig2[c*N_PIX +: N_PIX]),
      .fe_enable(fe_enable[c*N_PIX +: N_PIX]),
      .cfg_shift, .cfg_update, .cfg_in(cfg_chain[c]), .cfg_out(cfg_chain[c+1]),
      .req(col_req[c]), .freeze(col_freeze[c]), .wen(col_wen[c]),
      .tok(col_tok[c]), .data(col_data[c])
    );

    eoc_col_ctrl u_ctrl (
      .clk, .rst_n, .req(col_req[c]), .freeze(col_freeze[c]),
      .wen(col_wen[c]), .tok(col_tok[c]), .data(col_data[c]),
      .fifo_full(f_full[c]), .wr_en(f_wr[c]), .wr_data(f_wdata[c])
    );

    sync_fifo #(.WIDTH(WORD_W), .DEPTH(16)) u_fifo (
      .clk, .rst_n, .wr_en(f_wr[c]), .wr_data(f_wdata[c]),
      .rd_en(f_rd[c]), .rd_data(f_rdata[c]),
      .full(f_full[c]), .empty(f_empty[c]), .level(f_level[c])
    );

    eoc_framer #(.COL_ID(COL_W'(c)), .FIFO_DEPTH(16)) u_framer (
      .clk, .rst_n, .frame_tick,
      .fifo_empty(f_empty[c]), .fifo_data(f_rdata[c]), .fifo_level(f_level[c]),
      .fifo_rd(f_rd[c]),
      .out_valid(fr_valid[c]), .out_ready(fr_ready[c]),
      .out_data(fr_data[c]), .out_hold(fr_hold[c])
    );
  end

  for (genvar l = 0; l < N_LINK; l++) begin : g_link
    logic [WORD_W:0] m_data;
    logic            m_empty, m_rd;
    logic [1:0]      in_ready;
    logic [WORD_W:0] in_data [2];

    assign in_data[0]         = fr_data[2*l];
    assign in_data[1]         = fr_data[2*l+1];
    assign fr_ready[2*l]      = in_ready[0];
    assign fr_ready[2*l+1]    = in_ready[1];

    eoc_merge u_merge (
      .clk, .rst_n,
      .in_valid({fr_valid[2*l+1], fr_valid[2*l]}), .in_ready,
      .in_data, .in_hold({fr_hold[2*l+1], fr_hold[2*l]}),
      .rd_en(m_rd), .rd_data(m_data), .empty(m_empty)
    );

    serializer u_ser (
      .clk, .rst_n, .fifo_empty(m_empty), .fifo_data(m_data),
      .fifo_rd(m_rd), .ddr_o(ddr[l])
    );
  end

endmodule
