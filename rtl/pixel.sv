// pixel: digital part of one ALCOR pixel with its four TDC models.
//
// The two discriminator outputs of the analogue front end (trig1, trig2)
// enter here; the configuration picks one of them as the trigger. In
// single-photon mode all four TDCs start on its rising edge; in
// Time-over-Threshold mode the odd TDCs start on its falling edge. tdc_ctrl
// arms the TDCs and counts their run-down into fine times, the on-pixel
// 15-bit coarse counter gives the coarse time, and pixel_data_ctrl turns
// results into event words and handles the column daisy chain. The
// configuration register sits in the configuration chain. The analogue TDCs
// are behavioural models (tdc_analog), so this module simulates but is not
// synthesizable as a whole. Structure after the pixel block diagram of the
// design description; trigger selection is this implementation's choice.
module pixel
  import alcor_pkg::*;
#(
  parameter logic [COL_W-1:0] COL_ID = '0,
  parameter logic [PIX_W-1:0] PIX_ID = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trig1,
  input  logic              trig2,
  output logic              fe_enable,
  // configuration chain
  input  logic              cfg_shift,
  input  logic              cfg_update,
  input  logic              cfg_in,
  output logic              cfg_out,
  // column daisy chain
  input  logic              req_up,
  output logic              req_dn,
  input  logic              freeze,
  input  logic              wen_dn,
  output logic              wen_up,
  input  logic              tok_up,
  output logic              tok_dn,
  input  logic [WORD_W-1:0] data_up,
  output logic [WORD_W-1:0] data_dn
);

  pixel_cfg_t          cfg;
  logic                trig;
  logic [N_TDC-1:0]    arm, clr, hit, rundown, start;
  logic [COARSE_W-1:0] coarse;
  logic                ev_valid, ev_ready;
  logic [TDC_W-1:0]    ev_tdc;
  logic [COARSE_W-1:0] ev_coarse;
  logic [FINE_W-1:0]   ev_fine;

  pixel_config u_cfg (
    .clk, .rst_n, .shift(cfg_shift), .update(cfg_update),
    .cfg_in, .cfg_out, .cfg
  );
  assign fe_enable = cfg.fe_enable;

  assign trig = cfg.trig_sel ? trig2 : trig1;

  for (genvar i = 0; i < N_TDC; i++) begin : g_tdc
    assign start[i] = (cfg.tot_mode && (i % 2 == 1)) ? !trig : trig;
    tdc_analog u_tdc (
      .clk, .arm(arm[i]), .start(start[i]), .clr(clr[i]),
      .hit(hit[i]), .rundown(rundown[i])
    );
  end

  coarse_counter #(.WIDTH(COARSE_W)) u_coarse (.clk, .rst_n, .count_o(coarse));

  tdc_ctrl u_ctrl (
    .clk, .rst_n, .enable(cfg.enable), .tot_mode(cfg.tot_mode),
    .tdc_mask(cfg.tdc_mask), .coarse, .hit, .rundown, .arm, .clr,
    .ev_valid, .ev_ready, .ev_tdc, .ev_coarse, .ev_fine
  );

  pixel_data_ctrl #(.COL_ID(COL_ID), .PIX_ID(PIX_ID)) u_data (
    .clk, .rst_n, .ev_valid, .ev_ready, .ev_tdc, .ev_coarse, .ev_fine,
    .req_up, .req_dn, .freeze, .wen_dn, .wen_up, .tok_up, .tok_dn,
    .data_up, .data_dn
  );

endmodule
