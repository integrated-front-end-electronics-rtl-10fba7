// tb_tdc_ctrl: TDC control with four TDC models. Checks, against times
// worked out from the trigger and clock waveforms:
//  * single-photon mode: successive triggers go to TDCs 0,1,2,3 in turn, a
//    fifth trigger while all four are busy is lost, fine and coarse times;
//  * the TDC mask: only enabled TDCs take triggers;
//  * ToT mode: one pulse gives a leading-edge result on an even TDC and a
//    trailing-edge result on the next odd TDC;
//  * the result port under random back-pressure (ev_ready).
`include "tb_util.svh"
module tb_tdc_ctrl;
  import alcor_pkg::*;
  timeunit 1ns; timeprecision 1fs;
  `include "tb_tdc_model.svh"
  localparam realtime T = 3.125;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, enable = 1'b1, tot = 1'b0, trig = 1'b0;
  logic [3:0] mask = 4'hF, arm, clr, hit, rundown, start;
  logic [14:0] coarse = '0;
  logic ev_valid, ev_ready = 1'b0;
  logic [1:0] ev_tdc;
  logic [14:0] ev_coarse;
  logic [8:0] ev_fine;
  typedef struct { int tdc; int coarse; int fine; } res_t;
  res_t got[$], exp_q[$];
  int n_lost_expected = 0;

  always #(T/2) clk = ~clk;
  initial #0.2 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  always @(posedge clk) coarse <= coarse + 1'b1;   // edge n (n >= 1) leaves value n

  for (genvar i = 0; i < 4; i++) begin : g_tdc
    assign start[i] = (tot && i % 2 == 1) ? !trig : trig;
    tdc_analog u_tdc (.clk, .arm(arm[i]), .start(start[i]), .clr(clr[i]),
                      .hit(hit[i]), .rundown(rundown[i]));
  end

  tdc_ctrl dut (.clk, .rst_n, .enable, .tot_mode(tot), .tdc_mask(mask), .coarse,
                .hit, .rundown, .arm, .clr, .ev_valid, .ev_ready, .ev_tdc,
                .ev_coarse, .ev_fine);

  always @(negedge clk) ev_ready <= ($urandom % 2) == 0;
  always @(posedge clk) if (ev_valid && ev_ready)
    got.push_back('{tdc: ev_tdc, coarse: ev_coarse, fine: ev_fine});

  function automatic int coarse_at(realtime t);
    realtime s = stop_edge(t, T);
    return ($rtoi((s - T/2) / T + 0.5) + 1) % 32768;
  endfunction

  // pulse at a random phase of the next cycle; returns the edge time
  task automatic pulse(input realtime width, output realtime t_rise, output realtime t_fall);
    @(posedge clk);
    #(0.07 + ($urandom % 2900) / 1000.0);
    trig = 1'b1; t_rise = $realtime;
    #(width);
    trig = 1'b0; t_fall = $realtime;
  endtask

  task automatic compare(input string phase);
    `TB_CHECK(got.size() == exp_q.size(), $sformatf("%s: %0d results, expected %0d", phase, got.size(), exp_q.size()))
    foreach (exp_q[i]) begin
      int hitidx = -1;
      foreach (got[j]) if ((exp_q[i].tdc < 0 || got[j].tdc == exp_q[i].tdc) && got[j].coarse == exp_q[i].coarse &&
                           got[j].fine == exp_q[i].fine) hitidx = j;
      `TB_CHECK(hitidx >= 0, $sformatf("%s: missing tdc %0d coarse %0d fine %0d", phase,
                exp_q[i].tdc, exp_q[i].coarse, exp_q[i].fine))
      if (hitidx >= 0) got.delete(hitidx);
      else foreach (got[j]) $display("  got tdc %0d coarse %0d fine %0d", got[j].tdc, got[j].coarse, got[j].fine);
    end
    got.delete(); exp_q.delete();
  endtask

  initial begin
    #200us;
    failures++;
    `TB_DONE
  end

  initial begin
    realtime tr, tf;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    // single-photon mode: 5 triggers 8 cycles apart
    for (int k = 0; k < 5; k++) begin
      pulse(1.0, tr, tf);
      if (k < 4) exp_q.push_back('{tdc: k, coarse: coarse_at(tr), fine: fine_bins(tr, T)});
      repeat (7) @(posedge clk);
    end
    repeat (300) @(posedge clk);
    compare("single-photon");
    // next trigger after all are free again: whichever TDC the pointer
    // settled on (the first one freed)
    pulse(1.0, tr, tf);
    exp_q.push_back('{tdc: -1, coarse: coarse_at(tr), fine: fine_bins(tr, T)});
    repeat (300) @(posedge clk);
    compare("wrap");
    // mask: only TDCs 0 and 2
    mask = 4'b0101;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      pulse(1.0, tr, tf);
      if (k < 2) exp_q.push_back('{tdc: -1, coarse: coarse_at(tr), fine: fine_bins(tr, T)});
      repeat (7) @(posedge clk);
    end
    repeat (300) @(posedge clk);
    `TB_CHECK(got.size() == 2 && got[0].tdc != got[1].tdc && got[0].tdc % 2 == 0 &&
              got[1].tdc % 2 == 0, "mask: two different enabled TDCs")
    compare("mask");
    // ToT mode, all TDCs: pairs {0,1} then {2,3}
    mask = 4'hF; tot = 1'b1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 2; k++) begin
      pulse(10.0 + k * 7.3, tr, tf);
      exp_q.push_back('{tdc: 2 * k,     coarse: coarse_at(tr), fine: fine_bins(tr, T)});
      exp_q.push_back('{tdc: 2 * k + 1, coarse: coarse_at(tf), fine: fine_bins(tf, T)});
      repeat (12) @(posedge clk);
    end
    repeat (300) @(posedge clk);
    compare("ToT");
    // disabled pixel takes nothing
    tot = 1'b0; enable = 1'b0;
    repeat (5) @(posedge clk);
    pulse(1.0, tr, tf);
    repeat (200) @(posedge clk);
    compare("disabled");
    `TB_DONE
  end
endmodule
