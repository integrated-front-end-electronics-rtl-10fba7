// tb_tdc_analog: starts the TDC model at many phases of the clock and
// checks the length of the run-down against the interval to the expected
// stop edge (0.5 to 1.5 clock periods), that an unarmed TDC ignores start,
// that a busy TDC ignores a second start, and that clr releases hit.
`include "tb_util.svh"
module tb_tdc_analog;
  timeunit 1ns; timeprecision 1fs;
  `include "tb_tdc_model.svh"
  localparam realtime T = 3.125;
  int checks = 0, failures = 0;
  logic clk = 1'b0, arm = 1'b0, start = 1'b0, clr = 1'b0, hit, rundown;
  int n, fmin = 1000, fmax = 0;
  realtime t0;
  always #(T/2) clk = ~clk;
  tdc_analog dut (.clk, .arm, .start, .clr, .hit, .rundown);
  initial begin
    #100us;
    failures++;
    `TB_DONE
  end
  initial begin
    #(3*T);
    // unarmed: no hit
    start = 1'b1; #(T) start = 1'b0;
    repeat (3) @(posedge clk);
    `TB_CHECK(!hit, "unarmed TDC ignores start")
    for (int i = 0; i < 30; i++) begin
      @(posedge clk);
      arm = 1'b1;
      #(0.011 + (i * 0.1037 * T) - $floor(i * 0.1037) * T);
      start = 1'b1; t0 = $realtime;
      #0.001 `TB_CHECK(hit, "hit rises at once")
      #(0.3) start = 1'b0;
      #(0.3) start = 1'b1;   // second start while busy: ignored
      #(0.3) start = 1'b0;
      n = 0;
      @(posedge clk iff rundown);
      `TB_CHECK($realtime - (stop_edge(t0, T) + T) < 0.002 && $realtime - (stop_edge(t0, T) + T) > -0.002, "rundown starts on the stop edge")
      while (rundown) begin n++; @(posedge clk); end
      `TB_CHECK(n == fine_bins(t0, T), $sformatf("bins %0d expected %0d", n, fine_bins(t0, T)))
      if (n < fmin) fmin = n;
      if (n > fmax) fmax = n;
      `TB_CHECK(hit, "hit held until clr")
      @(negedge clk) clr = 1'b1;
      @(negedge clk) clr = 1'b0;
      `TB_CHECK(!hit, "clr releases hit")
    end
    `TB_CHECK(fmin <= 33 && fmax >= 90, $sformatf("range %0d..%0d", fmin, fmax))
    `TB_DONE
  end
endmodule
