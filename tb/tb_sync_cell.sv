// tb_sync_cell: drives the asynchronous input at many phases of the clock
// and checks that the output follows exactly 1.5 periods after the next
// falling clock edge, i.e. 1.5 to 2.5 periods after the input change.
`include "tb_util.svh"
module tb_sync_cell;
  timeunit 1ns; timeprecision 1fs;
  localparam realtime T = 3.125;  // 320 MHz
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, a = 1'b0, y;
  realtime t_in, t_out, f_edge, dmin = 100.0, dmax = 0.0;

  always #(T/2) clk = ~clk;   // falling edges at k*T, rising at k*T + T/2
  initial #0.2 rst_n = 1'b0;   // a real falling edge for the asynchronous resets

  sync_cell dut (.clk, .rst_n, .async_i(a), .sync_o(y));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    `TB_DONE
  end

  initial begin
    #(4*T) rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      #(5*T + (i * 0.0777 * T) - $floor(i * 0.0777) * T + 0.013);
      a = ~a;
      t_in = $realtime;
      f_edge = $ceil(t_in / T) * T;
      @(y);
      t_out = $realtime;
      `TB_CHECK(t_out - t_in >= 1.5*T - 0.002 && t_out - t_in <= 2.5*T + 0.002, "delay window")
      `TB_CHECK((t_out - (f_edge + 1.5*T)) < 0.002 && (t_out - (f_edge + 1.5*T)) > -0.002, $sformatf("exact edge in %f out %f T %f", t_in, t_out, T))
      if (t_out - t_in < dmin) dmin = t_out - t_in;
      if (t_out - t_in > dmax) dmax = t_out - t_in;
    end
    // the phase sweep must cover both ends of the window
    `TB_CHECK(dmin < 1.6*T, "short delay seen")
    `TB_CHECK(dmax > 2.4*T, "long delay seen")
    `TB_DONE
  end
endmodule
