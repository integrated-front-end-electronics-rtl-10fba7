// tdc_analog: behavioural model of one analogue-interpolation TDC.
//
// This is a behavioural model, not synthesizable logic: the real TDC is an
// analogue time interpolator followed by a Wilkinson run-down. It is here so
// that the digital pixel logic around it can be simulated.
//
// When start rises while arm is high the model records the time and raises
// hit at once. The measured interval ends on the first rising clock edge
// after the next falling edge, so it lies between 0.5 and 1.5 clock periods:
// an event just before a falling edge is measured up to the next rising edge,
// one just after it up to the rising edge after that. From that stop edge
// the model holds rundown high for floor(interval / BIN_PS) clock cycles,
// which the digital fine counter counts; the Wilkinson conversion time is
// thus proportional to the interval. One count per clock cycle is this
// model's choice. After the run-down the model keeps hit high, ignoring
// further start edges, until it sees clr on a rising clock edge. rundown
// changes only on rising clock edges; hit changes asynchronously.
module tdc_analog #(
  parameter int unsigned BIN_PS = 50
) (
  input  logic clk,
  input  logic arm,
  input  logic start,
  input  logic clr,
  output logic hit,
  output logic rundown
);
  realtime     t_start;
  int unsigned n_bins;

  initial begin
    hit     = 1'b0;
    rundown = 1'b0;
    forever begin
      @(posedge start iff arm);
      t_start = $realtime;
      hit     = 1'b1;
      @(negedge clk);
      @(posedge clk);
      n_bins  = $rtoi(($realtime - t_start) / (real'(BIN_PS) * 1ps));
      rundown <= 1'b1;
      repeat (n_bins) @(posedge clk);
      rundown <= 1'b0;
      @(posedge clk iff clr);
      hit <= 1'b0;
    end
  end

endmodule
