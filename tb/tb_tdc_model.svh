// Expected TDC behaviour, worked out from the clock waveform alone.
// The testbench clock starts low and toggles every T/2, so falling edges
// are at k*T and rising edges at k*T + T/2. An event at time t is measured
// up to the rising edge that follows the next falling edge; the fine time
// is the interval in 50 ps bins, truncated.
`ifndef TB_TDC_MODEL_SVH
`define TB_TDC_MODEL_SVH
function automatic realtime stop_edge(input realtime t, input realtime period);
  return $ceil(t / period) * period + period / 2.0;
endfunction
function automatic int fine_bins(input realtime t, input realtime period);
  return $rtoi((stop_edge(t, period) - t) / 0.050);
endfunction
`endif
