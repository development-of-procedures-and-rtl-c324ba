// or_gate2 -- two-input OR of the ports' ADC sampling requests.
//
// Each measurement port (adc_ch) raises its ADC enable while one of its
// sampling windows is open. The single ADC sequencer (adc_read) serves
// both ports, so the two requests are ORed: either port can start a
// conversion cycle, and a request that arrives while a cycle is already
// running is absorbed by that cycle. Purely combinational, no latency.
module or_gate2 (
  input  logic a,
  input  logic b,
  output logic y
);

  assign y = a | b;

endmodule
