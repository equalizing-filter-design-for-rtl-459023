// xeq_clock_gen: interleaving phase generator.
//
// The equalizer drives R samples per data bit, each from its own DAC. This
// block marks which DAC is active in the current sample period. It is a
// one-hot ring of R flip-flops clocked at the sample rate: phase[k] is high
// during the k-th sample period of every bit period. bit_strobe is high in
// the last sample period of a bit (phase R-1); the filters load the next
// bit's values on the clock edge that ends it, so phase 0 of the following
// bit period already converts the new values.
//
// Timing: after rst_n is released, the first cycle has phase[0] high;
// phase advances by one every clock and wraps after R cycles.
// That the phase enables are a rotating one-hot set is what the equalizer
// needs; making them with a digital ring on one sample-rate clock (rather
// than multi-phase analog clocks) is this design's own choice.
module xeq_clock_gen #(
  parameter int unsigned R = xeq_pkg::R_DEF   // interleaving factor
) (
  input  logic         clk,        // sample-rate clock (R per bit)
  input  logic         rst_n,      // active-low synchronous reset
  output logic [R-1:0] phase,      // one-hot DAC enables
  output logic         bit_strobe  // last sample period of a bit
);
  always_ff @(posedge clk) begin
    if (!rst_n) phase <= R'(1);
    else        phase <= {phase[R-2:0], phase[R-1]};
  end

  assign bit_strobe = phase[R-1];

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(phase));
endmodule
