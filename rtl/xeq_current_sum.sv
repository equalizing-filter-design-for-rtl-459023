// xeq_current_sum: behavioural model of the current-summing node.
//
// This is a behavioural model of an analog part: the R interleaved DACs of a
// wire drive one node, and the node's current, the filter output v that
// goes to the pad, is the sum of theirs. Currents are signed integers in
// units of one DAC LSB; the sum is wide enough never to overflow
// (DACW + ceil(log2 R) bits).
//
// Interface: iin (R DAC currents), v (their sum). Timing: combinational.
module xeq_current_sum #(
  parameter int unsigned R    = xeq_pkg::R_DEF,
  parameter int unsigned DACW = xeq_pkg::DACW_DEF,
  localparam int unsigned SW  = DACW + $clog2(R)
) (
  input  logic [R-1:0][DACW-1:0]  iin,
  output logic signed [SW-1:0]    v
);
  always_comb begin
    v = '0;
    for (int k = 0; k < R; k++) v = v + SW'(signed'(iin[k]));
  end
endmodule
