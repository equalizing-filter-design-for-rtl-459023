// xeq_fir_phase: filter of one interleaved DAC channel (FIR_k).
//
// Sample k of a wire's output in each bit period is a linear combination of
// the current data bits of that wire and of its NL neighbours on each side.
// The weight of each bit is the precomputed convolution value for (k, wire),
// so the "multiplication" by a 0/1 data bit is just a gate: the word passes
// when the bit is 1 and is zero when the bit is 0. The NTAP gated words are
// added by a balanced adder tree (15 operands, four adder levels) in DW-bit
// two's complement, and the sum is captured in a register when load is high.
// dac_code is the registered sum limited to the signed DACW-bit range of the
// DAC; the upper DW-DACW bits are guard bits for the growth of the sum.
//
// Timing: bits and coef must be valid in the cycle where load is high; v and
// dac_code change on that edge and hold until the next load (one bit period).
// The gating, the adder tree and the 12-bit width follow the equalizer's
// design. Saturating to the DAC range, the output register and its reset
// to zero are this design's choices.
module xeq_fir_phase #(
  parameter int unsigned NTAP = 2*xeq_pkg::NL_DEF + 1,  // operands
  parameter int unsigned DW   = xeq_pkg::DW_DEF,        // datapath width
  parameter int unsigned DACW = xeq_pkg::DACW_DEF       // DAC input width
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load,      // capture a new sum
  input  logic [NTAP-1:0]             bits,      // data bits of the wires seen
  input  logic [NTAP-1:0][DW-1:0]     coef,      // precomputed values, this phase
  output logic signed [DW-1:0]        v,         // registered sum
  output logic signed [DACW-1:0]      dac_code   // v limited to the DAC range
);
  localparam logic signed [DW-1:0] MAXV = DW'((1 << (DACW-1)) - 1);
  localparam logic signed [DW-1:0] MINV = DW'(-(1 << (DACW-1)));

  logic [NTAP-1:0][DW-1:0] prod;
  logic [DW-1:0]           sum;

  always_comb begin
    for (int t = 0; t < NTAP; t++) prod[t] = bits[t] ? coef[t] : '0;
  end

  xeq_adder_tree #(.N(NTAP), .DW(DW)) u_tree (.in(prod), .sum(sum));

  always_ff @(posedge clk) begin
    if (!rst_n)    v <= '0;
    else if (load) v <= signed'(sum);
  end

  always_comb begin
    if (v > MAXV)      dac_code = DACW'(MAXV);
    else if (v < MINV) dac_code = DACW'(MINV);
    else               dac_code = DACW'(v);
  end
endmodule
