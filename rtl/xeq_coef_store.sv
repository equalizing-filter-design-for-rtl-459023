// xeq_coef_store: table of precomputed convolution values for one wire.
//
// Rather than storing FIR coefficients and multiplying, the equalizer keeps,
// for each DAC phase k and each neighbouring wire t, the value that one data
// bit on wire t contributes to sample k of this wire's output (the bit
// convolved with the filter). This block holds those R x NTAP words, each DW
// bits, two's complement, in flip-flops so that all of them feed the adder
// trees at once. Tap t stands for the wire at offset t-NL from this one
// (t = NL is the wire itself).
//
// Interface: a single write port. When we is high at a clock edge, word
// (wphase, wtap) takes wdata. All words read out in parallel on coef.
// Reset clears every word to zero (a filter that drives nothing).
// Timing: a write is visible on coef in the cycle after the edge.
// The table contents and their meaning follow the equalizer's design; the
// write port, its addressing and the reset value are this design's choice.
module xeq_coef_store #(
  parameter int unsigned R    = xeq_pkg::R_DEF,          // DAC phases
  parameter int unsigned NTAP = 2*xeq_pkg::NL_DEF + 1,   // wires seen per output
  parameter int unsigned DW   = xeq_pkg::DW_DEF          // word width
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 we,
  input  logic [$clog2(R)-1:0]                 wphase,
  input  logic [$clog2(NTAP)-1:0]              wtap,
  input  logic [DW-1:0]                        wdata,
  output logic [R-1:0][NTAP-1:0][DW-1:0]       coef
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      coef <= '0;
    end else if (we) begin
      coef[wphase][wtap] <= wdata;
    end
  end

  a_addr: assert property (@(posedge clk) disable iff (!rst_n)
                           we |-> (32'(wphase) < R && 32'(wtap) < NTAP));
endmodule
