// xeq_adder_tree: balanced binary tree of two-input adders.
//
// Adds N signed DW-bit operands in ceil(log2 N) levels of adders; with 15
// operands that is four adder levels. Operands are padded with zeros up to
// the next power of two, and adders whose inputs are both padding reduce to
// wires. All arithmetic is modulo 2^DW: the width is chosen so that the
// sums the equalizer produces fit (guard bits above the DAC's range).
// Purely combinational.
module xeq_adder_tree #(
  parameter int unsigned N  = 2*xeq_pkg::NL_DEF + 1,
  parameter int unsigned DW = xeq_pkg::DW_DEF
) (
  input  logic [N-1:0][DW-1:0] in,
  output logic [DW-1:0]        sum
);
  localparam int unsigned LV = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP = 1 << LV;

  // node[l][i]: i-th partial sum at level l (level 0 = operands).
  logic [NP-1:0][DW-1:0] node [LV+1];

  for (genvar i = 0; i < NP; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign node[0][i] = in[i];
    end else begin : g_pad
      assign node[0][i] = '0;
    end
  end

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    localparam int unsigned NN = NP >> (l + 1);
    for (genvar i = 0; i < NN; i++) begin : g_add
      assign node[l+1][i] = node[l][2*i] + node[l][2*i+1];
    end
    for (genvar i = NN; i < NP; i++) begin : g_unused
      assign node[l+1][i] = '0;
    end
  end

  assign sum = node[LV][0];
endmodule
