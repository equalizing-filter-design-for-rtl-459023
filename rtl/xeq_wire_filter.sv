// xeq_wire_filter: interleaved equalizing filter for one output wire.
//
// The bus is driven at R samples per data bit. Each of the R samples of a
// bit period comes from its own DAC, and each DAC has its own filter
// (FIR_0 .. FIR_R-1). FIR_k weights the current data bits of this wire and
// of its NL neighbours on each side with the precomputed values for sample
// k and adds them. The R DACs are enabled in turn by the phase signals of
// the clock generator and their currents are summed into the wire's output
// v. Because every DAC has its own table of values, differences between
// the DACs can be corrected by reprogramming the values.
//
// Interface:
//   bits          data bits of the wires at offsets -NL..+NL (bit NL = own
//                 wire); bits beyond the edge of the bus are tied to 0.
//   phase         one-hot DAC enables; bit_strobe marks the last sample
//                 period of a bit (see xeq_clock_gen).
//   we/wphase/wtap/wdata  write port of the precomputed-value table.
//   dac_code      the R DAC input codes; v the summed output current.
// Timing: bits are captured on the clock edge that ends a bit_strobe cycle;
// in the next bit period v carries sample k of that bit while phase[k] is
// high, so a bit appears at the output one sample period after it is taken.
// The structure (per-DAC filters, gated precomputed values, adder tree, DACs
// and current summing) follows the equalizer's design; widths of the codes
// and the summed current, and the write port, are this design's choices.
module xeq_wire_filter #(
  parameter int unsigned NL   = xeq_pkg::NL_DEF,
  parameter int unsigned R    = xeq_pkg::R_DEF,
  parameter int unsigned DW   = xeq_pkg::DW_DEF,
  parameter int unsigned DACW = xeq_pkg::DACW_DEF,
  localparam int unsigned NTAP = 2*NL + 1,
  localparam int unsigned SW   = DACW + $clog2(R)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [R-1:0]                  phase,
  input  logic                          bit_strobe,
  input  logic [NTAP-1:0]               bits,
  input  logic                          we,
  input  logic [$clog2(R)-1:0]          wphase,
  input  logic [$clog2(NTAP)-1:0]       wtap,
  input  logic [DW-1:0]                 wdata,
  output logic [R-1:0][DACW-1:0]        dac_code,
  output logic signed [SW-1:0]          v
);
  logic [R-1:0][NTAP-1:0][DW-1:0] coef;
  logic [R-1:0][DACW-1:0]         iout;

  xeq_coef_store #(.R(R), .NTAP(NTAP), .DW(DW)) u_coef (
    .clk, .rst_n, .we, .wphase, .wtap, .wdata, .coef
  );

  for (genvar k = 0; k < R; k++) begin : g_ch
    logic signed [DW-1:0] vk;

    xeq_fir_phase #(.NTAP(NTAP), .DW(DW), .DACW(DACW)) u_fir (
      .clk, .rst_n, .load(bit_strobe), .bits, .coef(coef[k]),
      .v(vk), .dac_code(dac_code[k])
    );

    xeq_dac #(.DACW(DACW)) u_dac (
      .en(phase[k]), .code(dac_code[k]), .iout(iout[k])
    );
  end

  xeq_current_sum #(.R(R), .DACW(DACW)) u_sum (.iin(iout), .v);
endmodule
