// xeq_equalizer: crosstalk-cancelling transmit equalizer for a W-wire bus.
//
// Crosstalk, losses and reflections on a tightly spaced bus are linear, so
// the transmitter can pre-distort what it drives to cancel them. Each
// output wire gets its own filter, which sees the data bits of that wire
// and of its NL nearest neighbours on either side (15 wires at the default
// sizes) and drives R samples per bit through R interleaved DACs. Filter
// weights are not multiplied at run time: for each wire, DAC phase and
// neighbour the table holds the value a single bit contributes, computed
// off-line by an optimiser from the bus's impulse response, and the filter
// adds the values of the bits that are 1.
//
// Interface:
//   x            W data bits, one bit period each, sampled on the clock edge
//                that ends a cycle with bit_strobe high.
//   phase        one-hot DAC phase of the current sample period.
//   cfg_*        table write port: on cfg_we, the value for output wire
//                cfg_wire, DAC phase cfg_phase and neighbour tap cfg_tap
//                (tap t = wire cfg_wire + t - NL) becomes cfg_data.
//   dac_code     per wire, the R DAC input codes (signed DACW bits).
//   v            per wire, the summed DAC current (signed, DAC LSB units):
//                the sample driven onto the bus in this sample period.
// Timing: clk is the sample clock, R cycles per bit. Bits taken at the end
// of one bit period drive the R samples of the next: sample k of bit n is on
// v while phase[k] is high. Neighbours beyond the edges of the bus do not
// exist and contribute nothing.
// The per-wire, per-DAC filter structure and the default sizes follow the
// equalizer's design; sharing one phase generator among all wires, the
// configuration port and the edge handling are this design's own choices.
module xeq_equalizer #(
  parameter int unsigned W    = xeq_pkg::W_DEF,
  parameter int unsigned NL   = xeq_pkg::NL_DEF,
  parameter int unsigned R    = xeq_pkg::R_DEF,
  parameter int unsigned DW   = xeq_pkg::DW_DEF,
  parameter int unsigned DACW = xeq_pkg::DACW_DEF,
  localparam int unsigned NTAP = 2*NL + 1,
  localparam int unsigned SW   = DACW + $clog2(R)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [W-1:0]                   x,
  output logic [R-1:0]                   phase,
  output logic                           bit_strobe,
  input  logic                           cfg_we,
  input  logic [$clog2(W)-1:0]           cfg_wire,
  input  logic [$clog2(R)-1:0]           cfg_phase,
  input  logic [$clog2(NTAP)-1:0]        cfg_tap,
  input  logic [DW-1:0]                  cfg_data,
  output logic [W-1:0][R-1:0][DACW-1:0]  dac_code,
  output logic [W-1:0][SW-1:0]           v
);
  xeq_clock_gen #(.R(R)) u_clk (.clk, .rst_n, .phase, .bit_strobe);

  for (genvar i = 0; i < W; i++) begin : g_wire
    logic [NTAP-1:0] nb;

    // Neighbour window of wire i: tap t is wire i + t - NL.
    for (genvar t = 0; t < NTAP; t++) begin : g_nb
      localparam int J = int'(i) + int'(t) - int'(NL);
      if (J >= 0 && J < int'(W)) begin : g_in
        assign nb[t] = x[J];
      end else begin : g_edge
        assign nb[t] = 1'b0;
      end
    end

    xeq_wire_filter #(.NL(NL), .R(R), .DW(DW), .DACW(DACW)) u_filt (
      .clk, .rst_n, .phase, .bit_strobe, .bits(nb),
      .we(cfg_we && 32'(cfg_wire) == i), .wphase(cfg_phase), .wtap(cfg_tap),
      .wdata(cfg_data), .dac_code(dac_code[i]), .v(v[i])
    );
  end

  a_wire: assert property (@(posedge clk) disable iff (!rst_n)
                           cfg_we |-> 32'(cfg_wire) < W);
endmodule
