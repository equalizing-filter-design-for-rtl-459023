// xeq_pkg: sizes shared by the crosstalk-cancelling equalizer.
//
// The equalizer drives a W-wire bus. Every output wire has its own filter,
// which looks at its own data bit and at NL neighbouring bits on each side
// (NTAP = 2*NL+1 bits in all). The filter runs R interleaved D/A channels,
// one per sample phase, so the bus is driven with R samples per bit. Each
// channel sums NTAP precomputed DW-bit values and feeds a DACW-bit DAC.
// The numbers below are the design point the equalizer was sized for:
// a 32-wire bus, 7+7 neighbours, 4 samples per bit, a 12-bit datapath and
// 8-bit DACs.
package xeq_pkg;
  localparam int unsigned W_DEF    = 32;  // wires on the bus
  localparam int unsigned NL_DEF   = 7;   // neighbours on each side
  localparam int unsigned R_DEF    = 4;   // samples per bit = interleaved DACs
  localparam int unsigned DW_DEF   = 12;  // datapath / coefficient width
  localparam int unsigned DACW_DEF = 8;   // DAC resolution
endpackage
