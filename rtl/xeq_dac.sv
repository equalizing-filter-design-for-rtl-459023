// xeq_dac: behavioural model of one interleaved D/A converter.
//
// This is a behavioural model, not synthesizable DAC circuitry: the real part
// is an analog current-steering converter. Its output current is represented
// here as a signed integer in units of one LSB current. While its phase
// enable is high the converter sources code x I_lsb; while it is low it
// sources nothing, so that R of these converters sharing one summing node
// take turns to form the R samples of each bit period.
//
// Interface: en (the phase from the clock generator), code (signed DACW-bit
// input from the channel's filter), iout (signed current, LSB units).
// Timing: combinational; settling, glitches and mismatch are not modelled.
// The 8-bit resolution and the phase-enabled interleaving follow the
// equalizer's design; two's-complement codes and return-to-zero output when
// disabled are this model's own choices.
module xeq_dac #(
  parameter int unsigned DACW = xeq_pkg::DACW_DEF
) (
  input  logic                    en,
  input  logic signed [DACW-1:0]  code,
  output logic signed [DACW-1:0]  iout
);
  assign iout = en ? code : '0;
endmodule
