// Frequency-code selector for the modulating-tone synthesizer.
//
// A two-way multiplexer between two constant frequency codes, driven by
// the FRQ switch: sel = 1 gives CODE_1K (1 kHz), sel = 0 gives CODE_1K5
// (1.5 kHz). The codes are f*2^24/fsam for a synthesizer stepped at the
// 40 kHz sample rate: round(1000*2^24/40000) = 419430 and
// round(1500*2^24/40000) = 629146, as printed in the schematic. Which
// switch position picks which tone is this design's reading.
//
// Timing: combinational.
module freq_code_mux #(
  parameter logic [23:0] CODE_1K  = 24'd419430,
  parameter logic [23:0] CODE_1K5 = 24'd629146
) (
  input  logic        sel,
  output logic [23:0] code
);

  assign code = sel ? CODE_1K : CODE_1K5;

endmodule
