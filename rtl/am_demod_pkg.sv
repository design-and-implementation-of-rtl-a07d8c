// Shared types and constants of the digital amplitude demodulator.
//
// Every datapath word between blocks is 8 bits wide. Words that leave or
// enter the chip (DDS samples, modulator output, ADC and DAC words) are
// offset binary, 0..255 with mid-scale 128, as the DDS look-up tables hold
// them; words inside the detector are two's complement. The phase
// accumulators are 24 bits wide, which gives a 3 Hz step at 50 MHz.
// The modulation-type encoding is this design's own choice.
package am_demod_pkg;

  localparam int unsigned PHASE_W  = 24;  // phase accumulator width
  localparam int unsigned SAMPLE_W = 8;   // sample word length

  // Modulation produced by the on-chip test modulator.
  typedef enum logic [2:0] {
    MOD_AM    = 3'd0,  // double sideband with full carrier
    MOD_USB   = 3'd1,  // upper sideband, carrier suppressed
    MOD_LSB   = 3'd2,  // lower sideband, carrier suppressed
    MOD_USB_C = 3'd3,  // upper sideband with carrier
    MOD_LSB_C = 3'd4   // lower sideband with carrier
  } mod_type_e;

  // Offset binary (0..255) to two's complement (-128..127) and back:
  // adding 128 modulo 256 flips the sign bit.
  function automatic logic signed [SAMPLE_W-1:0] ob2tc(input logic [SAMPLE_W-1:0] v);
    return signed'({~v[SAMPLE_W-1], v[SAMPLE_W-2:0]});
  endfunction

  function automatic logic [SAMPLE_W-1:0] tc2ob(input logic signed [SAMPLE_W-1:0] v);
    return {~v[SAMPLE_W-1], v[SAMPLE_W-2:0]};
  endfunction

endpackage
