// Product detector: multiplies the received sample by the local carrier.
//
// Both inputs arrive in offset binary (0..255). Each is recentred to two's
// complement by adding 128 modulo 256 (the constant-128 adder of the
// schematic), and the signed 8 x 8 product is registered when en is high.
// Multiplying an SSB or AM signal by the carrier cosine moves the
// modulating tone to baseband and leaves images near twice the carrier,
// which the following low-pass filter removes. The signed multiplier and
// the 128 offset follow the schematic; the 16-bit full-precision result is
// this design's choice.
//
// Timing: prod is registered on en (one sample of latency).
// Reset: synchronous, active high; prod clears to zero.
module product_mixer
  import am_demod_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [SAMPLE_W-1:0] x_u,
  input  logic [SAMPLE_W-1:0] lo_u,
  output logic signed [2*SAMPLE_W-1:0] prod
);

  always_ff @(posedge clk) begin
    if (rst)     prod <= '0;
    else if (en) prod <= ob2tc(x_u) * ob2tc(lo_u);
  end

endmodule
