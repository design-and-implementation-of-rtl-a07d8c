// Sample clock generator: derives the 40 kHz sample rate from the 50 MHz
// system clock.
//
// A phase accumulator of ACC_W bits adds FSAM_CODE on every clock; its MSB
// is a square wave at FCLK*FSAM_CODE/2^ACC_W. With the defaults (24 bits,
// 13422) that is 40000.6 Hz, the fsam = FCLK/1250 of the specification; the
// interval between strobes is 1249 or 1250 clocks. The accumulator
// structure and the constant follow the schematic of the design. The
// one-clock strobe sam_tick on each rising edge of the MSB, used as a clock
// enable so the whole design stays in one clock domain, is this design's
// choice (the schematic clocks the synthesizers from the MSB directly).
//
// Timing: sam_tick is high for exactly one clk cycle, registered.
// Reset: synchronous, active high; clears the accumulator.
module sample_clock_gen #(
  parameter int unsigned ACC_W     = 24,
  parameter int unsigned FSAM_CODE = 13422
) (
  input  logic clk,
  input  logic rst,
  output logic sam_msb,
  output logic sam_tick
);

  logic [ACC_W-1:0] acc;
  logic             msb_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc      <= '0;
      msb_q    <= 1'b0;
      sam_tick <= 1'b0;
    end else begin
      acc      <= acc + ACC_W'(FSAM_CODE);
      msb_q    <= acc[ACC_W-1];
      sam_tick <= acc[ACC_W-1] & ~msb_q;
    end
  end

  assign sam_msb = acc[ACC_W-1];

endmodule
