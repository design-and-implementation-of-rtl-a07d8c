// Direct digital frequency synthesizer with sine and cosine outputs.
//
// A PHASE_W-bit phase accumulator adds the frequency code on every cycle
// in which en is high, so the output frequency is f_en*code/2^PHASE_W,
// where f_en is the rate of en. The top ROM_ADDR_W bits of the phase
// address a half-compressed sine table; a second table read at the phase
// plus a quarter period gives the cosine. Two units of this kind (one for
// the modulating tone, one for the carrier) hold the four tables of the
// design. The 24-bit accumulator, the 8192 x 8 tables and the sine/cosine
// outputs follow the specification; the quarter-period offset for the
// cosine is this design's choice. In the demodulator en is the 40 kHz
// sample strobe, as in the schematic; tied high, the unit runs at the
// system clock with a 3 Hz step.
//
// Timing: sin_o/cos_o show the phase reached after an en, one clock later.
// Reset: synchronous, active high; the phase restarts at zero.
module dds #(
  parameter int unsigned PHASE_W    = 24,
  parameter int unsigned ROM_ADDR_W = 13,
  parameter int unsigned DATA_W     = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic [PHASE_W-1:0] code,
  output logic [DATA_W-1:0]  sin_o,
  output logic [DATA_W-1:0]  cos_o
);

  logic [PHASE_W-1:0]    phase;
  logic [ROM_ADDR_W-1:0] sin_addr, cos_addr;

  always_ff @(posedge clk) begin
    if (rst)     phase <= '0;
    else if (en) phase <= phase + code;
  end

  assign sin_addr = phase[PHASE_W-1 -: ROM_ADDR_W];
  assign cos_addr = sin_addr + ROM_ADDR_W'(2 ** (ROM_ADDR_W - 2));

  half_sine_rom #(.ADDR_W(ROM_ADDR_W), .DATA_W(DATA_W)) u_sin_rom (
    .clk (clk), .addr(sin_addr), .data(sin_o)
  );

  half_sine_rom #(.ADDR_W(ROM_ADDR_W), .DATA_W(DATA_W)) u_cos_rom (
    .clk (clk), .addr(cos_addr), .data(cos_o)
  );

endmodule
