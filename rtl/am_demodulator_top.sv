// Digital amplitude demodulator (coherent product detector) for AM and
// single-sideband signals, sampled at 40 kHz from a 50 MHz clock.
//
// Signal flow, one step per 40 kHz sample strobe:
//   sample_clock_gen  24-bit accumulator, MSB edge = sample strobe (fsam)
//   dds (modulating)  tone of 1 kHz or 1.5 kHz, chosen by frq_sel
//   dds (carrier)     10 kHz carrier, sine and cosine
//   am_modulator      on-chip test signal: AM, USB, LSB, USB or LSB with
//                     carrier (mode)
//   source select     use_adc picks the external ADC word instead
//   product_mixer     received sample x local carrier cosine
//   product_scaler    16-bit product -> 8-bit filter word
//   fir_lpf           200-tap Hamming low-pass, fc = 2 kHz, 24-bit result
//   DAC formatting    dem_dac = saturate(y >>> DAC_SHIFT) + 128
// The product of the received signal and the carrier holds the modulating
// tone at baseband and images around 2*fcar (20 kHz, which at fs = 40 kHz
// folds to 19..21 kHz); the low-pass filter keeps only the tone (and, for
// the modes with a carrier, a DC level).
//
// Frequency codes are f*2^24/fsam because by default the synthesizers
// step on the sample strobe, as in the schematic of the design:
// CAR_CODE = 4194304 (10 kHz), MOD_CODE_1K = 419430, MOD_CODE_1K5 =
// 629146. With DDS_ON_CLK = 1 they step on every 50 MHz clock instead,
// the 3 Hz-step, 0..25 MHz synthesizer of the specification's text; the
// codes are then f*2^24/50 MHz (3355, 336 and 503). Carrier and local
// carrier still come from one synthesizer and stay coherent. The block chain,
// the frequencies, the filter and the 24-bit accumulators follow the
// specification. This design's own choices are: a single clock domain
// with sample-rate enables; the ADC/modulator source select; a one-sample
// delay of the local carrier so it lines up with the registered modulator
// output (at fcar = fsam/4 a one-sample misalignment is a 90-degree phase
// error that would null an AM output); and the DAC scaling (DAC_SHIFT = 9
// gives a demodulated full-scale SSB tone about 126 LSB in amplitude).
// M_INDEX sets the modulation index of the test modulator, m = M_INDEX/128.
//
// Latency from a carrier/tone phase step to dem_dac: mod_dac and the
// local carrier are registered on the strobe after the synthesizers
// update, the product one strobe later, the scaled word another strobe
// later, the filter output one clock after the next strobe and dem_dac one
// clock after that. dac_strobe marks each dem_dac update, once per sample.
//
// Reset: reset_n is active low (a board push button); every register is
// reset synchronously.
module am_demodulator_top
  import am_demod_pkg::*;
#(
  parameter int unsigned        FSAM_CODE    = 13422,
  parameter logic [PHASE_W-1:0] CAR_CODE     = 24'd4194304,
  parameter logic [PHASE_W-1:0] MOD_CODE_1K  = 24'd419430,
  parameter logic [PHASE_W-1:0] MOD_CODE_1K5 = 24'd629146,
  parameter int unsigned        TAPS         = 200,
  parameter int unsigned        DAC_SHIFT    = 9,
  parameter bit                 DDS_ON_CLK   = 1'b0,
  parameter int unsigned        M_INDEX      = 128
) (
  input  logic                clk,
  input  logic                reset_n,
  input  logic                frq_sel,
  input  logic [2:0]          mode,
  input  logic                use_adc,
  input  logic [SAMPLE_W-1:0] adc_data,
  output logic                adc_sample,
  output logic [SAMPLE_W-1:0] mod_dac,
  output logic [SAMPLE_W-1:0] dem_dac,
  output logic [23:0]         dem_y,
  output logic                dac_strobe
);

  localparam int unsigned Y_W = 24;

  logic                       rst;
  logic                       tick;
  logic                       dds_en;
  logic [PHASE_W-1:0]         mod_code;
  logic [SAMPLE_W-1:0]        cos_mod, sin_mod, cos_car, sin_car;
  logic [SAMPLE_W-1:0]        mod_q, adc_q, lo_q, src;
  logic signed [2*SAMPLE_W-1:0] prod;
  logic signed [SAMPLE_W-1:0] scaled;
  logic signed [Y_W-1:0]      y;
  logic                       y_valid;
  logic signed [Y_W-1:0]      y_shift;
  logic signed [SAMPLE_W-1:0] y_sat;

  assign rst = ~reset_n;

  sample_clock_gen #(.ACC_W(PHASE_W), .FSAM_CODE(FSAM_CODE)) u_fsam (
    .clk(clk), .rst(rst), .sam_msb(), .sam_tick(tick)
  );

  // Synthesizers step once per sample (default) or on every clock.
  assign dds_en = DDS_ON_CLK ? 1'b1 : tick;

  freq_code_mux #(.CODE_1K(MOD_CODE_1K), .CODE_1K5(MOD_CODE_1K5)) u_frq (
    .sel(frq_sel), .code(mod_code)
  );

  dds #(.PHASE_W(PHASE_W), .ROM_ADDR_W(13), .DATA_W(SAMPLE_W)) u_dds_mod (
    .clk(clk), .rst(rst), .en(dds_en), .code(mod_code), .sin_o(sin_mod), .cos_o(cos_mod)
  );

  dds #(.PHASE_W(PHASE_W), .ROM_ADDR_W(13), .DATA_W(SAMPLE_W)) u_dds_car (
    .clk(clk), .rst(rst), .en(dds_en), .code(CAR_CODE), .sin_o(sin_car), .cos_o(cos_car)
  );

  am_modulator #(.M_INDEX(M_INDEX)) u_mod (
    .clk(clk), .rst(rst), .en(tick), .mode(mod_type_e'(mode)),
    .cos_mod(cos_mod), .sin_mod(sin_mod), .cos_car(cos_car), .sin_car(sin_car),
    .mod_o(mod_q)
  );

  // ADC word and local carrier, registered in the same stage as the
  // modulator output so that signal and carrier stay aligned.
  always_ff @(posedge clk) begin
    if (rst) begin
      adc_q <= 8'd128;
      lo_q  <= 8'd128;
    end else if (tick) begin
      adc_q <= adc_data;
      lo_q  <= cos_car;
    end
  end

  assign src = use_adc ? adc_q : mod_q;

  product_mixer u_mix (
    .clk(clk), .rst(rst), .en(tick), .x_u(src), .lo_u(lo_q), .prod(prod)
  );

  product_scaler #(.IN_W(2*SAMPLE_W), .OUT_W(SAMPLE_W), .SHIFT(7)) u_scale (
    .clk(clk), .rst(rst), .en(tick), .din(prod), .dout(scaled)
  );

  fir_lpf #(.TAPS(TAPS), .DATA_W(SAMPLE_W), .COEF_W(8), .OUT_W(Y_W),
            .FS_HZ(40000), .FC_HZ(2000), .COEF_FRAC(10)) u_lpf (
    .clk(clk), .rst(rst), .en(tick), .din(scaled), .dout(y), .dout_valid(y_valid)
  );

  // DAC formatting: scale to 8 bits, saturate, back to offset binary.
  always_comb begin
    y_shift = y >>> DAC_SHIFT;
    if (y_shift > Y_W'(127))       y_sat = 8'sd127;
    else if (y_shift < -Y_W'(128)) y_sat = -8'sd128;
    else                           y_sat = y_shift[SAMPLE_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dem_dac    <= 8'd128;
      dac_strobe <= 1'b0;
    end else begin
      dac_strobe <= y_valid;
      if (y_valid) dem_dac <= tc2ob(y_sat);
    end
  end

  assign adc_sample = tick;
  assign mod_dac    = mod_q;
  assign dem_y      = y;

endmodule
