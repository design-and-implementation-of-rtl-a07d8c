// Testbench for am_demodulator_top in its alternative configuration: the
// synthesizers step on every 50 MHz clock (DDS_ON_CLK = 1), the 3 Hz-step
// synthesizer configuration, and the test modulator uses m = 0.5
// (M_INDEX = 64).
// Frequency codes are f*2^24/50 MHz: 3355 (10 kHz carrier), 336 (1 kHz)
// and 503 (1.5 kHz). Seen at the sample strobes, a synthesizer with code C
// advances C/13422 of a period per sample, so the tone is measured at that
// normalised frequency (1001.4 Hz and 1499.1 Hz at 40 kHz). The expected
// levels are half those of the default configuration for the tone (m =
// 0.5): about 63 LSB for SSB, 31.5 for AM, 16 with carrier; the DC level
// of the modes that carry the carrier stays about 62.
module tb_am_demodulator_top_fclk;
  import am_demod_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic        clk = 1'b0, reset_n = 1'b0, frq_sel = 1'b1;
  logic [2:0]  mode = 3'(MOD_USB);
  logic        adc_sample, dac_strobe;
  logic [7:0]  mod_dac, dem_dac;
  logic [23:0] dem_y;
  int          checks = 0, failures = 0;

  am_demodulator_top #(
    .CAR_CODE(24'd3355), .MOD_CODE_1K(24'd336), .MOD_CODE_1K5(24'd503), .DDS_ON_CLK(1'b1), .M_INDEX(64)
  ) dut (
    .clk(clk), .reset_n(reset_n), .frq_sel(frq_sel), .mode(mode), .use_adc(1'b0),
    .adc_data(8'd128), .adc_sample(adc_sample), .mod_dac(mod_dac), .dem_dac(dem_dac),
    .dem_y(dem_y), .dac_strobe(dac_strobe)
  );

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic next_sample(output int v);
    do @(posedge clk); while (!dac_strobe);
    #1 v = int'(dem_dac) - 128;
  endtask

  task automatic scenario(input string name, input mod_type_e m, input bit sel,
                          input real tone_lo, input real tone_hi, input real dc_lo, input real dc_hi);
    int  v;
    real fn, re, im, mean, tone;
    mode = 3'(m); frq_sel = sel;
    fn = (sel ? 336.0 : 503.0) / 13422.0;   // tone, cycles per sample
    re = 0.0; im = 0.0; mean = 0.0;
    for (int n = 0; n < 260; n++) next_sample(v);
    for (int n = 0; n < 400; n++) begin
      next_sample(v);
      re   += real'(v) * $cos(2.0 * PI * fn * real'(n));
      im   += real'(v) * $sin(2.0 * PI * fn * real'(n));
      mean += real'(v);
    end
    tone = $sqrt(re * re + im * im) / 200.0;
    mean = mean / 400.0;
    $display("%-28s tone %7.2f  mean %7.2f", name, tone, mean);
    check(tone >= tone_lo && tone <= tone_hi, $sformatf("%s: tone %f not in [%f,%f]", name, tone, tone_lo, tone_hi));
    check(mean >= dc_lo && mean <= dc_hi, $sformatf("%s: mean %f not in [%f,%f]", name, mean, dc_lo, dc_hi));
  endtask

  initial begin
    repeat (5) @(posedge clk);
    reset_n = 1'b1;
    scenario("USB, 1 kHz (50 MHz DDS)",   MOD_USB,   1'b1,  56.0,  68.0, -4.0,  4.0);
    scenario("LSB, 1.5 kHz (50 MHz DDS)", MOD_LSB,   1'b0,  56.0,  68.0, -4.0,  4.0);
    scenario("AM, 1 kHz (50 MHz DDS)",    MOD_AM,    1'b1,  27.0,  35.0, 55.0, 68.0);
    scenario("USB+C, 1.5 kHz (50 MHz DDS)", MOD_USB_C, 1'b0, 13.0,  19.0, 55.0, 68.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
