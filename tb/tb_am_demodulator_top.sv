// End-to-end testbench for am_demodulator_top at its default parameters
// (50 MHz clock, 40 kHz sampling, 10 kHz carrier, 200-tap filter).
//
// Each scenario sets the controls, waits for the pipeline and the filter
// to fill (260 samples), then records 400 demodulated samples (10 periods
// of 1 kHz, 15 of 1.5 kHz) and measures by correlation the level of the
// modulating tone, of the 19 kHz image (2*fcar+fmod folded at fs) and
// the mean. Expected levels are worked out from the signal equations:
//   SSB, amplitude A on the carrier input: tone = A*127/2/128 * G/512
//   with carrier (carrier amplitude 63.5, sideband 31.75): tone about 31,
//   DC about 62; AM: tone about 62, DC about 62
// with G ~ 1008..1016 the filter gain. The external-ADC path is fed a
// 11 kHz (USB of a 1 kHz tone) sine of amplitude 100 by this testbench.
// It also checks that dac_strobe comes once per sample (1249 or 1250
// clocks apart, fsam = 40 kHz), and counts every mechanism exercised:
// each modulation type, both tones, the ADC source, a reset mid-run.
module tb_am_demodulator_top;
  import am_demod_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic       clk = 1'b0, reset_n = 1'b0, frq_sel = 1'b1, use_adc = 1'b0;
  logic [2:0] mode = 3'(MOD_USB);
  logic [7:0] adc_data = 8'd128;
  logic       adc_sample, dac_strobe;
  logic [7:0] mod_dac, dem_dac;
  logic [23:0] dem_y;
  int         checks = 0, failures = 0;
  int         n_mode [5];
  int         n_tone_1k = 0, n_tone_1k5 = 0, n_adc = 0, n_reset = 0;
  int         adc_n = 0;

  am_demodulator_top dut (
    .clk(clk), .reset_n(reset_n), .frq_sel(frq_sel), .mode(mode), .use_adc(use_adc),
    .adc_data(adc_data), .adc_sample(adc_sample), .mod_dac(mod_dac), .dem_dac(dem_dac),
    .dem_y(dem_y), .dac_strobe(dac_strobe)
  );

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // external ADC model: an 11 kHz sine, new word on each sample strobe
  always @(posedge clk) begin
    if (adc_sample) begin
      adc_data <= 8'(128 + int'($floor(100.0 * $cos(2.0 * PI * 11000.0 * real'(adc_n) / 40000.0) + 0.5)));
      adc_n <= adc_n + 1;
    end
  end

  // sample-rate monitor
  int last_strobe = -1, cyc = 0, bad_interval = 0, n_strobe = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dac_strobe && reset_n) begin
      if (last_strobe >= 0 && (cyc - last_strobe != 1249) && (cyc - last_strobe != 1250))
        bad_interval <= bad_interval + 1;
      last_strobe <= cyc;
      n_strobe <= n_strobe + 1;
    end
  end

  task automatic next_sample(output int v);
    do @(posedge clk); while (!dac_strobe);
    #1 v = int'(dem_dac) - 128;
  endtask

  task automatic measure(input real fm, output real tone, output real image, output real mean);
    int  v;
    real re, im, re2, im2;
    re = 0.0; im = 0.0; re2 = 0.0; im2 = 0.0; mean = 0.0;
    for (int n = 0; n < 260; n++) next_sample(v);
    for (int n = 0; n < 400; n++) begin
      next_sample(v);
      re   += real'(v) * $cos(2.0 * PI * fm * real'(n) / 40000.0);
      im   += real'(v) * $sin(2.0 * PI * fm * real'(n) / 40000.0);
      re2  += real'(v) * $cos(2.0 * PI * 19000.0 * real'(n) / 40000.0);
      im2  += real'(v) * $sin(2.0 * PI * 19000.0 * real'(n) / 40000.0);
      mean += real'(v);
    end
    tone  = $sqrt(re * re + im * im) / 200.0;
    image = $sqrt(re2 * re2 + im2 * im2) / 200.0;
    mean  = mean / 400.0;
  endtask

  task automatic scenario(input string name, input mod_type_e m, input bit sel, input bit adc,
                          input real tone_lo, input real tone_hi, input real dc_lo, input real dc_hi);
    real fm, tone, image, mean;
    mode = 3'(m); frq_sel = sel; use_adc = adc;
    fm = adc ? 1000.0 : (sel ? 1000.0 : 1500.0);
    measure(fm, tone, image, mean);
    $display("%-22s tone %7.2f  19 kHz image %5.2f  mean %7.2f", name, tone, image, mean);
    check(tone >= tone_lo && tone <= tone_hi, $sformatf("%s: tone level %f not in [%f,%f]", name, tone, tone_lo, tone_hi));
    check(image < 2.0, $sformatf("%s: 19 kHz image %f", name, image));
    check(mean >= dc_lo && mean <= dc_hi, $sformatf("%s: mean %f not in [%f,%f]", name, mean, dc_lo, dc_hi));
    if (adc) n_adc++;
    else begin
      n_mode[int'(m)]++;
      if (sel) n_tone_1k++; else n_tone_1k5++;
    end
  endtask

  initial begin
    int v;
    foreach (n_mode[i]) n_mode[i] = 0;
    repeat (5) @(posedge clk);
    reset_n = 1'b1;
    // tone 126*127/256*~1012/512 = 123.5 for SSB; clipping at the DAC peaks is allowed
    scenario("USB, 1 kHz",            MOD_USB,   1'b1, 1'b0, 110.0, 130.0,  -3.0,  3.0);
    scenario("LSB, 1 kHz",            MOD_LSB,   1'b1, 1'b0, 110.0, 130.0,  -3.0,  3.0);
    scenario("USB with carrier, 1 kHz", MOD_USB_C, 1'b1, 1'b0, 27.0, 35.0, 55.0, 68.0);
    scenario("LSB with carrier, 1 kHz", MOD_LSB_C, 1'b1, 1'b0, 27.0, 35.0, 55.0, 68.0);
    scenario("AM, 1 kHz",             MOD_AM,    1'b1, 1'b0,  55.0,  68.0,  55.0, 68.0);
    scenario("AM, 1.5 kHz",           MOD_AM,    1'b0, 1'b0,  55.0,  68.0,  55.0, 68.0);
    scenario("USB with carrier, 1.5 kHz", MOD_USB_C, 1'b0, 1'b0, 27.0, 35.0, 55.0, 68.0);
    scenario("LSB with carrier, 1.5 kHz", MOD_LSB_C, 1'b0, 1'b0, 27.0, 35.0, 55.0, 68.0);
    // external ADC: 100*127/2/128*~1012/512 = 98
    scenario("ADC input, USB 1 kHz",  MOD_AM,    1'b1, 1'b1,  88.0, 108.0,  -3.0,  3.0);
    // reset mid-run: outputs return to mid-scale, then the design recovers
    @(posedge clk) reset_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(dem_dac == 8'd128 && dem_y == 24'd0 && mod_dac == 8'd128, "outputs cleared by reset");
    n_reset++;
    @(negedge clk) reset_n = 1'b1;
    last_strobe = -1;
    scenario("USB after reset, 1 kHz", MOD_USB, 1'b1, 1'b0, 110.0, 130.0, -3.0, 3.0);
    // sample rate
    check(bad_interval == 0, $sformatf("%0d output strobe intervals not 1249/1250 clocks", bad_interval));
    check(n_strobe >= 10 * 660, $sformatf("only %0d output samples", n_strobe));
    // every mechanism exercised
    foreach (n_mode[i]) check(n_mode[i] > 0, $sformatf("mode %0d never used", i));
    check(n_tone_1k > 0, "1 kHz tone never used");
    check(n_tone_1k5 > 0, "1.5 kHz tone never used");
    check(n_adc > 0, "ADC input never used");
    check(n_reset > 0, "reset never applied");
    $display("mechanisms: modes AM %0d USB %0d LSB %0d USB+C %0d LSB+C %0d, 1 kHz %0d, 1.5 kHz %0d, ADC %0d, reset %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_tone_1k, n_tone_1k5, n_adc, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
