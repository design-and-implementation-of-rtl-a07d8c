// Testbench for am_modulator. For each modulation type, random offset-
// binary inputs are applied and the output compared with the defining
// equation evaluated here in real arithmetic (m = 1):
//   AM: c*(1+cos wm), USB/LSB: cos(wc +- wm), with carrier: c + cos(wc +- wm)/2
// using cos(wc +- wm) = cc*cm -+ sc*sm on the recentred inputs, with the
// power-of-two scaling of the block and floor rounding. A sweep with the
// true sines of a 10 kHz carrier and a 1 kHz tone then checks that USB
// and LSB really carry 11 kHz and 9 kHz by correlating the output. A
// second instance with m = 0.5 (M_INDEX = 64) is checked against the same
// equations with m = 0.5 on every applied input.
module tb_am_modulator;
  import am_demod_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic       clk = 1'b0, rst = 1'b1, en = 1'b0;
  mod_type_e  mode;
  logic [7:0] cos_mod, sin_mod, cos_car, sin_car, mod_o, mod_half;
  int         checks = 0, failures = 0;

  am_modulator dut (.clk(clk), .rst(rst), .en(en), .mode(mode), .cos_mod(cos_mod),
                    .sin_mod(sin_mod), .cos_car(cos_car), .sin_car(sin_car), .mod_o(mod_o));

  am_modulator #(.M_INDEX(64)) dut_half (
    .clk(clk), .rst(rst), .en(en), .mode(mode), .cos_mod(cos_mod), .sin_mod(sin_mod),
    .cos_car(cos_car), .sin_car(sin_car), .mod_o(mod_half));

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input real v);
    int r;
    r = int'($floor(v));
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return r + 128;
  endfunction

  // mi: modulation index m, the sideband terms are floor(m*x) in LSB
  function automatic int model(input mod_type_e m, input int cm, input int sm, input int cc, input int sc,
                               input real mi = 1.0);
    real usb, lsb, am;
    usb = $floor(mi * (real'(cc) * real'(cm) - real'(sc) * real'(sm)));
    lsb = $floor(mi * (real'(cc) * real'(cm) + real'(sc) * real'(sm)));
    am  = $floor(mi * real'(cc) * real'(cm));
    case (m)
      MOD_USB:   return clip(usb / 128.0);
      MOD_LSB:   return clip(lsb / 128.0);
      MOD_USB_C: return clip((128.0 * real'(cc) + $floor(usb / 2.0)) / 256.0);
      MOD_LSB_C: return clip((128.0 * real'(cc) + $floor(lsb / 2.0)) / 256.0);
      default:   return clip((128.0 * real'(cc) + am) / 256.0);
    endcase
  endfunction

  task automatic apply(input mod_type_e m, input int a, input int b, input int c, input int d);
    int e;
    @(negedge clk);
    mode = m; cos_mod = 8'(a); sin_mod = 8'(b); cos_car = 8'(c); sin_car = 8'(d); en = 1'b1;
    @(negedge clk) en = 1'b0;
    e = model(m, a - 128, b - 128, c - 128, d - 128);
    checks++;
    if (int'(mod_o) != e) begin
      failures++;
      $display("FAIL: mode %0d in %0d %0d %0d %0d got %0d expected %0d", m, a, b, c, d, mod_o, e);
    end
    e = model(m, a - 128, b - 128, c - 128, d - 128, 0.5);
    checks++;
    if (int'(mod_half) != e) begin
      failures++;
      $display("FAIL: m=0.5 mode %0d in %0d %0d %0d %0d got %0d expected %0d", m, a, b, c, d, mod_half, e);
    end
  endtask

  // correlation of the output with cos/sin at frequency f over 400 samples
  function automatic real tone_level(input mod_type_e m, input real f);
    real re, im, ph_m, ph_c, y;
    re = 0.0; im = 0.0;
    for (int n = 0; n < 400; n++) begin
      ph_m = 2.0 * PI * 1000.0 * real'(n) / 40000.0;
      ph_c = 2.0 * PI * 10000.0 * real'(n) / 40000.0;
      y = real'(model(m, int'($floor(127.0 * $cos(ph_m) + 0.5)), int'($floor(127.0 * $sin(ph_m) + 0.5)),
                         int'($floor(127.0 * $cos(ph_c) + 0.5)), int'($floor(127.0 * $sin(ph_c) + 0.5)))) - 128.0;
      re += y * $cos(2.0 * PI * f * real'(n) / 40000.0);
      im += y * $sin(2.0 * PI * f * real'(n) / 40000.0);
    end
    return $sqrt(re * re + im * im) / 200.0;
  endfunction

  task automatic sweep(input mod_type_e m, input real f_want, input real f_not, input real amp);
    real got_w, got_n;
    int  bad;
    bad = 0;
    for (int n = 0; n < 400; n++) begin
      real ph_m, ph_c;
      int  e;
      ph_m = 2.0 * PI * 1000.0 * real'(n) / 40000.0;
      ph_c = 2.0 * PI * 10000.0 * real'(n) / 40000.0;
      @(negedge clk);
      mode = m;
      cos_mod = 8'(128 + int'($floor(127.0 * $cos(ph_m) + 0.5)));
      sin_mod = 8'(128 + int'($floor(127.0 * $sin(ph_m) + 0.5)));
      cos_car = 8'(128 + int'($floor(127.0 * $cos(ph_c) + 0.5)));
      sin_car = 8'(128 + int'($floor(127.0 * $sin(ph_c) + 0.5)));
      en = 1'b1;
      @(negedge clk) en = 1'b0;
      e = model(m, int'(cos_mod) - 128, int'(sin_mod) - 128, int'(cos_car) - 128, int'(sin_car) - 128);
      if (int'(mod_o) != e) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL: sweep mode %0d had %0d mismatches", m, bad); end
    got_w = tone_level(m, f_want);
    got_n = tone_level(m, f_not);
    checks++;
    if (got_w < amp * 0.9 || got_w > amp * 1.1 || got_n > 2.0) begin
      failures++;
      $display("FAIL: mode %0d level at %0.0f Hz %f (want %f), at %0.0f Hz %f", m, f_want, got_w, amp, f_not, got_n);
    end
  endtask

  initial begin
    mode = MOD_AM; cos_mod = 8'd128; sin_mod = 8'd128; cos_car = 8'd128; sin_car = 8'd128;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (mod_o != 8'd128) begin failures++; $display("FAIL: reset value %0d", mod_o); end
    rst = 1'b0;
    for (int m = 0; m < 5; m++) begin
      apply(mod_type_e'(m), 0, 0, 0, 0);
      apply(mod_type_e'(m), 255, 255, 255, 255);
      apply(mod_type_e'(m), 255, 0, 0, 255);
      for (int i = 0; i < 300; i++)
        apply(mod_type_e'(m), $urandom_range(255), $urandom_range(255), $urandom_range(255), $urandom_range(255));
    end
    // spectral content (amplitudes in LSB of the signed output)
    sweep(MOD_USB, 11000.0, 9000.0, 126.0);
    sweep(MOD_LSB, 9000.0, 11000.0, 126.0);
    sweep(MOD_USB_C, 11000.0, 9000.0, 31.5);
    sweep(MOD_LSB_C, 9000.0, 11000.0, 31.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
