// Testbench for fir_lpf at its default parameters (200 taps, fs 40 kHz,
// fc 2 kHz, Hamming, 8-bit coefficients scaled by 2^10).
//  - impulse response: feeding a single 1 must reproduce, tap by tap, the
//    window-method coefficients computed here, and they must be symmetric;
//  - step response: a constant input x gives x*sum(h) after 200 samples;
//  - frequency response: a 1 kHz sine passes with the DC gain (within
//    3 %), 2 kHz is about 6 dB down, 19 kHz (the folded 2*fcar image) is
//    attenuated by more than 40 dB;
//  - timing: dout_valid comes exactly one clock after each en.
module tb_fir_lpf;
  localparam real PI   = 3.14159265358979323846;
  localparam int  TAPS = 200;
  logic               clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [7:0]  din = '0;
  logic signed [23:0] dout;
  logic               dout_valid;
  int                 checks = 0, failures = 0;
  int                 coef [TAPS];
  int                 coef_sum;

  fir_lpf dut (.clk(clk), .rst(rst), .en(en), .din(din), .dout(dout), .dout_valid(dout_valid));

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One input sample; returns the filter output. Checks the valid timing.
  task automatic push(input int x, output int y);
    @(negedge clk);
    din = 8'(x); en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    check(!dout_valid, "dout_valid in the enable cycle");
    @(negedge clk);
    check(dout_valid, "dout_valid one clock after enable");
    y = int'(dout);
    @(negedge clk);
    check(!dout_valid, "dout_valid longer than one clock");
  endtask

  function automatic void design_coefs();
    real h [TAPS];
    real s, t, w;
    s = 0.0;
    for (int n = 0; n < TAPS; n++) begin
      t = real'(n) - 99.5;
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / 199.0);
      h[n] = w * $sin(2.0 * PI * 0.05 * t) / (PI * t);
      s += h[n];
    end
    coef_sum = 0;
    for (int n = 0; n < TAPS; n++) begin
      coef[n] = int'($floor(h[n] / s * 1024.0 + 0.5));
      coef_sum += coef[n];
    end
  endfunction

  // amplitude of the steady-state response to a sine of amplitude 100
  task automatic tone_gain(input real f, output real amp);
    int  y;
    real re, im;
    re = 0.0; im = 0.0;
    for (int n = 0; n < 600; n++) begin
      push(int'($floor(100.0 * $sin(2.0 * PI * f * real'(n) / 40000.0) + 0.5)), y);
      if (n >= 200 && n < 600) begin
        re += real'(y) * $cos(2.0 * PI * f * real'(n) / 40000.0);
        im += real'(y) * $sin(2.0 * PI * f * real'(n) / 40000.0);
      end
    end
    amp = $sqrt(re * re + im * im) / 200.0 / 100.0;  // gain per unit input
  endtask

  initial begin
    int  y;
    real g1k, g2k, g19k;
    design_coefs();
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // impulse response
    for (int n = 0; n < TAPS + 4; n++) begin
      push(n == 0 ? 1 : 0, y);
      check(y == (n < TAPS ? coef[n] : 0), $sformatf("impulse tap %0d: %0d expected %0d", n, y, n < TAPS ? coef[n] : 0));
    end
    for (int n = 0; n < TAPS / 2; n++)
      check(coef[n] == coef[TAPS - 1 - n], $sformatf("reference symmetry %0d", n));
    check(coef[99] == 102 && coef[100] == 102, "centre taps");
    // step response (negative full scale too)
    for (int n = 0; n < TAPS; n++) push(100, y);
    check(y == 100 * coef_sum, $sformatf("step +100: %0d expected %0d", y, 100 * coef_sum));
    for (int n = 0; n < TAPS; n++) push(-128, y);
    check(y == -128 * coef_sum, $sformatf("step -128: %0d expected %0d", y, -128 * coef_sum));
    // frequency response, relative to the DC gain
    tone_gain(1000.0, g1k);
    tone_gain(2000.0, g2k);
    tone_gain(19000.0, g19k);
    $display("gain: DC %0d, 1 kHz %f, 2 kHz %f, 19 kHz %f", coef_sum, g1k, g2k, g19k);
    check(g1k > 0.97 * coef_sum && g1k < 1.03 * coef_sum, "1 kHz passband gain");
    check(g2k > 0.4 * coef_sum && g2k < 0.6 * coef_sum, "2 kHz about -6 dB");
    check(g19k < 0.01 * coef_sum, "19 kHz stopband below -40 dB");
    // reset clears the delay line
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    push(0, y);
    check(y == 0, "output after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
