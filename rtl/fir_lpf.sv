// Digital low-pass filter: TAPS-tap direct-form FIR, Hamming window design.
//
// The default is the filter of the specification: 200 taps (order 199),
// fs = 40 kHz, cut-off 2 kHz, Hamming window, passband scaled to unit
// gain, 8-bit data and 8-bit coefficients. The coefficients are computed
// at elaboration with the window method:
//   h(n) = w(n) * sin(2*pi*(fc/fs)*(n-M)) / (pi*(n-M)),  M = (TAPS-1)/2
//   w(n) = 0.54 - 0.46*cos(2*pi*n/(TAPS-1))
// then divided by sum(h) (DC gain 1) and quantised to
// round(h(n)*2^COEF_FRAC), saturated to COEF_W bits. With COEF_FRAC = 10
// the largest coefficient is 102 and the integer DC gain is about 1024, so
// the full-precision output of an 8-bit input fits the 24-bit result
// with ample margin. The quantisation scale is this design's choice.
//
// Structure: a TAPS-deep delay line of input samples shifts on each en;
// on the following clock all TAPS products are summed in parallel and the
// sum is registered in dout, with a one-clock dout_valid strobe. The sum
// is thus available one clock after each input sample; since a new sample
// only comes once per 1250 clocks, the adder tree may be timed as a
// multicycle path.
//
// Reset: synchronous, active high; clears the delay line and the output.
module fir_lpf #(
  parameter int unsigned TAPS      = 200,
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned COEF_W    = 8,
  parameter int unsigned OUT_W     = 24,
  parameter int unsigned FS_HZ     = 40000,
  parameter int unsigned FC_HZ     = 2000,
  parameter int unsigned COEF_FRAC = 10
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [OUT_W-1:0]  dout,
  output logic                     dout_valid
);

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [COEF_W-1:0] coef_t [TAPS];

  function automatic coef_t design_coefs();
    real   h [TAPS];
    real   sum, t, wc, w, q, lim;
    coef_t c;
    wc  = 2.0 * PI * real'(FC_HZ) / real'(FS_HZ);
    sum = 0.0;
    for (int n = 0; n < int'(TAPS); n++) begin
      t = real'(n) - real'(TAPS - 1) / 2.0;
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / real'(TAPS - 1));
      if (t == 0.0) h[n] = w * wc / PI;
      else          h[n] = w * $sin(wc * t) / (PI * t);
      sum += h[n];
    end
    lim = 2.0 ** (COEF_W - 1);
    for (int n = 0; n < int'(TAPS); n++) begin
      q = $floor(h[n] / sum * (2.0 ** COEF_FRAC) + 0.5);
      if (q > lim - 1.0) q = lim - 1.0;
      if (q < -lim)      q = -lim;
      c[n] = COEF_W'(int'(q));
    end
    return c;
  endfunction

  localparam coef_t COEF = design_coefs();

  logic signed [DATA_W-1:0] line [TAPS];
  logic signed [OUT_W-1:0]  acc;
  logic                     en_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(TAPS); k++) line[k] <= '0;
    end else if (en) begin
      line[0] <= din;
      for (int k = 1; k < int'(TAPS); k++) line[k] <= line[k-1];
    end
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < int'(TAPS); k++)
      acc += OUT_W'(COEF[k]) * OUT_W'(line[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q       <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      en_q       <= en;
      dout_valid <= en_q;
      if (en_q) dout <= acc;
    end
  end

endmodule
