// On-chip test modulator: builds the received signal the demodulator works on.
//
// From the sine and cosine of the modulating tone (cos_mod, sin_mod) and of
// the carrier (cos_car, sin_car) it forms, for a modulation index
// m = M_INDEX/128 (0..1, default 1):
//   AM          c*(1 + m*cos wm)                      = cc + cc*cm
//   USB / LSB   (m/2)*cos(wc +- wm), via the phasing identity
//               cos(wc +- wm) = cc*cm -+ sc*sm
//   USB / LSB with carrier   cc + (m/2)*cos(wc +- wm)
// Inputs and output are offset binary (0..255); the products are taken in
// two's complement. Each sideband product is first scaled by m,
// s(x) = (x*M_INDEX) >>> 7; then, with powers of two only:
//   AM        (128*cc + s(cc*cm)) >>> 8         peak 127 at m = 1
//   USB/LSB   s(cc*cm -+ sc*sm) >>> 7           peak 126 at m = 1
//   with car. (128*cc + s(cc*cm -+ sc*sm)/2) >>> 8   peak 95 at m = 1
// and the result is saturated to 8 bits. The modulation types, their
// equations and the 0..1 range of m follow the specification; the phasing
// structure, the fixed-point form of m, the scaling and the mode encoding
// are this design's choices.
//
// Timing: mod_o is registered when en is high (one sample of latency).
// Reset: synchronous, active high; mod_o returns to mid-scale (128).
module am_modulator
  import am_demod_pkg::*;
#(
  parameter int unsigned M_INDEX = 128   // modulation index m = M_INDEX/128
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  mod_type_e           mode,
  input  logic [SAMPLE_W-1:0] cos_mod,
  input  logic [SAMPLE_W-1:0] sin_mod,
  input  logic [SAMPLE_W-1:0] cos_car,
  input  logic [SAMPLE_W-1:0] sin_car,
  output logic [SAMPLE_W-1:0] mod_o
);

  logic signed [7:0]  cm, sm, cc, sc;
  logic signed [15:0] p_cc, p_ss;       // cc*cm, sc*sm
  logic signed [17:0] carrier, usb, lsb, am_sb, acc;
  logic signed [26:0] usb_m, lsb_m, am_m;
  logic signed [7:0]  sat;

  always_comb begin
    cm   = ob2tc(cos_mod);
    sm   = ob2tc(sin_mod);
    cc   = ob2tc(cos_car);
    sc   = ob2tc(sin_car);
    p_cc = cm * cc;
    p_ss = sm * sc;
    carrier = 18'(cc) <<< 7;
    usb_m   = (27'(p_cc) - 27'(p_ss)) * 27'(M_INDEX);
    lsb_m   = (27'(p_cc) + 27'(p_ss)) * 27'(M_INDEX);
    am_m    = 27'(p_cc) * 27'(M_INDEX);
    usb     = 18'(usb_m >>> 7);
    lsb     = 18'(lsb_m >>> 7);
    am_sb   = 18'(am_m >>> 7);
    unique case (mode)
      MOD_USB:   acc = usb >>> 7;
      MOD_LSB:   acc = lsb >>> 7;
      MOD_USB_C: acc = (carrier + (usb >>> 1)) >>> 8;
      MOD_LSB_C: acc = (carrier + (lsb >>> 1)) >>> 8;
      default:   acc = (carrier + am_sb) >>> 8;
    endcase
    if (acc > 18'sd127)       sat = 8'sd127;
    else if (acc < -18'sd128) sat = -8'sd128;
    else                      sat = acc[7:0];
  end

  always_ff @(posedge clk) begin
    if (rst)     mod_o <= 8'd128;
    else if (en) mod_o <= tc2ob(sat);
  end

endmodule
