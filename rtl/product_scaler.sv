// Scaler between the product detector and the FIR filter.
//
// Reduces the IN_W-bit signed product to the OUT_W-bit word length of the
// filter: dout = saturate(din >>> SHIFT). With the defaults (16 -> 8 bits,
// shift 7) a product of two full-scale samples, 127*127, maps to 126; only
// (-128)*(-128) overflows and is clipped to 127. The 8-bit output word
// follows the specification; the shift and saturation are this design's
// choices.
//
// Timing: dout is registered on en (one sample of latency).
// Reset: synchronous, active high; dout clears to zero.
module product_scaler #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 8,
  parameter int unsigned SHIFT = 7
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);

  localparam logic signed [IN_W-1:0] MAXV = IN_W'((2 ** (OUT_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(2 ** (OUT_W - 1));

  logic signed [IN_W-1:0]  shifted;
  logic signed [OUT_W-1:0] sat;

  always_comb begin
    shifted = din >>> SHIFT;
    if (shifted > MAXV)      sat = MAXV[OUT_W-1:0];
    else if (shifted < MINV) sat = MINV[OUT_W-1:0];
    else                     sat = shifted[OUT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst)     dout <= '0;
    else if (en) dout <= sat;
  end

endmodule
