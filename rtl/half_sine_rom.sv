// Half-compressed sine look-up table.
//
// The table describes one sine period of 2^ADDR_W samples (8192 by
// default), each an unsigned DATA_W-bit word (0..255) centred on 127.5:
//   v(a) = floor(127.5 + 127.5*sin(2*pi*a/2^ADDR_W) + 0.5).
// Only the first half period (2^(ADDR_W-1) words) is stored. The MSB of the
// address selects the second half, which is read as the bitwise complement
// (255 - v) of the first; since the stored values are symmetric about 127.5
// this reproduces the full period exactly and halves the memory. The
// 8192 x 8 size and the halving follow the specification; the mirror
// method and the rounding formula are this design's choices. Contents are
// computed at elaboration.
//
// Timing: synchronous read, data is valid one clock after addr.
module half_sine_rom #(
  parameter int unsigned ADDR_W = 13,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 2 ** (ADDR_W - 1);
  localparam real         PI    = 3.14159265358979323846;
  localparam real         MID   = (2.0 ** DATA_W - 1.0) / 2.0;

  typedef logic [DATA_W-1:0] rom_t [DEPTH];

  function automatic rom_t fill_rom();
    rom_t r;
    for (int i = 0; i < int'(DEPTH); i++)
      r[i] = DATA_W'(int'($floor(MID + MID * $sin(PI * real'(i) / real'(DEPTH)) + 0.5)));
    return r;
  endfunction

  localparam rom_t ROM = fill_rom();

  always_ff @(posedge clk) begin
    if (addr[ADDR_W-1]) data <= ~ROM[addr[ADDR_W-2:0]];
    else                data <=  ROM[addr[ADDR_W-2:0]];
  end

endmodule
