// Carrier look-up table: one cycle of a sine wave in 256 unsigned 8-bit samples.
//
// ROM(n) = floor(A/2 + A/2 * sin(2*pi*n/DEPTH)) with A = 2^WIDTH - 1 = 255, so
// the wave runs from mid-scale 0x80 up to 0xFF (n = 64), back to mid-scale
// (n = 128) and down to 0x00 (n = 192). The two mid-scale samples n = 0 and
// n = DEPTH/2 hold exactly 0x80. This single table is the only carrier source
// of every modulation type: phase shifts are start offsets into it, frequency
// changes are faster address steps and amplitude changes are applied after it.
// The formula and the 256 x 8 size follow the reference design; the contents
// are computed here at elaboration by a constant function, so synthesis sees
// a constant ROM and no data file is needed.
//
// Interface: addr -> data, combinational read (the caller registers it).
module sine_lut #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         data
);

  typedef logic [WIDTH-1:0] table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    real half, v;
    half = real'((1 << WIDTH) - 1) / 2.0;
    for (int n = 0; n < DEPTH; n++) begin
      if (n == 0 || 2 * n == DEPTH) begin
        t[n] = WIDTH'(1 << (WIDTH - 1));
      end else begin
        v = $floor(half + half * $sin(2.0 * $acos(-1.0) * n / DEPTH));
        t[n] = WIDTH'(int'(v));
      end
    end
    return t;
  endfunction

  localparam table_t ROM = make_table();

  assign data = ROM[addr];

endmodule
