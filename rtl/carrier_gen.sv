// Carrier wave generation: turns a carrier_cfg_t per symbol into DAC samples.
//
// A sample index restarts at 0 on the last clock of every symbol (sym_stb) and
// advances by one on every sample_tick, wrapping modulo 256, so a symbol that
// lasts k*256 ticks plays k whole carrier cycles. The table address is
// (phase + index) mod 256: a symbol with start sample p reads
// ADD[p]..ADD[255], ADD[0]..ADD[p-1]. The table output is scaled by gain and
// registered. Playing the table from a start sample on a chosen sample clock
// follows the reference design; the gain input, the registered output and
// the restart on sym_stb are this design's way of doing it.
//
// Interface: run low holds the index at 0 and the output at mid-scale 0x80.
// Timing: dout follows (phase, gain, index) with one clock of latency.
module carrier_gen
  import mod_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   run,
  input  logic   sym_stb,
  input  logic   sample_tick,
  input  phase_t phase,
  input  gain_t  gain,
  output logic [7:0] dout
);

  logic [7:0] index;
  logic [7:0] addr;
  logic [7:0] lut_q;
  logic [7:0] scaled;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             index <= '0;
    else if (!run)          index <= '0;
    else if (sym_stb)       index <= '0;
    else if (sample_tick)   index <= index + 8'd1;
  end

  assign addr = phase + index;

  sine_lut u_lut (.addr(addr), .data(lut_q));

  amp_scaler u_amp (.sample(lut_q), .gain(gain), .scaled(scaled));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    dout <= MID_SCALE;
    else if (!run) dout <= MID_SCALE;
    else           dout <= scaled;
  end

endmodule
