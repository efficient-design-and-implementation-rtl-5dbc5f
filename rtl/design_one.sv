// Design one: binary modulator for ASK, BPSK, DPSK and BFSK.
//
// One bit per symbol. Bit rate generation makes CLK2 (one carrier sample every
// SAMPLE_DIV clocks, 256 samples = one carrier cycle per bit), CLK1 (twice as
// fast, two carrier cycles per bit) and CLK3 (the bit clock, 256*SAMPLE_DIV
// clocks). Baud rate generation captures one DIN bit per CLK3 as B1 and the
// differential bit BX1 = BX1(previous) XOR B1. The selected type maps the bit
// onto the carrier:
//   SEL 00 ASK : B1=0 no carrier (0x80),  B1=1 ADD[0..255]           (CLK2)
//   SEL 01 PSK : B1=0 ADD[0..255],        B1=1 ADD[128..255,0..127]  (CLK2)
//   SEL 10 DPSK: as PSK, on BX1
//   SEL 11 FSK : B1=0 one cycle on CLK2,  B1=1 two cycles on CLK1
// The mapping and the 8-clock sample period (24414.06 bit/s at 50 MHz) are the
// reference design's; the enable-strobe clocking and one-symbol latency are
// this implementation's.
//
// The symbol's carrier settings and strobes are also brought out (car_*) so
// that a system holding several designs can drive one shared carrier
// generator; dout is this design's own generator output.
//
// Timing: DIN is sampled on the clock where bit_stb is high; that bit is
// transmitted during the next bit period, with one more clock of output
// register latency. dout rests at 0x80 while st is low.
module design_one
  import mod_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       st,
  input  logic       din,
  input  logic [1:0] sel,
  output logic       bit_stb,
  output logic [7:0] dout,
  // carrier settings, for a carrier generator shared with other designs
  output carrier_cfg_t car_cfg,
  output logic       car_sym_stb,
  output logic       car_tick
);

  localparam int unsigned SYM_CLKS = SAMPLES * SAMPLE_DIV;

  logic [2:0] tick;      // [0] CLK2, [1] CLK1, [2] CLK3
  logic       sym_stb;
  logic [0:0] b1, bx1;
  carrier_cfg_t cfg;
  logic       sample_tick;

  bit_rate_gen #(
    .N(3),
    .PERIOD({32'(SYM_CLKS), 32'(SAMPLE_DIV / 2), 32'(SAMPLE_DIV)}),
    .SYM_CLKS(SYM_CLKS)
  ) u_rate (
    .clk, .rst_n, .run(st), .tick, .sym_stb
  );

  assign bit_stb = tick[2];

  baud_rate_gen #(.K(1)) u_baud (
    .clk, .rst_n, .run(st), .bit_stb, .sym_stb, .din, .b(b1), .bx(bx1)
  );

  always_comb begin
    cfg = '{phase: 8'd0, gain: GAIN_FULL, rate: 2'd0};
    unique case (d1_sel_e'(sel))
      D1_ASK:  cfg.gain  = b1[0]  ? GAIN_FULL : GAIN_ZERO;
      D1_PSK:  cfg.phase = b1[0]  ? 8'd128 : 8'd0;
      D1_DPSK: cfg.phase = bx1[0] ? 8'd128 : 8'd0;
      D1_FSK:  cfg.rate  = b1[0]  ? 2'd1 : 2'd0;
      default: ;
    endcase
  end

  assign sample_tick = (cfg.rate == 2'd1) ? tick[1] : tick[0];

  assign car_cfg     = cfg;
  assign car_sym_stb = sym_stb;
  assign car_tick    = sample_tick;

  carrier_gen u_carrier (
    .clk, .rst_n, .run(st), .sym_stb, .sample_tick,
    .phase(cfg.phase), .gain(cfg.gain), .dout
  );

  initial assert (SAMPLE_DIV >= 2 && SAMPLE_DIV % 2 == 0)
    else $error("SAMPLE_DIV must be even");

endmodule
