// Design three: 8-PSK, 8-QAM and 16-QAM.
//
// One carrier cycle (256 samples, one every SAMPLE_DIV clocks) per symbol.
// Two baud rate generators run side by side: one collects 3 DIN bits per symbol
// (B3, for 8-PSK and 8-QAM), the other 4 bits (B4, for 16-QAM), each on its own
// bit clock (a third and a quarter of a symbol). SEL picks the generator and
// the code table; each code is a start sample (phase) and an amplitude:
//   SEL 00 8-PSK : Gray-coded, 22.5 + 45*k deg, full amplitude
//   SEL 01 8-QAM : 4 phases (45, 135, 225, 315 deg) x amplitudes 1.0 / 0.33
//   SEL 1x 16-QAM: square constellation; corners 1.0, inner points 0.33, edge
//                  points 0.77 at 15 deg from an axis
// The printed code tables are the reference design's. The 16-QAM codes of the
// lower half-plane follow the symmetry of the printed upper half: bit 3 is the
// sign of the in-phase axis, bit 2 the sign of the quadrature axis. SAMPLE_DIV
// = 12 (3072 clocks per symbol) is this design's choice so that both bit
// periods (1024 and 768 clocks) are whole numbers of clocks.
//
// The symbol's carrier settings and strobes are also brought out (car_*) so
// that a system holding several designs can drive one shared carrier
// generator; dout is this design's own generator output.
//
// Timing: DIN is sampled where bit_stb (the selected mode's bit clock) is
// high; the symbol goes out during the next symbol period, plus one clock.
module design_three
  import mod_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV = 12
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

  // [0] sample clock, [1] bit clock for 3-bit symbols, [2] for 4-bit symbols
  logic [2:0] tick;
  logic       sym_stb;
  logic [2:0] b3;
  logic [3:0] b4;
  carrier_cfg_t cfg;

  bit_rate_gen #(
    .N(3),
    .PERIOD({32'(SYM_CLKS / 4), 32'(SYM_CLKS / 3), 32'(SAMPLE_DIV)}),
    .SYM_CLKS(SYM_CLKS)
  ) u_rate (
    .clk, .rst_n, .run(st), .tick, .sym_stb
  );

  baud_rate_gen #(.K(3)) u_baud3 (
    .clk, .rst_n, .run(st), .bit_stb(tick[1]), .sym_stb, .din, .b(b3), .bx()
  );

  baud_rate_gen #(.K(4)) u_baud4 (
    .clk, .rst_n, .run(st), .bit_stb(tick[2]), .sym_stb, .din, .b(b4), .bx()
  );

  assign bit_stb = sel[1] ? tick[2] : tick[1];

  function automatic carrier_cfg_t psk8(input logic [2:0] code);
    carrier_cfg_t c;
    c = '{phase: 8'd0, gain: GAIN_FULL, rate: 2'd0};
    unique case (code)
      3'b000: c.phase = 8'h10;   //  22.5 deg
      3'b001: c.phase = 8'h30;   //  67.5
      3'b011: c.phase = 8'h50;   // 112.5
      3'b010: c.phase = 8'h70;   // 157.5
      3'b110: c.phase = 8'h90;   // 202.5
      3'b111: c.phase = 8'hB0;   // 247.5
      3'b101: c.phase = 8'hD0;   // 292.5
      default: c.phase = 8'hF0;  // 337.5 (code 100)
    endcase
    return c;
  endfunction

  function automatic carrier_cfg_t qam8(input logic [2:0] code);
    carrier_cfg_t c;
    c.rate = 2'd0;
    c.gain = code[0] ? GAIN_FULL : GAIN_THIRD;
    unique case (code[2:1])
      2'b11:   c.phase = 8'h20;  //  45 deg
      2'b10:   c.phase = 8'h60;  // 135 deg
      2'b00:   c.phase = 8'hA0;  // 225 deg
      default: c.phase = 8'hE0;  // 315 deg (codes 01x)
    endcase
    return c;
  endfunction

  function automatic carrier_cfg_t qam16(input logic [3:0] code);
    carrier_cfg_t c;
    c.rate = 2'd0;
    unique case (code)
      4'b1110: c = '{phase: 8'h0B, gain: GAIN_077,   rate: 2'd0};  //  15 deg
      4'b1111: c = '{phase: 8'h20, gain: GAIN_FULL,  rate: 2'd0};  //  45
      4'b1100: c = '{phase: 8'h20, gain: GAIN_THIRD, rate: 2'd0};  //  45
      4'b1101: c = '{phase: 8'h35, gain: GAIN_077,   rate: 2'd0};  //  75
      4'b0101: c = '{phase: 8'h4B, gain: GAIN_077,   rate: 2'd0};  // 105
      4'b0111: c = '{phase: 8'h60, gain: GAIN_FULL,  rate: 2'd0};  // 135
      4'b0100: c = '{phase: 8'h60, gain: GAIN_THIRD, rate: 2'd0};  // 135
      4'b0110: c = '{phase: 8'h75, gain: GAIN_077,   rate: 2'd0};  // 165
      4'b0010: c = '{phase: 8'h8B, gain: GAIN_077,   rate: 2'd0};  // 195
      4'b0011: c = '{phase: 8'hA0, gain: GAIN_FULL,  rate: 2'd0};  // 225
      4'b0000: c = '{phase: 8'hA0, gain: GAIN_THIRD, rate: 2'd0};  // 225
      4'b0001: c = '{phase: 8'hB5, gain: GAIN_077,   rate: 2'd0};  // 255
      4'b1001: c = '{phase: 8'hCB, gain: GAIN_077,   rate: 2'd0};  // 285
      4'b1011: c = '{phase: 8'hE0, gain: GAIN_FULL,  rate: 2'd0};  // 315
      4'b1000: c = '{phase: 8'hE0, gain: GAIN_THIRD, rate: 2'd0};  // 315
      default: c = '{phase: 8'hF5, gain: GAIN_077,   rate: 2'd0};  // 345 (1010)
    endcase
    return c;
  endfunction

  always_comb begin
    unique case (d3_sel_e'(sel))
      D3_PSK8: cfg = psk8(b3);
      D3_QAM8: cfg = qam8(b3);
      default: cfg = qam16(b4);
    endcase
  end

  assign car_cfg     = cfg;
  assign car_sym_stb = sym_stb;
  assign car_tick    = tick[0];

  carrier_gen u_carrier (
    .clk, .rst_n, .run(st), .sym_stb, .sample_tick(tick[0]),
    .phase(cfg.phase), .gain(cfg.gain), .dout
  );

  initial assert (SAMPLE_DIV >= 3 && SAMPLE_DIV % 3 == 0)
    else $error("SAMPLE_DIV must be a multiple of 3");

endmodule
