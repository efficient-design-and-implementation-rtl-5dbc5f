// Design two: quaternary modulator for 4-ASK, 4-FSK, QPSK and DQPSK.
//
// Two bits per symbol, one carrier cycle of 256 samples per symbol at the base
// rate. Bit rate generation makes four sample clocks, CLK4 (every SAMPLE_DIV
// clocks), CLK3 (x2), CLK2 (x3) and CLK1 (x4), plus the bit clock (half a
// symbol). Baud rate generation 2 collects two DIN bits into B2 (first bit in
// the MSB) and the differential code BX2 = BX2(previous) XOR B2.
//   SEL 00 4-ASK: B2 00/01/10/11 -> amplitude 0, 1/4, 1/2, full (CLK4)
//   SEL 01 4-FSK: B2 00/01/10/11 -> 1, 2, 3, 4 carrier cycles (CLK4..CLK1)
//   SEL 10 QPSK : B2 11/01/00/10 -> 45/135/225/315 deg, start sample 32/96/160/224
//   SEL 11 DQPSK: as QPSK, on BX2
// The code tables are the reference design's. SAMPLE_DIV = 12 is this design's
// choice: it is the smallest period for which all four sample clocks are whole
// numbers of source clocks (3072 clocks per symbol, 16276 baud at 50 MHz).
//
// The symbol's carrier settings and strobes are also brought out (car_*) so
// that a system holding several designs can drive one shared carrier
// generator; dout is this design's own generator output.
//
// Timing: DIN is sampled where bit_stb is high; a symbol's two bits are
// transmitted during the next symbol period, plus one clock of output latency.
module design_two
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

  // [0] CLK4, [1] CLK3, [2] CLK2, [3] CLK1, [4] bit clock
  logic [4:0] tick;
  logic       sym_stb;
  logic [1:0] b2, bx2;
  carrier_cfg_t cfg;
  logic       sample_tick;

  bit_rate_gen #(
    .N(5),
    .PERIOD({32'(SYM_CLKS / 2), 32'(SAMPLE_DIV / 4), 32'(SAMPLE_DIV / 3),
              32'(SAMPLE_DIV / 2), 32'(SAMPLE_DIV)}),
    .SYM_CLKS(SYM_CLKS)
  ) u_rate (
    .clk, .rst_n, .run(st), .tick, .sym_stb
  );

  assign bit_stb = tick[4];

  baud_rate_gen #(.K(2)) u_baud (
    .clk, .rst_n, .run(st), .bit_stb, .sym_stb, .din, .b(b2), .bx(bx2)
  );

  function automatic phase_t qpsk_phase(input logic [1:0] code);
    unique case (code)
      2'b11:   return 8'd32;    //  45 deg
      2'b01:   return 8'd96;    // 135 deg
      2'b00:   return 8'd160;   // 225 deg
      default: return 8'd224;   // 315 deg (code 10)
    endcase
  endfunction

  always_comb begin
    cfg = '{phase: 8'd0, gain: GAIN_FULL, rate: 2'd0};
    unique case (d2_sel_e'(sel))
      D2_ASK4:
        unique case (b2)
          2'b00:   cfg.gain = GAIN_ZERO;
          2'b01:   cfg.gain = GAIN_QUARTER;
          2'b10:   cfg.gain = GAIN_HALF;
          default: cfg.gain = GAIN_FULL;
        endcase
      D2_FSK4:  cfg.rate  = b2;
      D2_QPSK:  cfg.phase = qpsk_phase(b2);
      D2_DQPSK: cfg.phase = qpsk_phase(bx2);
      default: ;
    endcase
  end

  always_comb begin
    unique case (cfg.rate)
      2'd0:    sample_tick = tick[0];
      2'd1:    sample_tick = tick[1];
      2'd2:    sample_tick = tick[2];
      default: sample_tick = tick[3];
    endcase
  end

  assign car_cfg     = cfg;
  assign car_sym_stb = sym_stb;
  assign car_tick    = sample_tick;

  carrier_gen u_carrier (
    .clk, .rst_n, .run(st), .sym_stb, .sample_tick,
    .phase(cfg.phase), .gain(cfg.gain), .dout
  );

  initial assert (SAMPLE_DIV >= 12 && SAMPLE_DIV % 12 == 0)
    else $error("SAMPLE_DIV must be a multiple of 12");

endmodule
