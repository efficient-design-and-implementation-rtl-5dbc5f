// Multi-type digital modulation system: eleven modulation types, one output.
//
// The three sub-designs (binary; quaternary; 8-ary and 16-QAM) keep their own
// rate and baud generators and code tables, and one shared carrier generator
// (the single 256-sample sine table, amplitude scaler and output register)
// plays the carrier settings of whichever design is selected. The 4-bit SEL
// chooses the type:
//   SEL[3:2] = 00 design one  : SEL[1:0] 00 ASK,   01 PSK,   10 DPSK,   11 FSK
//   SEL[3:2] = 01 design two  : SEL[1:0] 00 4-ASK, 01 4-FSK, 10 QPSK,   11 DQPSK
//   SEL[3:2] = 10 design three: SEL[1:0] 00 8-PSK, 01 8-QAM, 1x 16-QAM
//   SEL[3:2] = 11 idle, dout = 0x80
// Only the selected design receives ST; the others are held stopped. On the
// clock where SEL[3:2] differs from its value one clock earlier, every design
// and the shared carrier are held stopped for that one clock, so the newly
// chosen design starts from a fresh symbol exactly as if ST had just risen.
// A change of SEL[1:0] switches the mapping at once. The SEL coding and this
// switching behaviour are this design's choices; the reference design says
// only that a 4-bit SEL picks the type and that one table serves all types.
// The sub-designs' own carrier generators are left unconnected here (and are
// removed by synthesis).
//
// Interface: serial DIN, sampled on the clock where bit_stb is high (its rate
// depends on the type), 8-bit unsigned dout for an external 8-bit DAC; one
// clock of latency from carrier settings to dout, as in each design.
module mod_system_top
  import mod_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       st,
  input  logic       din,
  input  logic [3:0] sel,
  output logic       bit_stb,
  output logic [7:0] dout
);

  logic [1:0]   dsel, dsel_q;
  logic         switching, idle, run;
  logic [2:0]   st_d;
  logic [2:0]   stb_d;
  carrier_cfg_t cfg_d [3];
  logic [2:0]   sym_d, tick_d;
  carrier_cfg_t cfg;
  logic         sym_stb, sample_tick;

  assign dsel = sel[3:2];
  assign idle = (dsel == 2'b11);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dsel_q <= 2'b00;
    else        dsel_q <= dsel;
  end

  assign switching = (dsel != dsel_q);
  assign run       = st && !idle && !switching;

  always_comb begin
    st_d = '0;
    if (!idle) st_d[dsel] = run;
  end

  design_one u_d1 (
    .clk, .rst_n, .st(st_d[0]), .din, .sel(sel[1:0]), .bit_stb(stb_d[0]), .dout(),
    .car_cfg(cfg_d[0]), .car_sym_stb(sym_d[0]), .car_tick(tick_d[0])
  );

  design_two u_d2 (
    .clk, .rst_n, .st(st_d[1]), .din, .sel(sel[1:0]), .bit_stb(stb_d[1]), .dout(),
    .car_cfg(cfg_d[1]), .car_sym_stb(sym_d[1]), .car_tick(tick_d[1])
  );

  design_three u_d3 (
    .clk, .rst_n, .st(st_d[2]), .din, .sel(sel[1:0]), .bit_stb(stb_d[2]), .dout(),
    .car_cfg(cfg_d[2]), .car_sym_stb(sym_d[2]), .car_tick(tick_d[2])
  );

  always_comb begin
    if (idle) begin
      cfg         = '{phase: 8'd0, gain: GAIN_ZERO, rate: 2'd0};
      sym_stb     = 1'b0;
      sample_tick = 1'b0;
      bit_stb     = 1'b0;
    end else begin
      cfg         = cfg_d[dsel];
      sym_stb     = sym_d[dsel];
      sample_tick = tick_d[dsel];
      bit_stb     = stb_d[dsel];
    end
  end

  carrier_gen u_carrier (
    .clk, .rst_n, .run, .sym_stb, .sample_tick,
    .phase(cfg.phase), .gain(cfg.gain), .dout
  );

endmodule
