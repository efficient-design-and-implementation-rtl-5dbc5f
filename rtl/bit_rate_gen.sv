// Bit rate generation: divides the source clock into enable strobes.
//
// The reference design derives clocks CLK1..CLK4 (carrier sample clocks), a bit
// clock and a symbol clock from the 50 MHz source. Here they are one-clock-wide
// enables in the source clock domain: tick[i] pulses on the last clock of every
// PERIOD[i] clocks and sym_stb on the last clock of every SYM_CLKS clocks. All
// counters restart while run (ST) is low, so with every PERIOD[i] dividing
// SYM_CLKS the strobes stay aligned to symbol boundaries.
//
// Defaults are design one's: 8 clocks per carrier sample (CLK2), 4 (CLK1, the
// second FSK tone) and 2048 (CLK3, the bit clock), i.e. 24414.06 bit/s from
// 50 MHz with 256 samples per carrier cycle.
module bit_rate_gen #(
  parameter int unsigned N = 3,
  // PERIOD[i] in source clocks, element 0 in the least significant 32 bits
  parameter logic [N-1:0][31:0] PERIOD = {32'd2048, 32'd4, 32'd8},
  parameter int unsigned SYM_CLKS = 2048
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  output logic [N-1:0] tick,
  output logic         sym_stb
);

  localparam int unsigned CW = $clog2(SYM_CLKS + 1);

  logic [CW-1:0] sym_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           sym_cnt <= '0;
    else if (!run)                        sym_cnt <= '0;
    else if (sym_cnt == CW'(SYM_CLKS - 1)) sym_cnt <= '0;
    else                                  sym_cnt <= sym_cnt + 1'b1;
  end

  assign sym_stb = run && (sym_cnt == CW'(SYM_CLKS - 1));

  for (genvar i = 0; i < N; i++) begin : g_div
    logic [CW-1:0] cnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                            cnt <= '0;
      else if (!run)                         cnt <= '0;
      else if (cnt == CW'(PERIOD[i] - 32'd1))    cnt <= '0;
      else                                   cnt <= cnt + 1'b1;
    end
    assign tick[i] = run && (cnt == CW'(PERIOD[i] - 32'd1));

    // Every divider must fit a whole number of times into a symbol.
    initial assert (PERIOD[i] > 0 && SYM_CLKS % int'(PERIOD[i]) == 0)
      else $error("PERIOD[%0d]=%0d does not divide SYM_CLKS=%0d", i, PERIOD[i], SYM_CLKS);
  end

endmodule
