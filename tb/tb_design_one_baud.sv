// Baud-rate testbench for design_one: the binary modulator is built with the
// carrier-sample dividers of the reference design's baud-rate table (640, 320,
// 160, 80, 40 and 20 source clocks per sample) and with its default of 8. For
// each, all four types (ASK, PSK, DPSK, FSK) run a short random stream with a
// 50 MHz clock (20 ns per clock); every output sample is compared with the reference model and
// the measured bit period is checked against 256 * divider clocks.
module tb_design_one_baud;
  import tb_mod_ref_pkg::*;

  localparam int NR = 7;
  localparam int DIVS[NR] = '{640, 320, 160, 80, 40, 20, 8};

  logic clk = 0, rst_n = 0, din = 0;
  logic [NR-1:0] st = '0;
  logic [1:0] sel = 0;
  logic [NR-1:0] bit_stb;
  logic [7:0] dout [NR];
  int checks = 0, failures = 0;

  for (genvar r = 0; r < NR; r++) begin : g_dut
    mod_pkg::carrier_cfg_t car_cfg;
    logic car_sym_stb, car_tick;
    design_one #(.SAMPLE_DIV(DIVS[r])) dut (
      .clk, .rst_n, .st(st[r]), .din, .sel, .bit_stb(bit_stb[r]), .dout(dout[r]),
      .car_cfg, .car_sym_stb, .car_tick
    );
  end

  always #10 clk = ~clk;   // one clock = 20 time units, read as 20 ns (50 MHz)

  initial begin
    #(64'd20 * 64'd9_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic stream(input int r, input int s, input int nsym);
    int T, enc, m, u;
    int bits[$];
    int tx[$];
    int t_first, t_last;
    int nstb;
    ref_cfg_t c;
    T = 256 * DIVS[r];
    @(negedge clk);
    st = '0; sel = 2'(s);
    repeat (3) @(negedge clk);
    enc = 0;
    tx.push_back(0);
    for (int i = 0; i < nsym; i++) begin
      bits.push_back(i < 2 ? i : int'($urandom % 2));
      enc ^= bits[i];
      tx.push_back(is_diff(0, s) ? enc : bits[i]);
    end
    nstb = 0;
    for (int t = 0; t < (nsym + 1) * T; t++) begin
      m = t / T; u = t % T;
      st[r] = 1'b1;
      din = (m < nsym) ? 1'(bits[m]) : 1'b0;
      #1;
      if (bit_stb[r]) begin
        if (nstb == 0) t_first = t;
        t_last = t;
        nstb++;
      end
      c = cfg(0, s, tx[m], DIVS[r]);
      @(posedge clk); #1;
      check(int'(dout[r]) == sample_at(c, u),
            $sformatf("divider %0d sel %0d t=%0d: got %0h expected %0h", DIVS[r], s, t, dout[r], sample_at(c, u)));
      @(negedge clk);
    end
    // bit period: (nsym + 1) strobes, 256 * divider clocks apart
    check(nstb == nsym + 1, $sformatf("divider %0d: %0d bit strobes", DIVS[r], nstb));
    check((t_last - t_first) == nsym * T,
          $sformatf("divider %0d: bit period %0d clocks", DIVS[r], (t_last - t_first) / nsym));
    if (s == 0)
      $display("divider %0d: bit period %0d clocks = %0.3f us at 50 MHz, %0.2f bit/s", DIVS[r],
               (t_last - t_first) / nsym, 0.02 * (t_last - t_first) / nsym,
               50.0e6 / (real'(t_last - t_first) / nsym));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NR; r++)
      for (int s = 0; s < 4; s++)
        stream(r, s, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
