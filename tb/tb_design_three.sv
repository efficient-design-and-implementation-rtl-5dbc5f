// Testbench for design_three: every modulation type of the design is run as a
// stream of random symbols that first walks through every code. Each output
// sample is compared with the reference model one clock after the cycle that
// produces it, the bit strobe is checked against the bit period, and the
// symbol latency (bits collected in one symbol period go out in the next) is
// part of the expected waveform.
module tb_design_three;
  import tb_mod_ref_pkg::*;

  localparam int DESIGN = 2;
  localparam int SDIV   = 12;
  localparam int T      = 256 * SDIV;   // clocks per symbol

  logic clk = 0, rst_n = 0, st = 0, din = 0;
  logic [1:0] sel = 0;
  logic bit_stb;
  logic [7:0] dout;
  mod_pkg::carrier_cfg_t car_cfg;
  logic car_sym_stb, car_tick;
  int checks = 0, failures = 0;

  design_three dut (.clk, .rst_n, .st, .din, .sel, .bit_stb, .dout, .car_cfg, .car_sym_stb, .car_tick);

  always #5 clk = ~clk;

  initial begin
    #(10 * 400000 * T / 256);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (sel %0d)", what, sel);
    end
  endtask

  task automatic stream(input int s, input int nsym);
    int k, bt, ncodes;
    int codes[$];
    int tx[$];
    int bits[$];
    int enc;
    ref_cfg_t c;
    k = bits_per_sym(DESIGN, s);
    bt = T / k;
    ncodes = 1 << k;
    // stopped: output rests at mid-scale
    @(negedge clk);
    st = 0; sel = 2'(s);
    repeat (3) @(negedge clk);
    check(dout == 8'h80 && !bit_stb, "idle output");
    // symbol codes: every code once, then random
    for (int m = 0; m < nsym; m++)
      codes.push_back(m < ncodes ? (m * 5 + 3) % ncodes : int'($urandom % ncodes));
    enc = 0;
    tx.push_back(0);            // the first symbol period sends code 0
    foreach (codes[m]) begin
      enc ^= codes[m];
      tx.push_back(is_diff(DESIGN, s) ? enc : codes[m]);
      for (int j = k - 1; j >= 0; j--) bits.push_back((codes[m] >> j) & 1);
    end
    for (int t = 0; t < (nsym + 1) * T; t++) begin
      int m, u;
      m = t / T; u = t % T;
      st = 1;
      din = (t / bt < bits.size()) ? 1'(bits[t / bt]) : 1'($urandom);
      #1;
      check(bit_stb == (t % bt == bt - 1), $sformatf("bit strobe at t=%0d", t));
      c = cfg(DESIGN, s, tx[m], SDIV);
      // the exported carrier settings and strobes match the symbol too
      check(int'(car_cfg.phase) == c.phase && int'(car_cfg.gain) == c.gain,
            $sformatf("exported carrier settings t=%0d", t));
      check(car_sym_stb == (u == T - 1) && car_tick == (u % c.div == c.div - 1),
            $sformatf("exported strobes t=%0d", t));
      @(posedge clk); #1;
      check(int'(dout) == sample_at(c, u),
            $sformatf("sample t=%0d sym %0d code %0d: got %0h expected %0h", t, m, tx[m], dout, sample_at(c, u)));
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    stream(0, 10);
    stream(1, 10);
    stream(2, 18);
    stream(3, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
