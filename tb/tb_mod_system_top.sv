// End-to-end testbench for mod_system_top at its default sizes.
//
// Runs all eleven modulation types through the 4-bit SEL, each as a stream of
// symbols that first walks through every code, then switches the type inside
// design one and inside design two while ST stays high, switches between
// designs with ST high (one clock at rest, then a fresh start), and checks the
// idle selection. Every output sample, every bit strobe and the one-symbol latency
// are compared with the reference model. The testbench counts how often each
// mechanism happened (each type, differential encoding in both states, FSK tone
// changes, zero-amplitude symbols, reduced-amplitude QAM points, design
// restarts on a SEL[3:2] change with ST low and high, live SEL[1:0]
// switches, idle) and counts a
// failure for any that never did.
module tb_mod_system_top;
  import tb_mod_ref_pkg::*;

  localparam int SDIV[3] = '{8, 12, 12};   // the designs' default sample periods

  logic clk = 0, rst_n = 0, st = 0, din = 0;
  logic [3:0] sel = 0;
  logic bit_stb;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_type[12];          // index dsg*4 + sel (design three 2 and 3 both 16-QAM)
  int n_diff_flip = 0;     // differential symbols whose sent code differs from the data code
  int n_fsk_change = 0;    // consecutive symbols on different tones
  int n_zero_amp = 0;      // ASK / 4-ASK symbols with no carrier
  int n_low_amp = 0;       // QAM symbols at 0.33 or 0.77 amplitude
  int n_restart = 0;       // SEL[3:2] changes
  int n_live_switch = 0;   // SEL[1:0] changes with ST high
  int n_live_restart = 0;  // SEL[3:2] changes with ST high
  int n_idle = 0;          // idle selection checked

  mod_system_top dut (.clk, .rst_n, .st, .din, .sel, .bit_stb, .dout);

  always #5 clk = ~clk;

  initial begin
    #(10 * 2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (sel %b)", what, sel);
    end
  endtask

  // One stream on design dsg; sels[m] is SEL[1:0] during symbol period m
  // (all with the same bits per symbol). The stream starts from ST low.
  task automatic stream(input int dsg, input int sels[$], input bit live = 0);
    int k, bt, ncodes, nsym, tsym, enc, prev_div;
    int codes[$];
    int tx[$];
    int bits[$];
    ref_cfg_t c;
    nsym = sels.size() - 1;
    tsym = 256 * SDIV[dsg];
    k = bits_per_sym(dsg, sels[0]);
    bt = tsym / k;
    ncodes = 1 << k;
    @(negedge clk);
    if (int'(sel[3:2]) != dsg) n_restart++;
    if (live) begin
      // switch designs with ST high: one clock at rest, then a fresh start
      sel = 4'((dsg << 2) | sels[0]);
      #1;
      check(!bit_stb, "no bit strobe while switching");
      @(posedge clk); #1;
      check(dout == 8'h80, "switching clock output");
      n_live_restart++;
      @(negedge clk);
    end else begin
      st = 0;
      sel = 4'((dsg << 2) | sels[0]);
      repeat (3) @(negedge clk);
      check(dout == 8'h80 && !bit_stb, "stopped output");
    end
    for (int m = 0; m < nsym; m++)
      codes.push_back(m < ncodes ? (m * 5 + 3) % ncodes : int'($urandom % ncodes));
    enc = 0;
    tx.push_back(0);
    foreach (codes[m]) begin
      enc ^= codes[m];
      tx.push_back(enc);   // differential code; the plain code is codes[m]
      for (int j = k - 1; j >= 0; j--) bits.push_back((codes[m] >> j) & 1);
    end
    prev_div = -1;
    for (int m = 0; m <= nsym; m++) begin
      int code;
      code = (m == 0) ? 0 : is_diff(dsg, sels[m]) ? tx[m] : codes[m - 1];
      c = cfg(dsg, sels[m], code, SDIV[dsg]);
      // mechanism bookkeeping
      if (m > 0) begin
        n_type[dsg * 4 + sels[m]]++;
        if (int'(sel[1:0]) != sels[m]) n_live_switch++;
        if (is_diff(dsg, sels[m]) && code != codes[m - 1]) n_diff_flip++;
        if (c.gain == 0) n_zero_amp++;
        if (dsg == 2 && sels[m] != 0 && c.gain != 256) n_low_amp++;
        if (prev_div != -1 && c.div != prev_div) n_fsk_change++;
      end
      prev_div = c.div;
      for (int u = 0; u < tsym; u++) begin
        int t;
        t = m * tsym + u;
        st = 1;
        sel = 4'((dsg << 2) | sels[m]);
        din = (t / bt < bits.size()) ? 1'(bits[t / bt]) : 1'($urandom);
        #1;
        check(bit_stb == (t % bt == bt - 1), $sformatf("bit strobe t=%0d", t));
        @(posedge clk); #1;
        check(int'(dout) == sample_at(c, u),
              $sformatf("sample t=%0d sym %0d code %0d: got %0h expected %0h", t, m, code, dout, sample_at(c, u)));
        @(negedge clk);
      end
    end
  endtask

  function automatic int q_nsym(input int k);
    return (1 << k) + 2;
  endfunction

  initial begin
    int s[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // every type as its own stream
    for (int d = 0; d < 3; d++)
      for (int t = 0; t < 4; t++) begin
        s = {};
        for (int m = 0; m <= q_nsym(bits_per_sym(d, t)); m++) s.push_back(t);
        stream(d, s);
      end
    // live type switches inside design one and design two
    stream(0, '{1, 1, 1, 2, 2, 2, 0, 0, 3, 3, 3, 1});
    stream(1, '{2, 2, 2, 3, 3, 3, 3, 0, 0, 1, 1, 2}, 1);
    stream(2, '{1, 1, 1, 1, 1}, 1);
    stream(0, '{3, 3, 3, 3}, 1);
    // idle selection
    @(negedge clk);
    sel = 4'b1100; st = 1;
    #1;
    check(!dut.u_d1.st && !dut.u_d2.st && !dut.u_d3.st, "no design started when idle");
    repeat (50) begin
      @(negedge clk);
      check(dout == 8'h80 && !bit_stb, "idle selection");
      n_idle++;
    end
    st = 0;
    // every mechanism must have happened
    for (int i = 0; i < 11; i++) begin
      checks++;
      if (n_type[i] == 0) begin failures++; $display("FAIL type %0d never ran", i); end
    end
    checks++; if (n_diff_flip == 0)   begin failures++; $display("FAIL no differential phase flip"); end
    checks++; if (n_fsk_change == 0)  begin failures++; $display("FAIL no FSK tone change"); end
    checks++; if (n_zero_amp == 0)    begin failures++; $display("FAIL no zero-amplitude symbol"); end
    checks++; if (n_low_amp == 0)     begin failures++; $display("FAIL no reduced-amplitude QAM symbol"); end
    checks++; if (n_restart == 0)     begin failures++; $display("FAIL no design restart"); end
    checks++; if (n_live_switch == 0) begin failures++; $display("FAIL no live type switch"); end
    checks++; if (n_live_restart == 0) begin failures++; $display("FAIL no design switch with ST high"); end
    checks++; if (n_idle == 0)        begin failures++; $display("FAIL idle never checked"); end
    $display("types run (symbols): %p", n_type);
    $display("diff flips %0d, FSK tone changes %0d, zero-amplitude %0d, reduced QAM %0d, restarts %0d (with ST high %0d), live switches %0d, idle %0d",
             n_diff_flip, n_fsk_change, n_zero_amp, n_low_amp, n_restart, n_live_restart, n_live_switch, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
