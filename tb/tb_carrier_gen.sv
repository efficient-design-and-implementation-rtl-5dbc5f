// Testbench for carrier_gen: symbols of 1024 clocks with random start sample,
// amplitude and sample period (4 clocks = one carrier cycle per symbol, 2 =
// two cycles, 1 = four cycles); every output sample is compared with the
// formula, one clock after the inputs that produce it.
module tb_carrier_gen;
  import tb_mod_ref_pkg::*;

  localparam int S = 1024;

  logic clk = 0, rst_n = 0, run = 0, sym_stb = 0, sample_tick = 0;
  logic [7:0] phase = 0, dout;
  logic [8:0] gain = 0;
  int checks = 0, failures = 0;
  int gains[6] = '{0, 64, 85, 128, 197, 256};
  int divs[3]  = '{4, 2, 1};

  carrier_gen dut (.clk, .rst_n, .run, .sym_stb, .sample_tick, .phase, .gain, .dout);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_cfg_t c;
    int exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (dout != 8'h80) failures++;
    for (int s = 0; s < 20; s++) begin
      c.phase = (s == 0) ? 0 : int'($urandom % 256);
      c.gain  = gains[$urandom % 6];
      c.div   = divs[s % 3];
      for (int u = 0; u < S; u++) begin
        run = 1;
        phase = 8'(c.phase);
        gain = 9'(c.gain);
        sym_stb = (u == S - 1);
        sample_tick = (u % c.div == c.div - 1);
        exp = sample_at(c, u);
        @(posedge clk); #1;
        checks++;
        if (int'(dout) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL sym %0d u %0d: got %0h expected %0h", s, u, dout, exp);
        end
        @(negedge clk);
      end
    end
    run = 0;
    @(posedge clk); #1;
    checks++; if (dout != 8'h80) begin failures++; $display("FAIL idle output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
