// Testbench for bit_rate_gen at design one's settings (sample periods 8 and 4,
// bit period 2048): every strobe must fire exactly on the last clock of its
// period, counted from the rise of run, and restart when run drops.
module tb_bit_rate_gen;
  logic clk = 0, rst_n = 0, run = 0;
  logic [2:0] tick;
  logic sym_stb;
  int checks = 0, failures = 0;
  int period[3] = '{8, 4, 2048};
  int count[3];
  int nsym;

  bit_rate_gen dut (.clk, .rst_n, .run, .tick, .sym_stb);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_for(input int cycles);
    count = '{0, 0, 0};
    nsym = 0;
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      run = 1;
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (tick[i] !== (t % period[i] == period[i] - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL tick[%0d] at t=%0d: %0b", i, t, tick[i]);
        end
        if (tick[i]) count[i]++;
      end
      checks++;
      if (sym_stb !== (t % 2048 == 2047)) begin
        failures++;
        if (failures < 10) $display("FAIL sym_stb at t=%0d", t);
      end
      if (sym_stb) nsym++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // idle: nothing fires
    repeat (20) begin
      @(negedge clk);
      checks++;
      if (tick != 0 || sym_stb) failures++;
    end
    run_for(3 * 2048);
    // rate: strobes per 3 symbols
    checks++; if (count[0] != 3 * 256) begin failures++; $display("FAIL CLK2 count %0d", count[0]); end
    checks++; if (count[1] != 3 * 512) begin failures++; $display("FAIL CLK1 count %0d", count[1]); end
    checks++; if (count[2] != 3)       begin failures++; $display("FAIL CLK3 count %0d", count[2]); end
    checks++; if (nsym != 3)           begin failures++; $display("FAIL symbol count %0d", nsym); end
    // stop part-way through and restart: counting starts over
    run_for(1000);
    @(negedge clk); run = 0;
    @(negedge clk);
    run_for(2 * 2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
