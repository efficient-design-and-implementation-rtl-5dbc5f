// Testbench for baud_rate_gen with 1, 2 and 4 bits per symbol: random serial
// bits are shifted in, and after every symbol strobe b must hold the symbol's
// bits (first bit in the MSB) and bx the running XOR of all codes so far.
module tb_baud_rate_gen;
  logic clk = 0, rst_n = 0, run = 0;
  logic bit_stb = 0, sym_stb = 0, din = 0;
  logic [0:0] b1, bx1;
  logic [1:0] b2, bx2;
  logic [3:0] b4, bx4;
  int checks = 0, failures = 0;

  baud_rate_gen #(.K(1)) dut1 (.clk, .rst_n, .run, .bit_stb, .sym_stb(sym_stb), .din, .b(b1), .bx(bx1));
  baud_rate_gen #(.K(2)) dut2 (.clk, .rst_n, .run, .bit_stb, .sym_stb(sym_stb), .din, .b(b2), .bx(bx2));
  baud_rate_gen #(.K(4)) dut4 (.clk, .rst_n, .run, .bit_stb, .sym_stb(sym_stb), .din, .b(b4), .bx(bx4));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Feed nbits bits, 3 clocks apart; the symbol strobe of K = 1, 2 and 4 can
  // only be exercised one at a time, so each width gets its own pass.
  task automatic pass(input int k);
    int code, acc;
    acc = 0;
    @(negedge clk); run = 1;
    for (int s = 0; s < 40; s++) begin
      code = 0;
      for (int j = 0; j < k; j++) begin
        din = 1'($urandom);
        code = (code << 1) | int'(din);
        bit_stb = 1;
        sym_stb = (j == k - 1);
        @(negedge clk);
        bit_stb = 0; sym_stb = 0;
        repeat (2) @(negedge clk);
      end
      acc ^= code;
      case (k)
        1: begin check(int'(b1), code, "b1"); check(int'(bx1), acc, "bx1"); end
        2: begin check(int'(b2), code, "b2"); check(int'(bx2), acc, "bx2"); end
        default: begin check(int'(b4), code, "b4"); check(int'(bx4), acc, "bx4"); end
      endcase
    end
    run = 0;
    @(negedge clk);
    check(int'(b1), 0, "b1 cleared"); check(int'(bx2), 0, "bx2 cleared"); check(int'(b4), 0, "b4 cleared");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    pass(1);
    pass(2);
    pass(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
