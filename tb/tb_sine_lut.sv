// Testbench for sine_lut: every entry against the table formula, plus the
// landmarks of the carrier cycle (0x80 at n = 0 and 128, 0xFF at 64, 0x00 at 192).
module tb_sine_lut;
  import tb_mod_ref_pkg::*;

  logic [7:0] addr, data;
  int checks = 0, failures = 0;

  sine_lut dut (.addr, .data);

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      addr = 8'(n);
      #1;
      expect_eq(int'(data), sine(n), $sformatf("ROM(%0d)", n));
    end
    addr = 8'd0;   #1; expect_eq(int'(data), 'h80, "start at mid-scale");
    addr = 8'd64;  #1; expect_eq(int'(data), 'hFF, "positive peak");
    addr = 8'd128; #1; expect_eq(int'(data), 'h80, "half-cycle mid-scale");
    addr = 8'd192; #1; expect_eq(int'(data), 'h00, "negative peak");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
