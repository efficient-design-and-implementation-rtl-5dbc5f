// Testbench for amp_scaler: every 8-bit sample at every amplitude the
// modulator uses (0, 1/4, 0.33, 1/2, 0.77, 1), against real arithmetic.
module tb_amp_scaler;
  import tb_mod_ref_pkg::*;

  logic [7:0] sample, scaled;
  logic [8:0] gain;
  int checks = 0, failures = 0;
  int gains[6] = '{0, 64, 85, 128, 197, 256};

  amp_scaler dut (.sample, .gain, .scaled);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (gains[g])
      for (int s = 0; s < 256; s++) begin
        sample = 8'(s);
        gain   = 9'(gains[g]);
        #1;
        checks++;
        if (int'(scaled) != scale(s, gains[g])) begin
          failures++;
          if (failures < 10)
            $display("FAIL sample %0d gain %0d: got %0d expected %0d", s, gains[g], scaled, scale(s, gains[g]));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
