// tb_line_to_phase: random balanced phase voltages (sum zero) are turned
// into the two line-to-line voltages; the block must give the phase
// voltages back within 2 LSB. A voltage set with a zero-sequence part must
// come back without it.
module tb_line_to_phase;
  import davpwm_pkg::*;

  q15_t v12, v23, v [NIN];
  int   checks = 0, failures = 0;

  line_to_phase dut (.*);

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int p [3], z;
      p[0] = $signed($urandom % 20000) - 10000;
      p[1] = $signed($urandom % 20000) - 10000;
      p[2] = -p[0] - p[1];
      z    = (n % 2) ? $signed($urandom % 6000) - 3000 : 0;  // zero sequence
      v12  = q15_t'((p[0] + z) - (p[1] + z));
      v23  = q15_t'((p[1] + z) - (p[2] + z));
      #1;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if ((v[k] - p[k]) > 2 || (p[k] - v[k]) > 2) begin
          failures++;
          $display("FAIL n=%0d k=%0d got %0d exp %0d", n, k, v[k], p[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
