// tb_in_rotation: checks the displacement-angle rotation of the input
// vectors against a real-valued rotation for random vectors and angles
// (tolerance 2 LSB), including phi = 0 (identity) exactly.
module tb_in_rotation;
  import davpwm_pkg::*;

  q15_t vi_x [NIN], vi_y [NIN], viR_x [NIN], viR_y [NIN];
  q15_t r_cos, r_sin;
  int   checks = 0, failures = 0;

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  in_rotation dut (.*);

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      real phi, c, s;
      phi = (n == 0) ? 0.0 : ($urandom % 100000) / 100000.0 * 6.2831853 - 3.14159265;
      c = $cos(phi); s = $sin(phi);
      r_cos = (n == 0) ? 16'sh7FFF : q15_t'($rtoi(c * 32767.0));
      r_sin = (n == 0) ? 16'sh0000 : q15_t'($rtoi(s * 32767.0));
      for (int k = 0; k < NIN; k++) begin
        vi_x[k] = q15_t'($signed($urandom % 46000) - 23000);
        vi_y[k] = q15_t'($signed($urandom % 46000) - 23000);
      end
      #1;
      for (int k = 0; k < NIN; k++) begin
        real ex, ey, cq, sq;
        cq = r_cos / 32768.0; sq = r_sin / 32768.0;
        ex = vi_x[k] * cq - vi_y[k] * sq;
        ey = vi_x[k] * sq + vi_y[k] * cq;
        checks += 2;
        if (fabs(viR_x[k] - ex) > 2.0 || fabs(viR_y[k] - ey) > 2.0) begin
          failures++;
          $display("FAIL k=%0d in=(%0d,%0d) phi=%f got (%0d,%0d) exp (%f,%f)", k,
                   vi_x[k], vi_y[k], phi, viR_x[k], viR_y[k], ex, ey);
        end
        if (n == 0) begin
          checks++;
          if (fabs(viR_x[k] - vi_x[k]) > 1 || fabs(viR_y[k] - vi_y[k]) > 1) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
