// tb_duty_column: checks the three duty numerators of one output phase
// against determinants computed in real arithmetic, scaled like the block
// (|det| / 2^LSB, saturated at 2^16-1 above bit MSB), for random triangles
// and points; the tolerance is 1 LSB. It also checks that the three
// numerators of a point in_tri the triangle add up to the triangle's own
// determinant within 3 LSB.
module tb_duty_column;
  import davpwm_pkg::*;

  localparam int unsigned MSB = 33, LSB = 18;
  q15_t               viR_x [NIN], viR_y [NIN];
  q15_t               vo_x, vsy;
  logic signed [16:0] vsx;
  duty_t              d [NIN];
  int                 checks = 0, failures = 0;

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  duty_column #(.MSB(MSB), .LSB(LSB)) dut (.*);

  function automatic real scaled(input real det);
    real a;
    a = (det < 0) ? -det : det;
    if (a >= 2.0 ** (MSB + 1)) return 65535.0;
    return a / (2.0 ** LSB);
  endfunction

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      real px, py, e, s0, tot;
      bit  in_tri;
      for (int k = 0; k < NIN; k++) begin
        viR_x[k] = q15_t'($urandom);
        viR_y[k] = q15_t'($urandom);
      end
      vo_x = q15_t'($signed($urandom % 40000) - 20000);
      vsx  = 17'($signed($urandom % 40000) - 20000);
      vsy  = q15_t'($urandom);
      if (n % 2 == 0) begin
        // A point in_tri: a convex combination of the vertices.
        real w0, w1, w2;
        w0 = ($urandom % 1000) / 1000.0; w1 = ($urandom % 1000) / 1000.0 * (1.0 - w0);
        w2 = 1.0 - w0 - w1;
        vsy = q15_t'($rtoi(w0 * viR_y[0] + w1 * viR_y[1] + w2 * viR_y[2]));
        vsx = 17'($rtoi(w0 * viR_x[0] + w1 * viR_x[1] + w2 * viR_x[2]) - vo_x);
      end
      #1;
      px = real'(vo_x) + real'(vsx); py = vsy;
      tot = 0.0;
      for (int k = 0; k < NIN; k++) begin
        int a, b;
        a = (k + 1) % 3; b = (k + 2) % 3;
        e = scaled((viR_x[a] - px) * (viR_y[b] - py) - (viR_x[b] - px) * (viR_y[a] - py));
        tot += d[k];
        checks++;
        if (fabs(real'(d[k]) - e) > 1.0) begin
          failures++;
          $display("FAIL n=%0d k=%0d got %0d exp %f", n, k, d[k], e);
        end
      end
      s0 = scaled((real'(viR_x[1]) - real'(viR_x[0])) * (real'(viR_y[2]) - real'(viR_y[0])) -
                  (real'(viR_y[1]) - real'(viR_y[0])) * (real'(viR_x[2]) - real'(viR_x[0])));
      in_tri = (n % 2 == 0);
      if (in_tri && s0 < 65535.0) begin
        checks++;
        if (fabs(tot - s0) > 3.0) begin
          failures++;
          $display("FAIL n=%0d sum %f vs triangle %f", n, tot, s0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
