// tb_in_sector: checks the input sector and shift vector.
// For random rotated input vectors and output references it checks that
//  - si equals the three y comparisons,
//  - vsy is the y of the vertex that lies between the other two in y,
//  - vsx moves the smallest or the largest reference exactly onto that
//    vertex, as the published table for the sector prescribes,
// and, for balanced inputs of amplitude 0.6 and references up to 0.86 of
// the input amplitude, that all three shifted reference points lie in_tri
// the input triangle (non-negative barycentric weights, real arithmetic).
// A sweep of the input angle also checks the sector order 5 4 6 2 3 1.
module tb_in_sector;
  import davpwm_pkg::*;

  q15_t               viR_x [NIN], viR_y [NIN];
  q15_t               max_o, min_o;
  sector_t            si;
  logic signed [16:0] vsx;
  q15_t               vsy;
  int                 checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  in_sector dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: si=%0d vsx=%0d vsy=%0d y=%0d %0d %0d", what, si, vsx, vsy,
               viR_y[0], viR_y[1], viR_y[2]);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sector_t seen [$];
    sector_t order [6] = '{3'd5, 3'd4, 3'd6, 3'd2, 3'd3, 3'd1};
    // Published choice of min (0) or max (1) per sector 1..6.
    bit use_max [7] = '{0, 0, 0, 1, 0, 1, 1};
    for (int n = 0; n < 3000; n++) begin
      real th, tho, q, vo [3];
      int  mid;
      th  = ($urandom % 100000) / 100000.0 * 2.0 * PI;
      tho = ($urandom % 100000) / 100000.0 * 2.0 * PI;
      q   = 0.86 * (($urandom % 1000) / 1000.0);
      for (int k = 0; k < NIN; k++) begin
        viR_x[k] = q15_t'($rtoi(0.6 * 32767 * $cos(th - k * 2.0 * PI / 3.0)));
        viR_y[k] = q15_t'($rtoi(0.6 * 32767 * $sin(th - k * 2.0 * PI / 3.0)));
        vo[k]    = q * 0.6 * 32767 * $cos(tho - k * 2.0 * PI / 3.0);
      end
      max_o = q15_t'($rtoi(vo[0])); min_o = max_o;
      for (int k = 1; k < 3; k++) begin
        if ($rtoi(vo[k]) > max_o) max_o = q15_t'($rtoi(vo[k]));
        if ($rtoi(vo[k]) < min_o) min_o = q15_t'($rtoi(vo[k]));
      end
      #1;
      check(si == {viR_y[0] >= viR_y[1], viR_y[1] >= viR_y[2], viR_y[2] >= viR_y[0]}, "si");
      mid = -1;
      for (int k = 0; k < 3; k++) begin
        int a, b;
        a = (k + 1) % 3; b = (k + 2) % 3;
        if ((viR_y[k] >= viR_y[a] && viR_y[k] <= viR_y[b]) ||
            (viR_y[k] <= viR_y[a] && viR_y[k] >= viR_y[b])) mid = k;
      end
      check(vsy == viR_y[mid], "vsy is intermediate vertex");
      if (si >= 1 && si <= 6)
        check(vsx == 17'(viR_x[mid]) - 17'(use_max[si] ? max_o : min_o), "vsx");
      // Shifted references in_tri the triangle.
      for (int j = 0; j < 3; j++) begin
        real px, py, den, w [3];
        bit  in_tri;
        px = $rtoi(vo[j]) + vsx; py = vsy;
        den = (real'(viR_x[1]) - real'(viR_x[0])) * (real'(viR_y[2]) - real'(viR_y[0])) -
              (real'(viR_y[1]) - real'(viR_y[0])) * (real'(viR_x[2]) - real'(viR_x[0]));
        in_tri = 1;
        for (int k = 0; k < 3; k++) begin
          int a, b;
          a = (k + 1) % 3; b = (k + 2) % 3;
          w[k] = ((viR_x[a] - px) * (viR_y[b] - py) - (viR_x[b] - px) * (viR_y[a] - py)) / den;
          if (w[k] < -0.002) in_tri = 0;
        end
        check(in_tri, "reference in_tri synthesis triangle");
      end
    end
    for (int n = 0; n < 3600; n++) begin
      real th;
      th = 2.0 * PI * n / 3600.0 + 0.001;
      for (int k = 0; k < NIN; k++) begin
        viR_x[k] = q15_t'($rtoi(20000.0 * $cos(th - k * 2.0 * PI / 3.0)));
        viR_y[k] = q15_t'($rtoi(20000.0 * $sin(th - k * 2.0 * PI / 3.0)));
      end
      #1;
      if (seen.size() == 0 || seen[$] != si) seen.push_back(si);
    end
    if (seen.size() == 7 && seen[6] == seen[0]) void'(seen.pop_back());
    check(seen.size() == 6, "six input sectors per turn");
    if (seen.size() == 6) begin
      int off;
      off = 0;
      for (int i = 0; i < 6; i++) if (order[i] == seen[0]) off = i;
      for (int i = 0; i < 6; i++) check(seen[i] == order[(off + i) % 6], "input sector order");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
