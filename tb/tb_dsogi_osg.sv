// tb_dsogi_osg: three-phase check of the quadrature generator. Balanced
// phase voltages of amplitude 0.5 at w*Ts = 0.0314 are stepped for 1500
// samples; afterwards, for every phase k, (vi_x, vi_y) must equal
// V*(cos, sin)(w (n+1) Ts - k*2*pi/3) within 0.2 % of full scale, and the
// three analytic pairs must sum to zero (balanced set).
module tb_dsogi_osg;
  import davpwm_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real H  = 2.0 * PI * 50.0 / 10000.0;
  localparam real V  = 0.5 * 32767.0;

  logic clk = 0, rst_n = 0, en = 0;
  q15_t v [NIN], w_ts, k, vi_x [NIN], vi_y [NIN];
  int   checks = 0, failures = 0;

  dsogi_osg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 3; p++) v[p] = 0;
    w_ts = q15_t'($rtoi(H * 32768.0)); k = 16'sd11585;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) v[p] = q15_t'($rtoi(V * $cos(H * n - p * 2.0 * PI / 3.0)));
      en = 1;
      @(negedge clk);
      en = 0;
      if (n >= 1500) begin
        int sx, sy;
        sx = 0; sy = 0;
        for (int p = 0; p < 3; p++) begin
          real ex, ey, tol;
          ex = V * $cos(H * (n + 1) - p * 2.0 * PI / 3.0);
          ey = V * $sin(H * (n + 1) - p * 2.0 * PI / 3.0);
          tol = 0.002 * 32767;
          checks++;
          if ((vi_x[p] - ex) > tol || (ex - vi_x[p]) > tol || (vi_y[p] - ey) > tol || (ey - vi_y[p]) > tol) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d p=%0d (%0d,%0d) exp (%f,%f)", n, p, vi_x[p], vi_y[p], ex, ey);
          end
          sx += vi_x[p]; sy += vi_y[p];
        end
        checks++;
        if (sx > 12 || sx < -12 || sy > 12 || sy < -12) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
