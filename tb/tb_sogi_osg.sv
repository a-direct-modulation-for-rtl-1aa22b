// tb_sogi_osg: drives one SOGI-OSG with a sampled cosine of amplitude 0.6
// at w*Ts = 0.0314 (50 Hz sampled at 10 kHz) and gain k = sqrt(2). After
// 1000 steps of settling it checks over two fundamental periods that, after
// the step for sample n, vx = V*cos(w (n+1) Ts) and vy = V*sin(w (n+1) Ts),
// within 1 % of full scale. It also checks that a DC offset on the input does not
// appear in the in-phase output, and that nothing changes without en.
module tb_sogi_osg;
  import davpwm_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real H  = 2.0 * PI * 50.0 / 10000.0;
  localparam real V  = 0.6 * 32767.0;

  logic clk = 0, rst_n = 0, en = 0;
  q15_t v, w_ts, k, vx, vy;
  int   checks = 0, failures = 0;

  sogi_osg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real dc, input int steps, input bit chk);
    for (int n = 0; n < steps; n++) begin
      real th;
      th = H * n;
      @(negedge clk);
      v  = q15_t'($rtoi(V * $cos(th) + dc));
      en = 1;
      @(negedge clk);
      en = 0;
      if (chk) begin
        real ex, ey, tol;
        ex = V * $cos(th + H); ey = V * $sin(th + H);
        tol = (dc != 0.0) ? 0.01 * 32767 : 0.002 * 32767;
        checks += 2;
        // With a DC input the quadrature output carries k times the offset
        // (the SOGI's low-pass path), so only vx is compared then.
        if (dc != 0.0) ey = real'(vy);
        if ((vx - ex) > tol || (ex - vx) > tol || (vy - ey) > tol || (ey - vy) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d vx=%0d exp %f vy=%0d exp %f", n, vx, ex, vy, ey);
        end
      end
    end
  endtask

  initial begin
    v = 0; w_ts = q15_t'($rtoi(H * 32768.0)); k = 16'sd11585;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0.0, 1000, 0);
    run(0.0, 400, 1);
    // Hold: no en, outputs must stay.
    begin
      q15_t hx, hy;
      hx = vx; hy = vy;
      repeat (20) @(posedge clk);
      checks++;
      if (vx != hx || vy != hy) failures++;
    end
    // DC offset of 5 % full scale: in-phase output rejects it (band-pass);
    // the quadrature output carries a bounded offset, so only vx is tight.
    run(0.05 * 32767, 2000, 0);
    run(0.05 * 32767, 400, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
