// tb_davpwm_core: end-to-end check of the one-cycle duty computation.
// Balanced input pairs V*(cos, sin) with random angle, random output
// references q*V*cos(.) with q up to 0.86*cos(phi) and random displacement
// angles phi are applied with en high for one clock. It checks that
//  - every output changes at that same clock edge (one-cycle latency) and
//    holds while en is low,
//  - each column of duty numerators adds up to the denominator (3 LSB),
//  - the averaged output voltages sum_k d_kj/sum * v_k, taken with the real
//    (unrotated) input voltages, give line-to-line voltages equal to
//    cos(phi) times the reference line-to-line voltages (tolerance 0.4 %
//    of the input amplitude),
//  - the average input current direction: with all output currents equal
//    to the output voltages (resistive load), the input current vector is
//    rotated by phi against the input voltage (sign of the reactive part),
//  - si and so match comparisons done in the testbench,
//  - the published table of duty matrices per sector pair holds: in input
//    sectors 2/5, 1/6 and 3/4 the input 1, 2 or 3 respectively is the shift
//    vertex, and one output (chosen by so) is connected to it for the whole
//    period: its column is (sum, 0, 0) in that input's row order.
module tb_davpwm_core;
  import davpwm_pkg::*;

  localparam int unsigned NOUT = 3;

  localparam real PI = 3.14159265358979;
  localparam real V  = 0.6 * 32767.0;

  logic clk = 0, rst_n = 0, en = 0;
  q15_t vi_x [NIN], vi_y [NIN], vo_x [NOUT], r_cos, r_sin;
  duty_t d [NIN][NOUT], sum;
  sector_t si, so;
  logic signed [16:0] vsx;
  q15_t vsy;
  logic valid;
  int checks = 0, failures = 0, react_pos = 0, react_neg = 0, table_hits = 0;

  davpwm_core dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (si=%0d so=%0d sum=%0d)", what, si, so, sum);
    end
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_cos = 16'sh7FFF; r_sin = 0;
    for (int k = 0; k < 3; k++) begin vi_x[k] = 0; vi_y[k] = 0; vo_x[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      real thi, tho, phi, q, vr [3], out [3], ci, cq;
      duty_t sum_before;
      thi = ($urandom % 100000) / 100000.0 * 2.0 * PI;
      tho = ($urandom % 100000) / 100000.0 * 2.0 * PI;
      phi = (n % 4 == 0) ? 0.0 : (($urandom % 1000) / 1000.0 - 0.5) * PI / 2.0;
      q   = 0.86 * $cos(phi) * (($urandom % 1000) / 1000.0);
      @(negedge clk);
      r_cos = q15_t'($rtoi(32767.0 * $cos(phi)));
      r_sin = q15_t'($rtoi(32767.0 * $sin(phi)));
      for (int k = 0; k < 3; k++) begin
        vi_x[k] = q15_t'($rtoi(V * $cos(thi - k * 2.0 * PI / 3.0)));
        vi_y[k] = q15_t'($rtoi(V * $sin(thi - k * 2.0 * PI / 3.0)));
        vr[k]   = q * V * $cos(tho - k * 2.0 * PI / 3.0);
        vo_x[k] = q15_t'($rtoi(vr[k]));
      end
      sum_before = sum;
      @(posedge clk); #1;
      check(valid == 1'b0 && sum == sum_before, "no update without en");
      @(negedge clk); en = 1;
      @(posedge clk); #1;
      en = 0;
      check(valid == 1'b1, "valid one cycle after en");
      // Sectors.
      check(so == {vo_x[0] >= vo_x[1], vo_x[1] >= vo_x[2], vo_x[2] >= vo_x[0]}, "so");
      begin
        real yr [3];
        for (int k = 0; k < 3; k++) yr[k] = V * $sin(thi - k * 2.0 * PI / 3.0 + phi);
        if ($sqrt((yr[0] - yr[1]) ** 2) > 20 && $sqrt((yr[1] - yr[2]) ** 2) > 20 &&
            $sqrt((yr[2] - yr[0]) ** 2) > 20)
          check(si == {yr[0] >= yr[1], yr[1] >= yr[2], yr[2] >= yr[0]}, "si");
      end
      // Duty-matrix table: which input is the vertex, which output sits on it.
      if (q > 0.05) begin
        int vk, oj;
        vk = -1; oj = -1;
        unique case (si)
          3'd2, 3'd5: vk = 0;
          3'd1, 3'd6: vk = 1;
          3'd3, 3'd4: vk = 2;
          default: ;
        endcase
        // Sectors that shift with max_o (3, 5, 6) and those with min_o (1, 2, 4).
        if (si == 3'd3 || si == 3'd5 || si == 3'd6) begin
          if (so == 3'd4 || so == 3'd6) oj = 0;
          if (so == 3'd2 || so == 3'd3) oj = 1;
          if (so == 3'd1 || so == 3'd5) oj = 2;
        end else begin
          if (so == 3'd1 || so == 3'd3) oj = 0;
          if (so == 3'd4 || so == 3'd5) oj = 1;
          if (so == 3'd2 || so == 3'd6) oj = 2;
        end
        if (vk >= 0 && oj >= 0) begin
          table_hits++;
          for (int k = 0; k < 3; k++) begin
            int e;
            e = (k == vk) ? int'(sum) : 0;
            check(int'(d[k][oj]) - e <= 3 && e - int'(d[k][oj]) <= 3, "duty table entry");
          end
        end
      end
      // Column sums and synthesised voltages.
      for (int j = 0; j < 3; j++) begin
        real cs;
        cs = 0.0; out[j] = 0.0;
        for (int k = 0; k < 3; k++) begin
          cs += d[k][j];
          out[j] += real'(d[k][j]) / real'(sum) * V * $cos(thi - k * 2.0 * PI / 3.0);
        end
        check(cs >= sum - 3 && cs <= sum + 3, "column sum");
      end
      for (int j = 0; j < 3; j++) begin
        real got, exp_;
        got  = out[j] - out[(j + 1) % 3];
        exp_ = $cos(phi) * (vr[j] - vr[(j + 1) % 3]);
        check((got - exp_) < 0.004 * V && (exp_ - got) < 0.004 * V, "line-to-line output");
        if (!((got - exp_) < 0.004 * V && (exp_ - got) < 0.004 * V))
          $display("  n=%0d j=%0d got %f exp %f phi %f q %f", n, j, got, exp_, phi, q);
      end
      // Input current (resistive load i_o = v_o): i_k = sum_j d_kj * i_oj.
      ci = 0.0; cq = 0.0;
      for (int k = 0; k < 3; k++) begin
        real ik;
        ik = 0.0;
        for (int j = 0; j < 3; j++) ik += real'(d[k][j]) / real'(sum) * (out[j] - (out[0] + out[1] + out[2]) / 3.0);
        ci += ik * $cos(thi - k * 2.0 * PI / 3.0);
        cq += ik * $sin(thi - k * 2.0 * PI / 3.0);
      end
      if (q > 0.3 && (phi > 0.2 || phi < -0.2)) begin
        // The input current's quadrature part follows the sign of phi.
        check((cq > 0) == (phi < 0), "input current displacement sign");
        if (cq > 0) react_pos++; else react_neg++;
      end
    end
    check(react_pos > 0 && react_neg > 0, "both displacement signs exercised");
    check(table_hits > 1000, "duty table exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
