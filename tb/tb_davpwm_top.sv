// tb_davpwm_top: end-to-end test of the modulator at its default parameters
// (PERIOD = 5000 clock cycles per modulation period).
//
// The testbench plays a three-phase supply sampled once per period
// (w_i*T = 2*pi*50 Hz*100 us) through two line-to-line measurements and asks
// for output references at half the input frequency. It watches the nine
// switch signals cycle by cycle and, for every modulation period, turns the
// on-times into duty cycles. From them and the supply voltages at the
// matching sample it forms the averaged output voltages and checks that
// their line-to-line values equal cos(phi) times the requested ones (within
// 1.5 % of full scale). Four
// operating points are run, each after a settling time:
//   A. symmetric supply, q = 0.86, phi = 0 (at the transfer-ratio limit);
//   B. symmetric supply, q = 0.75, phi = -pi/6;
//   C. symmetric supply, q = 0.6,  phi = -pi/4;
//   D. asymmetric supply amplitudes 75 : 100 : 125, q = 0.55.
// In B and C (displacement-angle control) the fundamental input current of
// a resistive load must have the sign of quadrature part that phi asks for.
// q is relative to the nominal phase amplitude, 0.5 of full scale.
// In every cycle each output must be connected to exactly one input, and
// the duty core must take its result 5 clocks (100 ns) after each period
// start. The
// test counts how often each input sector, each output sector and each of
// the three switching orders were used, and the periods checked in each
// operating point; any of these that never happened counts as a failure.
module tb_davpwm_top;
  import davpwm_pkg::*;

  localparam int unsigned NOUT = 3;

  localparam int unsigned PERIOD = 5000;
  localparam int unsigned CALC   = 5;     // core settling time, in clocks
  localparam real PI   = 3.14159265358979;
  localparam real H    = 2.0 * PI * 50.0 / 10000.0;   // input angle per period
  localparam real FS   = 32767.0;

  logic clk = 0, rst_n = 0;
  q15_t v_i12, v_i23, w_ts, sogi_k, cos_phi, sin_phi, q_amp;
  logic [31:0] ref_step;
  logic [NIN-1:0] h [NOUT];
  duty_t d [NIN][NOUT], sum;
  logic [12:0] t_on [NIN][NOUT];
  sector_t si, so;
  logic signed [16:0] vsx;
  q15_t vsy;
  logic [12:0] cnt;
  logic period_start;

  davpwm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int si_seen [8], so_seen [8], order_seen [3], checked [4];
  int react_ok = 0;
  real max_err [4] = '{0.0, 0.0, 0.0, 0.0};

  // Operating point, set by the stimulus process.
  int  mode = 0;            // 0 = A, 1 = B, 2 = C, 3 = D
  bit  checking = 0;
  real amp [3] = '{0.5, 0.5, 0.5};
  real phi = 0.0, q = 0.8;
  int  period_n = -1;       // index of the current modulation period

  initial begin
    #200000000;
    $display("watchdog expired");
    failures++;
    $display("largest line-to-line error A/B/C/D, %% of full scale: %.3f %.3f %.3f %.3f",
             100.0 * max_err[0] / FS, 100.0 * max_err[1] / FS, 100.0 * max_err[2] / FS,
             100.0 * max_err[3] / FS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Zero-sequence-free phase voltages of sample n (Q15 units).
  function automatic void supply(input int n, output real v [3]);
    real m;
    for (int k = 0; k < 3; k++) v[k] = amp[k] * FS * $cos(H * n - k * 2.0 * PI / 3.0);
    m = (v[0] + v[1] + v[2]) / 3.0;
    for (int k = 0; k < 3; k++) v[k] -= m;
  endfunction

  function automatic real vref(input int n, input int j);
    real th;
    th = 2.0 * PI * real'(32'(longint'(n) * ref_step)) / 4294967296.0;
    return real'(q_amp) * $cos(th - j * 2.0 * PI / 3.0);
  endfunction

  // Drive the measurements for the sample taken at this period start.
  always @(negedge clk) begin
    if (rst_n && period_start) begin
      real v [3];
      period_n++;
      supply(period_n, v);
      v_i12 = q15_t'($rtoi(v[0] - v[1]));
      v_i23 = q15_t'($rtoi(v[1] - v[2]));
    end
  end

  // The duty core must take its result when the period counter reaches
  // CALC, i.e. 100 ns after the period start: its outputs may only change
  // at the clock edge that moves the counter from CALC to CALC + 1.
  logic [63:0] core_prev = '0;
  int    calc_seen = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if ({d[0][0], d[1][1], d[2][2], sum} != core_prev) begin
        checks++;
        if (cnt != 13'(CALC + 1)) begin
          failures++;
          $display("FAIL duty core updated at cnt %0d", cnt);
        end else calc_seen++;
      end
      core_prev = {d[0][0], d[1][1], d[2][2], sum};
    end
  end

  // Observe the switches. The pattern of the duties computed in period m-1
  // is output from cnt = 2 of period m to cnt = 1 of period m+1.
  int      on_cnt [3][3];
  int      win_period = -1;
  sector_t win_si, si_prev;
  always @(negedge clk) begin
    if (rst_n) begin
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (!$onehot(h[j])) begin
          failures++;
          $display("FAIL output %0d not connected to exactly one input: %b", j, h[j]);
        end
      end
      if (cnt == 2) begin
        if (win_period >= 0 && checking) evaluate(win_period);
        for (int k = 0; k < 3; k++) for (int j = 0; j < 3; j++) on_cnt[k][j] = 0;
        win_period = period_n;
        win_si = si_prev;
      end
      if (cnt == 1) si_prev = si;   // sector of the period's computation, seen before it updates
      for (int j = 0; j < 3; j++)
        for (int k = 0; k < 3; k++) if (h[j][k]) on_cnt[k][j]++;
    end
  end

  task automatic evaluate(input int m);
    real v [3], out [3], ci, cq, tol;
    supply(m, v);
    for (int j = 0; j < 3; j++) begin
      out[j] = 0.0;
      for (int k = 0; k < 3; k++) out[j] += real'(on_cnt[k][j]) / PERIOD * v[k];
    end
    tol = 0.015 * FS;
    for (int j = 0; j < 3; j++) begin
      real got, exp_;
      got  = out[j] - out[(j + 1) % 3];
      exp_ = $cos(phi) * (vref(m - 1, j) - vref(m - 1, (j + 1) % 3));
      checks++;
      if ((got - exp_) > max_err[mode]) max_err[mode] = got - exp_;
      if ((exp_ - got) > max_err[mode]) max_err[mode] = exp_ - got;
      if ((got - exp_) > tol || (exp_ - got) > tol) begin
        failures++;
        if (failures < 20)
          $display("FAIL mode %0d period %0d line %0d: got %f exp %f", mode, m, j, got, exp_);
      end
    end
    si_seen[win_si]++;
    unique case (win_si)
      3'd5, 3'd2: order_seen[0]++;
      3'd6, 3'd1: order_seen[1]++;
      3'd3, 3'd4: order_seen[2]++;
      default: ;
    endcase
    so_seen[so]++;
    checked[mode]++;
    // Input currents for a resistive load (i_o = v_o): i_k = sum_j d_kj i_oj.
    ci = 0.0; cq = 0.0;
    for (int k = 0; k < 3; k++) begin
      real ik;
      ik = 0.0;
      for (int j = 0; j < 3; j++)
        ik += real'(on_cnt[k][j]) / PERIOD * (out[j] - (out[0] + out[1] + out[2]) / 3.0);
      ci += ik * $cos(H * m - k * 2.0 * PI / 3.0);
      cq += ik * $sin(H * m - k * 2.0 * PI / 3.0);
    end
    if (mode == 1 || mode == 2) begin
      checks++;
      if (!(cq > 0.0 && ci > 0.0)) failures++;
      else react_ok++;
    end
  endtask

  task automatic wait_periods(input int n);
    repeat (n) @(posedge period_start);
  endtask

  real amp_next [3] = '{0.5, 0.5, 0.5};

  // Switch to an operating point at a period boundary, let it settle, then
  // check 400 periods (two input cycles, one output cycle).
  task automatic run_point(input int md, input real qv, input real ph, input int settle);
    checking = 0;
    wait (cnt == 3);
    mode = md;
    amp  = amp_next;
    set_point(qv, ph);
    wait_periods(settle);
    checking = 1;
    wait_periods(400);
    checking = 0;
  endtask

  task automatic set_point(input real qv, input real ph);
    q = qv; phi = ph;
    q_amp   = q15_t'($rtoi(qv * 0.5 * FS));
    cos_phi = q15_t'($rtoi(FS * $cos(ph)));
    sin_phi = q15_t'($rtoi(FS * $sin(ph)));
  endtask

  initial begin
    w_ts     = q15_t'($rtoi(H * 32768.0));
    sogi_k   = 16'sd11585;                       // sqrt(2) in Q2.13
    ref_step = 32'd10737418;                     // f_o = f_i / 2
    set_point(0.8, 0.0);
    v_i12 = 0; v_i23 = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // A: symmetric, unity displacement, q at its limit.
    run_point(0, 0.86, 0.0, 300);
    // B and C: displacement-angle control.
    run_point(1, 0.75, -PI / 6.0, 3);
    run_point(2, 0.60, -PI / 4.0, 3);
    // D: asymmetric supply.
    amp_next = '{0.375, 0.5, 0.625};
    run_point(3, 0.55, 0.0, 300);
    for (int s = 1; s <= 6; s++) begin
      checks += 2;
      if (si_seen[s] == 0) begin failures++; $display("FAIL input sector %0d never used", s); end
      if (so_seen[s] == 0) begin failures++; $display("FAIL output sector %0d never used", s); end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (order_seen[i] == 0) begin failures++; $display("FAIL switching order %0d never used", i); end
    end
    checks++;
    if (calc_seen == 0) begin failures++; $display("FAIL duty core never updated"); end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (checked[i] == 0) begin failures++; $display("FAIL operating point %0d never checked", i); end
    end
    $display("input sectors 1..6: %0d %0d %0d %0d %0d %0d", si_seen[1], si_seen[2], si_seen[3],
             si_seen[4], si_seen[5], si_seen[6]);
    $display("output sectors 1..6: %0d %0d %0d %0d %0d %0d", so_seen[1], so_seen[2], so_seen[3],
             so_seen[4], so_seen[5], so_seen[6]);
    $display("switching orders CABBAC/ABCCBA/BCAACB: %0d %0d %0d", order_seen[0], order_seen[1],
             order_seen[2]);
    $display("duty core updates, all 100 ns after the period start: %0d", calc_seen);
    $display("periods checked A/B/C/D: %0d %0d %0d %0d, displacement-sign checks passed: %0d",
             checked[0], checked[1], checked[2], checked[3], react_ok);
    $display("largest line-to-line error A/B/C/D, %% of full scale: %.3f %.3f %.3f %.3f",
             100.0 * max_err[0] / FS, 100.0 * max_err[1] / FS, 100.0 * max_err[2] / FS,
             100.0 * max_err[3] / FS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
