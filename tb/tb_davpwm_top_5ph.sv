// tb_davpwm_top_5ph: end-to-end test of the modulator built for a 3x5
// matrix converter (five output phases, NOUT = 5), at the default period of
// 5000 clock cycles.
//
// A symmetric three-phase supply, sampled once per period
// (w_i*T = 2*pi*50 Hz*100 us), is fed through two line-to-line measurements;
// five output references 72 degrees apart are requested at half the input
// frequency. For every modulation period the switch signals are counted into
// duty cycles, the averaged output voltages are formed from them and the
// supply at the matching sample, and the voltage between each pair of
// neighbouring outputs must equal cos(phi) times the requested one (within
// 1.5 % of full scale). With five outputs the spread of the references is
// 2*cos(pi/10) = 1.90 times their amplitude instead of sqrt(3) = 1.73, so
// the usable q is about 0.79 instead of 0.866. Two operating points:
//   A. q = 0.75, phi = 0;
//   B. q = 0.6,  phi = -pi/6 (the quadrature part of the input current of a
//      resistive load must have the sign phi asks for).
// Each output must be connected to exactly one input in every cycle, every
// input sector and every switching order must be used, and both operating
// points must be checked.
module tb_davpwm_top_5ph;
  import davpwm_pkg::*;

  localparam int unsigned NOUT   = 5;
  localparam int unsigned PERIOD = 5000;
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

  davpwm_top #(.NOUT(NOUT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int si_seen [8], order_seen [3], checked [2];
  int react_ok = 0;
  real max_err [2] = '{0.0, 0.0};

  int  mode = 0;            // 0 = A, 1 = B
  bit  checking = 0;
  real phi = 0.0, q = 0.7;
  int  period_n = -1;       // index of the current modulation period

  initial begin
    #100000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Phase voltages of sample n (Q15 units).
  function automatic void supply(input int n, output real v [3]);
    for (int k = 0; k < 3; k++) v[k] = 0.5 * FS * $cos(H * n - k * 2.0 * PI / 3.0);
  endfunction

  function automatic real vref(input int n, input int j);
    real th;
    th = 2.0 * PI * real'(32'(longint'(n) * ref_step)) / 4294967296.0;
    return real'(q_amp) * $cos(th - j * 2.0 * PI / NOUT);
  endfunction

  always @(negedge clk) begin
    if (rst_n && period_start) begin
      real v [3];
      period_n++;
      supply(period_n, v);
      v_i12 = q15_t'($rtoi(v[0] - v[1]));
      v_i23 = q15_t'($rtoi(v[1] - v[2]));
    end
  end

  // The pattern of the duties computed in period m-1 is output from cnt = 2
  // of period m to cnt = 1 of period m+1.
  int      on_cnt [3][NOUT];
  int      win_period = -1;
  sector_t win_si, si_prev;
  always @(negedge clk) begin
    if (rst_n) begin
      for (int j = 0; j < NOUT; j++) begin
        checks++;
        if (!$onehot(h[j])) begin
          failures++;
          $display("FAIL output %0d not connected to exactly one input: %b", j, h[j]);
        end
      end
      if (cnt == 2) begin
        if (win_period >= 0 && checking) evaluate(win_period);
        for (int k = 0; k < 3; k++) for (int j = 0; j < NOUT; j++) on_cnt[k][j] = 0;
        win_period = period_n;
        win_si = si_prev;
      end
      if (cnt == 1) si_prev = si;
      for (int j = 0; j < NOUT; j++)
        for (int k = 0; k < 3; k++) if (h[j][k]) on_cnt[k][j]++;
    end
  end

  task automatic evaluate(input int m);
    real v [3], out [NOUT], mean, ci, cq, tol;
    supply(m, v);
    mean = 0.0;
    for (int j = 0; j < NOUT; j++) begin
      out[j] = 0.0;
      for (int k = 0; k < 3; k++) out[j] += real'(on_cnt[k][j]) / PERIOD * v[k];
      mean += out[j] / NOUT;
    end
    tol = 0.015 * FS;
    for (int j = 0; j < NOUT; j++) begin
      real got, exp_;
      got  = out[j] - out[(j + 1) % NOUT];
      exp_ = $cos(phi) * (vref(m - 1, j) - vref(m - 1, (j + 1) % NOUT));
      checks++;
      if ((got - exp_) > max_err[mode]) max_err[mode] = got - exp_;
      if ((exp_ - got) > max_err[mode]) max_err[mode] = exp_ - got;
      if ((got - exp_) > tol || (exp_ - got) > tol) begin
        failures++;
        if (failures < 20)
          $display("FAIL mode %0d period %0d pair %0d: got %f exp %f", mode, m, j, got, exp_);
      end
    end
    si_seen[win_si]++;
    unique case (win_si)
      3'd5, 3'd2: order_seen[0]++;
      3'd6, 3'd1: order_seen[1]++;
      3'd3, 3'd4: order_seen[2]++;
      default: ;
    endcase
    checked[mode]++;
    // Input currents for a resistive load (i_o = v_o): i_k = sum_j d_kj i_oj.
    ci = 0.0; cq = 0.0;
    for (int k = 0; k < 3; k++) begin
      real ik;
      ik = 0.0;
      for (int j = 0; j < NOUT; j++)
        ik += real'(on_cnt[k][j]) / PERIOD * (out[j] - mean);
      ci += ik * $cos(H * m - k * 2.0 * PI / 3.0);
      cq += ik * $sin(H * m - k * 2.0 * PI / 3.0);
    end
    if (mode == 1) begin
      checks++;
      if (!(cq > 0.0 && ci > 0.0)) failures++;
      else react_ok++;
    end
  endtask

  task automatic wait_periods(input int n);
    repeat (n) @(posedge period_start);
  endtask

  task automatic set_point(input real qv, input real ph);
    q = qv; phi = ph;
    q_amp   = q15_t'($rtoi(qv * 0.5 * FS));
    cos_phi = q15_t'($rtoi(FS * $cos(ph)));
    sin_phi = q15_t'($rtoi(FS * $sin(ph)));
  endtask

  task automatic run_point(input int md, input real qv, input real ph, input int settle);
    checking = 0;
    wait (cnt == 3);
    mode = md;
    set_point(qv, ph);
    wait_periods(settle);
    checking = 1;
    wait_periods(400);
    checking = 0;
  endtask

  initial begin
    w_ts     = q15_t'($rtoi(H * 32768.0));
    sogi_k   = 16'sd11585;                       // sqrt(2) in Q2.13
    ref_step = 32'd10737418;                     // f_o = f_i / 2
    set_point(0.7, 0.0);
    v_i12 = 0; v_i23 = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    run_point(0, 0.75, 0.0, 300);
    run_point(1, 0.60, -PI / 6.0, 3);
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (si_seen[s] == 0) begin failures++; $display("FAIL input sector %0d never used", s); end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (order_seen[i] == 0) begin failures++; $display("FAIL switching order %0d never used", i); end
    end
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (checked[i] == 0) begin failures++; $display("FAIL operating point %0d never checked", i); end
    end
    $display("periods checked A/B: %0d %0d, displacement-sign checks passed: %0d",
             checked[0], checked[1], react_ok);
    $display("largest neighbour-pair error A/B, %% of full scale: %.3f %.3f",
             100.0 * max_err[0] / FS, 100.0 * max_err[1] / FS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
