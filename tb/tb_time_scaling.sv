// tb_time_scaling: loads random duty numerators and denominators (including
// numerators above the denominator, which must clamp to PERIOD, and a zero
// denominator, which must give zero) and compares the nine on-times with
// floor(num*PERIOD/sum) computed in the testbench. It checks the latency:
// done must be high in the cycle 9*(NW+1)+1 cycles after the cycle in which
// start is high, and t must keep its old values until then.
module tb_time_scaling;
  import davpwm_pkg::*;

  localparam int unsigned NOUT = 3;

  localparam int unsigned PERIOD = 5000;
  localparam int unsigned TW = $clog2(PERIOD + 1);
  localparam int unsigned NW = 16 + TW;

  logic          clk = 0, rst_n = 0, start = 0;
  duty_t         num [NIN][NOUT], sum;
  logic [TW-1:0] t [NIN][NOUT];
  logic          busy, done;
  int            checks = 0, failures = 0;

  time_scaling #(.PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TW-1:0] prev00;
    for (int k = 0; k < 3; k++) for (int j = 0; j < 3; j++) num[k][j] = 0;
    sum = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      duty_t nm [3][3], sm;
      int cyc;
      sm = (n == 5) ? 16'd0 : duty_t'($urandom % 65535 + 1);
      for (int k = 0; k < 3; k++)
        for (int j = 0; j < 3; j++) begin
          nm[k][j] = (n % 3 == 0 && k == j) ? duty_t'(sm + ($urandom % 100)) : duty_t'($urandom % (sm + 1));
          if (nm[k][j] > 0 && nm[k][j] < sm && $urandom % 4 == 0) nm[k][j] = sm;
        end
      @(negedge clk);
      num = nm; sum = sm; start = 1;
      prev00 = t[0][0];
      @(negedge clk);
      start = 0;
      for (int k = 0; k < 3; k++) for (int j = 0; j < 3; j++) num[k][j] = duty_t'($urandom);
      cyc = 1;
      while (!done && cyc < 1000) begin
        checks++;
        if (t[0][0] != prev00) failures++;
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != 9 * (NW + 1) + 1) begin
        failures++;
        $display("FAIL latency %0d expected %0d", cyc, 9 * (NW + 1) + 1);
      end
      @(negedge clk);
      for (int k = 0; k < 3; k++)
        for (int j = 0; j < 3; j++) begin
          longint e;
          e = (sm == 0) ? 0 : (longint'(nm[k][j]) * PERIOD) / sm;
          if (e > PERIOD) e = PERIOD;
          checks++;
          if (t[k][j] != TW'(e)) begin
            failures++;
            $display("FAIL n=%0d k=%0d j=%0d num=%0d sum=%0d got %0d exp %0d", n, k, j,
                     nm[k][j], sm, t[k][j], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
