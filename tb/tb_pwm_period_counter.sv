// tb_pwm_period_counter: with PERIOD = 7 checks that cnt counts 0..6 and
// reloads, that period_start is high exactly when cnt is 0, and that the
// strobes come every 7 cycles; then with reset held the counter stays at 0.
module tb_pwm_period_counter;
  localparam int unsigned PERIOD = 7;

  logic       clk = 0, rst_n = 0;
  logic [2:0] cnt;
  logic       period_start;
  int         checks = 0, failures = 0;

  pwm_period_counter #(.PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_cnt, last_start, starts;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (cnt != 0) failures++;
    rst_n = 1;
    expect_cnt = 0; last_start = -1; starts = 0;
    for (int c = 0; c < 100; c++) begin
      @(negedge clk);
      checks += 2;
      if (cnt != 3'(expect_cnt)) begin
        failures++;
        $display("FAIL c=%0d cnt=%0d exp %0d", c, cnt, expect_cnt);
      end
      if (period_start != (expect_cnt == 0)) failures++;
      if (period_start) begin
        if (last_start >= 0) begin
          checks++;
          if (c - last_start != PERIOD) failures++;
        end
        last_start = c;
        starts++;
      end
      expect_cnt = (expect_cnt + 1) % PERIOD;
    end
    checks++;
    if (starts != 15) failures++;
    rst_n = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (cnt != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
