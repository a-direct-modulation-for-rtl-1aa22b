// pwm_period_counter: the modulation-period time base.
//
// An up-counter with auto-reload: cnt runs 0, 1, ..., PERIOD-1 and wraps to
// 0, so one modulation period lasts PERIOD clock cycles. period_start is high
// for the one cycle in which cnt is 0; every other block paces itself on it.
// The default PERIOD = 5000 gives the published 100 us period with a 50 MHz
// clock (the clock frequency is this design's assumption). Synchronous
// active-low reset sets cnt to 0.
module pwm_period_counter #(
  parameter int unsigned PERIOD = 5000,
  localparam int unsigned CW    = $clog2(PERIOD)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [CW-1:0] cnt,
  output logic          period_start
);

  always_ff @(posedge clk) begin
    if (!rst_n || cnt == CW'(PERIOD - 1)) cnt <= '0;
    else                                  cnt <= cnt + 1'b1;
  end

  assign period_start = (cnt == '0);

endmodule
