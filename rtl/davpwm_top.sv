// davpwm_top: complete FPGA modulator for a conventional 3x3 matrix converter
// using the improved Direct Analytic Voltage PWM (DAV-PWM).
//
// Data flow, paced by the modulation-period counter (PERIOD clock cycles):
//   cycle 0 of a period (period_start):
//     - the two measured line-to-line voltages become phase voltages
//       (line_to_phase) and the DSOGI-OSG takes one step, giving the analytic
//       pairs (vi_x, vi_y);
//     - ref_gen advances the output references vo_x.
//   cycles 1 .. CALC_CYCLES (default 5): davpwm_core's combinational logic
//     settles; at the end of cycle CALC_CYCLES it registers, in one step,
//     the 3*NOUT duty numerators, the common denominator and the sectors.
//     Five clocks are 100 ns at 50 MHz, the computation pulse of the
//     published design; the path may be constrained as a multicycle path.
//   cycles 6 .. 276: time_scaling turns the duties into on-times in cycles.
//   next period_start: the venturini_cells (one per output) load the on-times and the
//     input sector and play the switch sequence over that period.
// So a measurement reaches the switches one modulation period later. The
// partition into blocks and the one-cycle duty computation follow the
// published design; the single clock with strobes, the one-period latency,
// the fixed-point divider for the time scaling and the reference generator
// are this design's choices. The gate-level commutation of each bidirectional
// switch (four-step commutation) is outside this design: h gives the ideal
// switch states, exactly one input per output at any time.
// NOUT sets the number of converter outputs (default 3): each extra output
// adds one duty column, one reference phase and one switching cell; the
// output sector so is only defined for three outputs.
// All control inputs (w_ts, sogi_k, cos_phi, sin_phi, q_amp, ref_step) are
// sampled on period_start.
module davpwm_top
  import davpwm_pkg::*;
#(
  parameter  int unsigned NOUT   = 3,       // output phases
  parameter  int unsigned PERIOD = 5000,
  parameter  int unsigned CALC_CYCLES = 5,  // settling time of the core
  parameter  int unsigned MSB    = 33,
  parameter  int unsigned LSB    = 18,
  localparam int unsigned TW     = $clog2(PERIOD + 1),
  localparam int unsigned CW     = $clog2(PERIOD)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  q15_t          v_i12,          // measured v1 - v2
  input  q15_t          v_i23,          // measured v2 - v3
  input  q15_t          w_ts,           // w_i * T_PWM, Q15
  input  q15_t          sogi_k,         // SOGI gain, Q2.13
  input  q15_t          cos_phi,        // displacement angle cos, Q15
  input  q15_t          sin_phi,        // displacement angle sin, Q15
  input  q15_t          q_amp,          // reference amplitude q, Q15
  input  logic [31:0]   ref_step,       // output frequency phase step
  output logic [NIN-1:0] h   [NOUT],    // h[j][k]: input k+1 to output j+1
  output duty_t         d   [NIN][NOUT],// duty numerators of the last period
  output duty_t         sum,            // their common denominator
  output logic [TW-1:0] t_on [NIN][NOUT],// on-times in cycles
  output sector_t       si,             // rotated input sector
  output sector_t       so,             // output sector
  output logic signed [16:0] vsx,       // shift vector x
  output q15_t          vsy,            // shift vector y
  output logic [CW-1:0] cnt,            // position in the period
  output logic          period_start
);

  q15_t               v_ph [NIN];
  q15_t               vi_x [NIN];
  q15_t               vi_y [NIN];
  q15_t               vo_x [NOUT];
  logic               calc_en;
  q15_t               cos_r, sin_r;
  logic               core_valid;
  logic               ts_busy;

  pwm_period_counter #(.PERIOD(PERIOD)) u_counter (
    .clk (clk), .rst_n (rst_n), .cnt (cnt), .period_start (period_start)
  );

  line_to_phase u_l2p (.v12 (v_i12), .v23 (v_i23), .v (v_ph));

  dsogi_osg u_dsogi (
    .clk (clk), .rst_n (rst_n), .en (period_start), .v (v_ph),
    .w_ts (w_ts), .k (sogi_k), .vi_x (vi_x), .vi_y (vi_y)
  );

  ref_gen #(.NOUT(NOUT)) u_ref (
    .clk (clk), .rst_n (rst_n), .en (period_start), .step (ref_step),
    .q (q_amp), .vo_x (vo_x)
  );

  // Every input of the core is a register that changes only at a period
  // start, so the core's logic may take CALC_CYCLES clocks to settle (a
  // multicycle path): it is sampled when cnt reaches CALC_CYCLES.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cos_r <= '0;
      sin_r <= '0;
    end else if (period_start) begin
      cos_r <= cos_phi;
      sin_r <= sin_phi;
    end
  end

  assign calc_en = (cnt == CW'(CALC_CYCLES));

  davpwm_core #(.NOUT(NOUT), .MSB(MSB), .LSB(LSB)) u_core (
    .clk (clk), .rst_n (rst_n), .en (calc_en),
    .vi_x (vi_x), .vi_y (vi_y), .vo_x (vo_x),
    .r_cos (cos_r), .r_sin (sin_r),
    .d (d), .sum (sum), .si (si), .so (so), .vsx (vsx), .vsy (vsy),
    .valid (core_valid)
  );

  time_scaling #(.NOUT(NOUT), .PERIOD(PERIOD)) u_scale (
    .clk (clk), .rst_n (rst_n), .start (core_valid), .num (d), .sum (sum),
    .t (t_on), .busy (ts_busy), .done ()
  );

  for (genvar j = 0; j < NOUT; j++) begin : g_cell
    logic [TW-1:0] t_col [NIN];
    for (genvar k = 0; k < NIN; k++) begin : g_k
      assign t_col[k] = t_on[k][j];
    end
    venturini_cell #(.PERIOD(PERIOD)) u_cell (
      .clk (clk), .rst_n (rst_n), .load (period_start), .t (t_col),
      .si (si), .h (h[j])
    );
  end

  // The divider must finish inside the period in which it started.
  initial assert (CALC_CYCLES >= 1 && PERIOD > CALC_CYCLES + NIN * NOUT * (16 + TW + 1) + 4)
    else $error("PERIOD too short for time_scaling");

  always_ff @(posedge clk) begin
    if (rst_n && period_start) assert (!ts_busy)
      else $error("time_scaling still busy at period start");
  end

endmodule
