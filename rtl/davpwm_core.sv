// davpwm_core: the one-cycle ("atomic") improved DAV-PWM duty computation.
//
// From the analytic input-voltage pairs (vi_x, vi_y), the output references
// vo_x and the displacement-angle pair (cos, sin) it computes, in one clock
// cycle of pure combinational logic registered at the clock edge:
//   1. the output sector so and max_o / min_o of the references (out_sector),
//   2. the rotated input vectors v_iR = v_i * R^-1 (in_rotation),
//   3. the input sector si and the shift vector (vsx, vsy) (in_sector),
//   4. per output phase, the three duty numerators (duty_column), and
//   5. the common denominator sum = |det[V2-V1; V3-V1]|.
// Duty d_kj (input k to output j) equals d[k][j] / sum; the division is left
// to the time-scaling stage, as in the published design. There are no loops,
// no trigonometry and no angles. Each output phase is one duty_column, so
// NOUT (default 3) sets the number of converter outputs; the output sector
// code so is only defined for three outputs (it is 0 otherwise).
//
// Timing: when en is high at a rising clock edge the inputs are sampled and
// every output is updated at that edge; valid pulses for one cycle with
// them. The clock enable (instead of a dedicated computation clock pulse)
// and the synchronous active-low reset are this design's choices.
module davpwm_core
  import davpwm_pkg::*;
#(
  parameter int unsigned NOUT = 3,             // output phases
  parameter int unsigned MSB = 33,
  parameter int unsigned LSB = 18
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,               // compute strobe
  input  q15_t               vi_x  [NIN],      // input voltages, in-phase
  input  q15_t               vi_y  [NIN],      // input voltages, quadrature
  input  q15_t               vo_x  [NOUT],     // output references
  input  q15_t               r_cos,            // cos(phi_i)
  input  q15_t               r_sin,            // sin(phi_i)
  output duty_t              d     [NIN][NOUT],// duty numerators d[k][j]
  output duty_t              sum,              // common denominator
  output sector_t            si,               // rotated input sector
  output sector_t            so,               // output sector
  output logic signed [16:0] vsx,              // shift vector x
  output q15_t               vsy,              // shift vector y
  output logic               valid             // outputs updated this cycle
);

  q15_t               max_o, min_o;
  q15_t               viR_x [NIN];
  q15_t               viR_y [NIN];
  sector_t            so_c, si_c;
  logic signed [16:0] vsx_c;
  q15_t               vsy_c;
  duty_t              col_d [NOUT][NIN];
  duty_t              sum_c;

  out_sector #(.NOUT(NOUT)) u_out_sector (
    .vo_x (vo_x), .so (so_c), .max_o (max_o), .min_o (min_o)
  );

  in_rotation u_in_rotation (
    .vi_x (vi_x), .vi_y (vi_y), .r_cos (r_cos), .r_sin (r_sin),
    .viR_x (viR_x), .viR_y (viR_y)
  );

  in_sector u_in_sector (
    .viR_x (viR_x), .viR_y (viR_y), .max_o (max_o), .min_o (min_o),
    .si (si_c), .vsx (vsx_c), .vsy (vsy_c)
  );

  for (genvar j = 0; j < NOUT; j++) begin : g_col
    duty_column #(.MSB(MSB), .LSB(LSB)) u_duty_column (
      .viR_x (viR_x), .viR_y (viR_y), .vo_x (vo_x[j]),
      .vsx (vsx_c), .vsy (vsy_c), .d (col_d[j])
    );
  end

  // Twice the area of the synthesis triangle: the common denominator.
  always_comb begin
    logic signed [16:0] ax, ay, bx, by;
    ax = 17'(viR_x[1]) - 17'(viR_x[0]);
    ay = 17'(viR_y[1]) - 17'(viR_y[0]);
    bx = 17'(viR_x[2]) - 17'(viR_x[0]);
    by = 17'(viR_y[2]) - 17'(viR_y[0]);
    sum_c = det_to_duty(DETW'(ax * by) - DETW'(ay * bx), MSB, LSB);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NIN; k++)
        for (int j = 0; j < NOUT; j++) d[k][j] <= '0;
      sum   <= '0;
      si    <= '0;
      so    <= '0;
      vsx   <= '0;
      vsy   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        for (int k = 0; k < NIN; k++)
          for (int j = 0; j < NOUT; j++) d[k][j] <= col_d[j][k];
        sum <= sum_c;
        si  <= si_c;
        so  <= so_c;
        vsx <= vsx_c;
        vsy <= vsy_c;
      end
    end
  end

endmodule
