// duty_column: duty-cycle numerators of one converter cell (one output
// phase j), the "double multiplier block" that is repeated per output.
//
// The output reference point is P = (vo_x + vsx, vsy) in the plane of the
// rotated input vectors V1, V2, V3. Its barycentric weights in the triangle
// V1 V2 V3 are the duty cycles d_1j, d_2j, d_3j: d_kj is proportional to the
// absolute 2x2 determinant spanned by P and the two other vertices, e.g.
//   d_1j ~ |(x2-Px)(y3-Py) - (x3-Px)(y2-Py)|.
// The common denominator (twice the triangle area) is computed once in
// davpwm_core. Each determinant is returned as bits [MSB:LSB] of its absolute
// value (defaults 33 and 18 as in the published module), saturated at
// all-ones. Internal widths are wide enough that no intermediate wraps.
// Six signed multipliers, purely combinational.
module duty_column
  import davpwm_pkg::*;
#(
  parameter int unsigned MSB = 33,
  parameter int unsigned LSB = 18
) (
  input  q15_t               viR_x [NIN],  // rotated input vectors, x
  input  q15_t               viR_y [NIN],  // rotated input vectors, y
  input  q15_t               vo_x,         // output reference of this phase
  input  logic signed [16:0] vsx,          // shift vector x
  input  q15_t               vsy,          // shift vector y
  output duty_t              d [NIN]       // duty numerators d_1j..d_3j
);

  logic signed [17:0] px;                  // shifted reference, x
  logic signed [18:0] dx [NIN];            // x_k - Px
  logic signed [16:0] dy [NIN];            // y_k - Py
  det_t               det [NIN];

  always_comb begin
    px = 18'(vo_x) + 18'(vsx);
    for (int k = 0; k < NIN; k++) begin
      dx[k] = 19'(viR_x[k]) - 19'(px);
      dy[k] = 17'(viR_y[k]) - 17'(vsy);
    end
    // Weight of vertex k: determinant of the two other vertices seen from P.
    for (int k = 0; k < NIN; k++) begin
      logic [1:0] a, b;
      a = 2'((k + 1) % NIN);
      b = 2'((k + 2) % NIN);
      det[k] = DETW'(dx[a] * dy[b]) - DETW'(dx[b] * dy[a]);
      d[k]   = det_to_duty(det[k], MSB, LSB);
    end
  end

endmodule
