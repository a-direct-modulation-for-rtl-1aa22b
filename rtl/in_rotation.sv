// in_rotation: rotation of the three analytic input-voltage vectors by the
// input displacement angle, v_iR = v_i * R^-1 (one 2x2 rotation per phase).
//
// For every phase k:  viR_x = vi_x*cos - vi_y*sin,  viR_y = vi_x*sin + vi_y*cos.
// Operands are Q15; each product is Q30 and the sum is taken back to Q15 by
// dropping 15 fraction bits, as in the published module. Unlike a plain bit
// slice, the result here saturates to the Q15 range (this design's choice),
// so cos = sin = -1.0 corner cases cannot wrap. Twelve 16x16 multipliers,
// purely combinational.
module in_rotation
  import davpwm_pkg::*;
(
  input  q15_t vi_x [NIN],   // in-phase components of the input voltages
  input  q15_t vi_y [NIN],   // quadrature components
  input  q15_t r_cos,        // cos(phi_i)
  input  q15_t r_sin,        // sin(phi_i)
  output q15_t viR_x [NIN],  // rotated in-phase components
  output q15_t viR_y [NIN]   // rotated quadrature components
);

  always_comb begin
    for (int k = 0; k < NIN; k++) begin
      logic signed [32:0] px, py;
      px = 33'(vi_x[k] * r_cos) - 33'(vi_y[k] * r_sin);
      py = 33'(vi_x[k] * r_sin) + 33'(vi_y[k] * r_cos);
      viR_x[k] = sat_q15(34'(px >>> 15));
      viR_y[k] = sat_q15(34'(py >>> 15));
    end
  end

endmodule
