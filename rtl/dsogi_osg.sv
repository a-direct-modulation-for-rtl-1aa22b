// dsogi_osg: the three-phase quadrature signal generator. One sogi_osg per
// input phase turns the phase voltages into the analytic pairs
// (vi_x, vi_y) = V*(cos, sin) used by the duty-cycle computation. All three
// share the frequency constant w_ts and the gain k and step together on en.
// Outputs are registered inside the SOGIs: they change one clock after en.
module dsogi_osg
  import davpwm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  q15_t v    [NIN],   // phase voltages
  input  q15_t w_ts,         // w_i * Ts, Q15
  input  q15_t k,            // SOGI gain, Q2.13
  output q15_t vi_x [NIN],   // in-phase components
  output q15_t vi_y [NIN]    // quadrature components
);

  for (genvar p = 0; p < NIN; p++) begin : g_ph
    sogi_osg u_sogi (
      .clk (clk), .rst_n (rst_n), .en (en), .v (v[p]), .w_ts (w_ts), .k (k),
      .vx (vi_x[p]), .vy (vi_y[p])
    );
  end

endmodule
