// sogi_osg: Second Order Generalized Integrator used as an orthogonal signal
// generator for one input phase.
//
// Structure (continuous time): e = v - vx;  vx = w * integral(k*e - vy);
// vy = w * integral(vx). For a sinusoid v = V cos(w t) it settles to
// vx = V cos(w t) (in phase, filtered) and vy = V sin(w t) (quadrature), the
// analytic pair the modulator needs. The loop structure is the published
// one; the discretisation is this design's: one step per en strobe, forward
// Euler for vx and then the updated vx for vy (semi-implicit Euler, which
// keeps the undamped oscillator bounded). w_ts = w*Ts is Q15 and the gain k
// is Q2.13 (k = sqrt(2) is 11585). The states are kept with 29 fraction
// bits so that small w_ts steps do not vanish; outputs are the states
// rounded down to Q15 with saturation. With this integration the quadrature
// state runs half a sample ahead of the in-phase state; the quadrature
// output is therefore the mean of its last two values, so that both outputs
// describe the same angle. In steady state at w_ts = 0.0314 (50 Hz sampled
// at 10 kHz) and k = sqrt(2), after the step for sample n
// vx = V cos(w (n+1) Ts) and vy = V sin(w (n+1) Ts) within 0.1 %.
// Outputs change one clock after en. Synchronous active-low reset clears
// the states.
module sogi_osg
  import davpwm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,        // one integration step per strobe
  input  q15_t v,         // measured phase voltage
  input  q15_t w_ts,      // w * Ts, Q15
  input  q15_t k,         // damping gain, Q2.13
  output q15_t vx,        // in-phase output
  output q15_t vy         // quadrature output
);

  localparam int unsigned SHIFT = 14;          // state = Q15 << SHIFT
  typedef logic signed [31:0] st_t;

  st_t x, y, y_old;
  st_t e, u, x_n, y_n;

  always_comb begin
    logic signed [47:0] ke, wu, wx;
    e   = (st_t'(v) <<< SHIFT) - x;
    ke  = 48'(e) * 48'(k);
    u   = st_t'(ke >>> 13) - y;
    wu  = 48'(u) * 48'(w_ts);
    x_n = x + st_t'(wu >>> 15);
    wx  = 48'(x_n) * 48'(w_ts);
    y_n = y + st_t'(wx >>> 15);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x     <= '0;
      y     <= '0;
      y_old <= '0;
    end else if (en) begin
      x     <= x_n;
      y     <= y_n;
      y_old <= y;
    end
  end

  assign vx = sat_q15(34'(x >>> SHIFT));
  // Mean of the two last quadrature states (33 bits: the sum cannot wrap).
  logic signed [32:0] y_sum;
  assign y_sum = 33'(y) + 33'(y_old);
  assign vy    = sat_q15(34'(y_sum >>> (SHIFT + 1)));

endmodule
