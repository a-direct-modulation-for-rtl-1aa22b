// davpwm_pkg: types and constants shared by the DAV-PWM matrix-converter
// modulator. Every voltage, and the cos/sin pair of the input displacement
// angle, is a Q15 signed 16-bit number (full scale +-1.0). Sectors are the
// 3-bit comparator codes 1..6 built from three ">=" comparisons.
package davpwm_pkg;

  typedef logic signed [15:0] q15_t;
  typedef logic [2:0]         sector_t;
  typedef logic [15:0]        duty_t;

  // Number of input phases (rows of the duty matrix). The number of output
  // phases (converter cells, columns of the duty matrix) is a parameter,
  // NOUT, of the modules that handle all outputs; its default is 3.
  localparam int unsigned NIN  = 3;

  localparam q15_t Q15_MAX = 16'sh7FFF;
  localparam q15_t Q15_MIN = -16'sh7FFF - 16'sh1;

  // Saturate a wider signed value to Q15.
  function automatic q15_t sat_q15(input logic signed [33:0] v);
    if (v > 34'sd32767)       return Q15_MAX;
    else if (v < -34'sd32768) return Q15_MIN;
    else                      return q15_t'(v);
  endfunction

  // Width of the signed determinant results inside the duty computation.
  localparam int unsigned DETW = 40;
  typedef logic signed [DETW-1:0] det_t;

  // Absolute value of a determinant, bits [msb:lsb] taken as a 16-bit duty
  // numerator. Values that do not fit below bit msb+1 saturate to all ones.
  function automatic duty_t det_to_duty(input det_t v, input int unsigned msb,
                                        input int unsigned lsb);
    logic [DETW-1:0] a;
    a = (v < 0) ? DETW'(-v) : DETW'(v);
    if ((a >> (msb + 1)) != '0) return '1;
    return duty_t'(a >> lsb);
  endfunction

endpackage
