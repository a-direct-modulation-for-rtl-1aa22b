// line_to_phase: converts the two measured line-to-line input voltages into
// the three phase voltages of the supply.
//
// With phase voltages that sum to zero (no zero-sequence component, which a
// three-wire supply cannot carry),
//   v1 = (2*v12 + v23)/3,  v2 = (v23 - v12)/3,  v3 = -(v12 + 2*v23)/3.
// The division by 3 is a multiplication by the Q15 constant 10923 (1/3)
// followed by an arithmetic shift; results saturate to Q15. The formulas are
// this design's: the block is only named in the published design.
// Purely combinational.
module line_to_phase
  import davpwm_pkg::*;
(
  input  q15_t v12,        // v1 - v2
  input  q15_t v23,        // v2 - v3
  output q15_t v [NIN]     // phase voltages v1, v2, v3
);

  localparam logic signed [15:0] ONE_THIRD = 16'sd10923;

  function automatic q15_t third(input logic signed [17:0] s);
    logic signed [33:0] p;
    p = 34'(s) * 34'(ONE_THIRD);
    return sat_q15(p >>> 15);
  endfunction

  always_comb begin
    v[0] = third(18'(v12) + 18'(v12) + 18'(v23));
    v[1] = third(18'(v23) - 18'(v12));
    v[2] = third(-(18'(v12) + 18'(v23) + 18'(v23)));
  end

endmodule
