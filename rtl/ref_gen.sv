// ref_gen: output voltage references for the modulator.
//
// The improved modulation needs only plain sinusoidal references, with no
// common-mode term: vo_j = q * cos(theta - j*2*pi/NOUT), j = 0 .. NOUT-1
// (NOUT = 3 by default). A 32-bit
// phase accumulator advances by `step` on every en strobe (one PWM period),
// so f_o = step / 2^32 * f_s. The top LUT_BITS bits of the phase address a
// cosine table, cos_lut.hex, whose entry i is round(32767*cos(2*pi*i/1024))
// (two's complement, 16 bits); output j uses the phase minus j/NOUT of
// a turn. Each table value is multiplied by the Q15 amplitude q.
// The accumulator and table are this design's choice of generator; the
// references' form is the published one. Outputs are registered and change
// one clock after en. Synchronous active-low reset clears the phase.
module ref_gen
  import davpwm_pkg::*;
#(
  parameter int unsigned NOUT     = 3,
  parameter int unsigned LUT_BITS = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,            // advance one step
  input  logic [31:0] step,          // phase step per strobe
  input  q15_t        q,             // amplitude, Q15
  output q15_t        vo_x [NOUT]    // references
);

  // Phase offset between neighbouring outputs, 2^32 / NOUT (1431655765,
  // one third of a turn, for three outputs).
  localparam logic [31:0] STEP_OUT = 32'((64'd1 << 32) / 64'(NOUT));

  q15_t        lut [2**LUT_BITS];
  logic [31:0] theta;

  initial $readmemh("rtl/cos_lut.hex", lut);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      theta <= '0;
      for (int j = 0; j < NOUT; j++) vo_x[j] <= '0;
    end else if (en) begin
      theta <= theta + step;
      for (int j = 0; j < NOUT; j++) begin
        logic [31:0]        ph;
        logic signed [31:0] p;
        ph = theta - 32'(j) * STEP_OUT;
        p  = 32'(lut[ph[31 -: LUT_BITS]]) * 32'(q);
        vo_x[j] <= q15_t'(p >>> 15);
      end
    end
  end

endmodule
