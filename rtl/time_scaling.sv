// time_scaling: converts duty numerators into switch on-times in clock cycles.
//
// Each duty cycle is d_kj = num_kj / sum; the switch must conduct for
// t_kj = num_kj * PERIOD / sum clock cycles of the modulation period. The
// published design does this in a floating-point core; here a single
// restoring divider (one quotient bit per clock) works through the
// 3*NOUT quotients (nine for three outputs) one after another, so a full
// update takes 3*NOUT*(NW+1)+1 cycles, NW = 16 + width(PERIOD) (271 cycles
// for three outputs and PERIOD = 5000), far below one period. Results are clamped to PERIOD; a zero denominator gives zero
// on-times. start samples num and sum; t holds the previous results until
// done pulses for one cycle with the new ones.
module time_scaling
  import davpwm_pkg::*;
#(
  parameter  int unsigned NOUT   = 3,
  parameter  int unsigned PERIOD = 5000,
  localparam int unsigned TW     = $clog2(PERIOD + 1),
  localparam int unsigned NW     = 16 + TW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,               // sample num and sum
  input  duty_t         num [NIN][NOUT],     // duty numerators
  input  duty_t         sum,                 // common denominator
  output logic [TW-1:0] t   [NIN][NOUT],     // on-times in cycles
  output logic          busy,
  output logic          done                 // t updated this cycle
);

  typedef enum logic [1:0] {IDLE, LOAD, DIV} state_e;

  localparam int unsigned NQ = NIN * NOUT;

  state_e               state;
  duty_t                num_r [NQ];
  duty_t                den;
  logic [$clog2(NQ)-1:0] idx;
  logic [$clog2(NW)-1:0] bitn;
  logic [NW-1:0]        dvd;                 // dividend, shifted out msb first
  logic [NW-1:0]        quo;
  logic [16:0]          rem;
  logic [16:0]          rem_sh;
  logic [TW-1:0]        t_r   [NQ];

  assign rem_sh = {rem[15:0], dvd[NW-1]};
  assign busy   = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      idx   <= '0;
      bitn  <= '0;
      dvd   <= '0;
      quo   <= '0;
      rem   <= '0;
      den   <= '0;
      done  <= 1'b0;
      for (int i = 0; i < NQ; i++) begin
        num_r[i] <= '0;
        t_r[i]   <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          for (int k = 0; k < NIN; k++)
            for (int j = 0; j < NOUT; j++) num_r[k*NOUT + j] <= num[k][j];
          den   <= sum;
          idx   <= '0;
          state <= LOAD;
        end
        LOAD: begin
          dvd   <= NW'(num_r[idx]) * NW'(PERIOD);
          rem   <= '0;
          quo   <= '0;
          bitn  <= '0;
          state <= DIV;
        end
        DIV: begin
          if (rem_sh >= {1'b0, den}) begin
            rem <= rem_sh - {1'b0, den};
            quo <= {quo[NW-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[NW-2:0], 1'b0};
          end
          dvd  <= dvd << 1;
          bitn <= bitn + 1'b1;
          if (bitn == $bits(bitn)'(NW - 1)) begin
            state <= LOAD;
            idx   <= idx + 1'b1;
            if (idx == $bits(idx)'(NQ - 1)) begin
              state <= IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= IDLE;
      endcase
      // Store a finished quotient (the last bit is being shifted in now).
      if (state == DIV && bitn == $bits(bitn)'(NW - 1)) begin
        logic [NW-1:0] qf;
        qf = {quo[NW-2:0], (rem_sh >= {1'b0, den})};
        if (den == '0)                t_r[idx] <= '0;
        else if (qf > NW'(PERIOD))    t_r[idx] <= TW'(PERIOD);
        else                          t_r[idx] <= TW'(qf);
      end
    end
  end

  // Results are published together, when the last quotient is stored.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NIN; k++)
        for (int j = 0; j < NOUT; j++) t[k][j] <= '0;
    end else if (done) begin
      for (int k = 0; k < NIN; k++)
        for (int j = 0; j < NOUT; j++) t[k][j] <= t_r[k*NOUT + j];
    end
  end

endmodule
