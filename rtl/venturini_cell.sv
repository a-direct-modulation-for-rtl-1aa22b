// venturini_cell: switch-state sequence of one converter cell (one output
// phase) within a modulation period, Cyclic-Venturini style.
//
// The cell connects its output to exactly one of the three inputs at any
// time. Over a period it visits the inputs in a symmetric order P Q R Q P,
// with P for t_P/2, Q for t_Q/2, R for t_R, Q for t_Q/2 and P for the rest
// of the period. The order depends only on the input sector si:
//   si 5 or 2: C A B B A C   (P = input 3, Q = input 1, R = input 2)
//   si 6 or 1: A B C C B A   (P = input 1, Q = input 2, R = input 3)
//   si 3 or 4: B C A A C B   (P = input 2, Q = input 3, R = input 1)
// These orders and segment lengths are the published ones. The cell runs
// its own position counter, cleared by load; load also takes the new on-times
// and sector, which then hold for the whole period. h is registered, so the
// pattern appears one clock after the position it belongs to. Commutation
// between two switches (overlap or dead time) is not handled here. Reset
// connects input 1 (h = 001) until the first load.
module venturini_cell
  import davpwm_pkg::*;
#(
  parameter  int unsigned PERIOD = 5000,
  localparam int unsigned TW     = $clog2(PERIOD + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,          // start of a modulation period
  input  logic [TW-1:0] t  [NIN],      // on-times of inputs 1..3, cycles
  input  sector_t       si,            // input sector for this period
  output logic [NIN-1:0] h             // one-hot: h[k] = input k+1 connected
);

  localparam int unsigned BW = TW + 2;

  logic [1:0]    sel_p, sel_q, sel_r;
  logic [1:0]    p_r, q_r, r_r;
  logic [BW-1:0] b1, b2, b3, b4;
  logic [BW-1:0] pos;

  always_comb begin
    unique case (si)
      3'd5, 3'd2: begin sel_p = 2'd2; sel_q = 2'd0; sel_r = 2'd1; end
      3'd3, 3'd4: begin sel_p = 2'd1; sel_q = 2'd2; sel_r = 2'd0; end
      default:    begin sel_p = 2'd0; sel_q = 2'd1; sel_r = 2'd2; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_r <= 2'd0; q_r <= 2'd1; r_r <= 2'd2;
      b1  <= '0;   b2  <= '0;   b3  <= '0;   b4 <= '0;
      pos <= '0;
      h   <= 3'b001;
    end else begin
      if (load) begin
        logic [BW-1:0] c1, c2, c3;
        c1  = BW'(t[sel_p] >> 1);
        c2  = c1 + BW'(t[sel_q] >> 1);
        c3  = c2 + BW'(t[sel_r]);
        b1  <= c1;
        b2  <= c2;
        b3  <= c3;
        b4  <= c3 + BW'(t[sel_q] >> 1);
        p_r <= sel_p; q_r <= sel_q; r_r <= sel_r;
        pos <= '0;
      end else if (pos != '1) begin
        pos <= pos + 1'b1;
      end
      if      (pos < b1) h <= NIN'(1) << p_r;
      else if (pos < b2) h <= NIN'(1) << q_r;
      else if (pos < b3) h <= NIN'(1) << r_r;
      else if (pos < b4) h <= NIN'(1) << q_r;
      else               h <= NIN'(1) << p_r;
    end
  end

endmodule
