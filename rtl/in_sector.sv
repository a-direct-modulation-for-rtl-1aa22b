// in_sector: sector of the rotated input vectors and selection of the shift
// vector.
//
// Three comparators on the rotated quadrature components give
// si = {y1>=y2, y2>=y3, y3>=y1}. In each sector one input vector lies
// between the other two in y (the intermediate vertex of the synthesis
// triangle). The shift vector moves the horizontal reference trajectory onto
// that vertex: v_sy is the vertex's y, and v_sx places either the smallest
// or the largest output reference exactly on the vertex (v_sx = x_k - min_o
// or x_k - max_o), which is what reaches the maximum transfer ratio. The
// table of vertex and min/max per sector is the published one. Code 7 (all
// y equal, only when the input is zero) uses vertex 1 with min_o, this
// design's choice. Purely combinational; v_sx is 17 bits wide so the
// difference never wraps.
module in_sector
  import davpwm_pkg::*;
(
  input  q15_t                viR_x [NIN],
  input  q15_t                viR_y [NIN],
  input  q15_t                max_o,
  input  q15_t                min_o,
  output sector_t             si,
  output logic signed [16:0]  vsx,
  output q15_t                vsy
);

  always_comb begin
    logic [1:0]  vtx;
    logic        use_max;
    si[2] = (viR_y[0] >= viR_y[1]);
    si[1] = (viR_y[1] >= viR_y[2]);
    si[0] = (viR_y[2] >= viR_y[0]);
    unique case (si)
      3'd1:    begin vtx = 2'd1; use_max = 1'b0; end
      3'd2:    begin vtx = 2'd0; use_max = 1'b0; end
      3'd3:    begin vtx = 2'd2; use_max = 1'b1; end
      3'd4:    begin vtx = 2'd2; use_max = 1'b0; end
      3'd5:    begin vtx = 2'd0; use_max = 1'b1; end
      3'd6:    begin vtx = 2'd1; use_max = 1'b1; end
      default: begin vtx = 2'd0; use_max = 1'b0; end
    endcase
    vsy = viR_y[vtx];
    vsx = 17'(viR_x[vtx]) - 17'(use_max ? max_o : min_o);
  end

endmodule
