// out_sector: output-voltage sector identification and max/min selection.
//
// Three comparators give the sector code so = {vo1>=vo2, vo2>=vo3, vo3>=vo1}
// (values 1..6 for distinct references). The code alone names the largest
// and the smallest of the three references, max_o and min_o, so no sorting
// network is needed. The comparator order and the sector-to-max/min table
// follow the published design; the handling of code 7 (all three equal,
// e.g. zero reference) is this design's choice: max = min = vo1.
// For a converter with another number of outputs (NOUT != 3) the sector
// code has no meaning and is 0; max_o and min_o are then found by a plain
// compare-and-select chain over all references (this design's extension).
// Purely combinational.
module out_sector
  import davpwm_pkg::*;
#(
  parameter int unsigned NOUT = 3
) (
  input  q15_t    vo_x [NOUT],   // real parts of the output references
  output sector_t so,            // output sector code
  output q15_t    max_o,         // largest reference
  output q15_t    min_o          // smallest reference
);

  if (NOUT == 3) begin : g_three
    always_comb begin
      so[2] = (vo_x[0] >= vo_x[1]);
      so[1] = (vo_x[1] >= vo_x[2]);
      so[0] = (vo_x[2] >= vo_x[0]);
      unique case (so)
        3'd1:    begin max_o = vo_x[2]; min_o = vo_x[0]; end
        3'd2:    begin max_o = vo_x[1]; min_o = vo_x[2]; end
        3'd3:    begin max_o = vo_x[1]; min_o = vo_x[0]; end
        3'd4:    begin max_o = vo_x[0]; min_o = vo_x[1]; end
        3'd5:    begin max_o = vo_x[2]; min_o = vo_x[1]; end
        3'd6:    begin max_o = vo_x[0]; min_o = vo_x[2]; end
        default: begin max_o = vo_x[0]; min_o = vo_x[0]; end
      endcase
    end
  end else begin : g_many
    always_comb begin
      so    = '0;
      max_o = vo_x[0];
      min_o = vo_x[0];
      for (int j = 1; j < NOUT; j++) begin
        if (vo_x[j] > max_o) max_o = vo_x[j];
        if (vo_x[j] < min_o) min_o = vo_x[j];
      end
    end
  end

endmodule
