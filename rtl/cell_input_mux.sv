// cell_input_mux -- MPX C, the input selector of a cell.
//
// Selects the Y operand of the ALU from the cell's own D_B output, one of
// the four nearest neighbours (north, south, east, west), the row or column
// buffer, or the external central buffer, following the document's
// neighbour codes 0..7.  A disabled selector gives 0.  Combinational.
module cell_input_mux
  import hpcs_pkg::*;
(
  input  nbr_e sel,
  input  logic en,
  input  logic own, n, s, e, w, row, col, ext,
  output logic y
);
  always_comb begin
    unique case (sel)
      NB_INT: y = own;
      NB_N:   y = n;
      NB_S:   y = s;
      NB_E:   y = e;
      NB_W:   y = w;
      NB_ROW: y = row;
      NB_COL: y = col;
      NB_EXT: y = ext;
      default: y = 1'b0;
    endcase
    y = y & en;
  end
endmodule
