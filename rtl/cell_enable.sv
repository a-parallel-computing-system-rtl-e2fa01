// cell_enable -- cell enable input (CEI) and output (CEO) circuits of one
// cell.
//
// CEI lets a cell change its words, shift its accumulators and take new
// control bits.  It is the OR of five selections: the cell's own point
// (i, j) of the selection matrix, its whole row (0, j), its whole column
// (i, 0), the whole array (0, 0), or the "all cells", "even rows" or "odd
// rows" lines of the cell mode register.  CEI is forced off for operations
// that only read the array (data out, control out, transfer to buffer).
// CEO lets the cell's output reach the data register or a buffer: for data
// and control out only the single cell at point (i, j), for a transfer to
// the buffer the cells of the selected row (point (0, j)) or column
// (point (i, 0)).  This follows the document's cell-enable table.
// Combinational.
module cell_enable
  import hpcs_pkg::*;
#(
  parameter bit ROW_ODD = 1'b1     // the cell's row number is odd
) (
  input  kind_e kind,
  input  logic  buf_col,
  input  logic  row_j, row_0,      // row lines j and 0
  input  logic  col_i, col_0,      // column lines i and 0
  input  logic  all_cells, even_rows, odd_rows,
  output logic  cei,
  output logic  ceo
);
  logic sel;
  always_comb begin
    sel = (row_j && col_i) || (row_j && col_0) || (row_0 && col_i) ||
          (row_0 && col_0) || all_cells ||
          (even_rows && !ROW_ODD) || (odd_rows && ROW_ODD);
    cei = sel && !(kind inside {K_DOU, K_COU, K_TTB, K_NOP});
    unique case (kind)
      K_DOU, K_COU: ceo = row_j && col_i;
      K_TTB:        ceo = buf_col ? (row_0 && col_i) : (row_j && col_0);
      default:      ceo = 1'b0;
    endcase
  end
endmodule
