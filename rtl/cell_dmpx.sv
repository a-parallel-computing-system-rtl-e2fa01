// cell_dmpx -- destination demultiplexer of a cell.
//
// Decodes the 4-bit destination address into sixteen write-enable lines.
// Address 0 enables every word (useful for clearing a cell); 1 and 2 are
// AC1 and AC2, 3..15 the memories.  Nothing is enabled when the operation
// does not use the demultiplexer (en low) or when the cell is inhibited,
// as the document describes.  Purely combinational.
module cell_dmpx (
  input  logic [3:0]  sel,
  input  logic        en,
  input  logic        inhibit,
  output logic [15:1] we
);
  always_comb begin
    we = '0;
    if (en && !inhibit) begin
      if (sel == 4'd0) we = '1;
      else             we[sel] = 1'b1;
    end
  end
endmodule
