// cell_word_mux -- a 16-to-1 word selector (MPX A or MPX B of a cell).
//
// Picks the current bit of one of the fifteen words: input 1 is AC1's read
// output, input 2 AC2's, 3..15 the memories.  Selection 0 means no word and
// gives 0, as does a disabled multiplexer.  Purely combinational.
module cell_word_mux (
  input  logic [3:0]  sel,
  input  logic        en,
  input  logic [15:1] bits,
  output logic        y
);
  always_comb y = en && sel != 4'd0 && bits[sel];
endmodule
