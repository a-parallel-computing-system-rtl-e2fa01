// cell_memory -- the thirteen 16-bit direct-address words M3..M15 of a cell.
//
// Each word is a 16-bit memory addressed one bit at a time (the document's
// 4-by-4 X/Y bit selection is reduced here to a 4-bit bit address).  Reading
// is non-destructive and returns bit `addr` of every word at once, so the
// source multiplexers can pick any of them; writing stores `din` into bit
// `addr` of every word whose write enable is set (the destination
// demultiplexer can enable all of them together).  A read of the bit being
// written returns the old value, which is what the document's data latches
// provide by splitting the bit cycle into read and write halves.
//
// Timing: reads are combinational; writes take effect on the clock edge.
// Words are cleared by reset (a choice of this implementation).
module cell_memory
  import hpcs_pkg::*;
#(
  parameter int unsigned FIRST = 3,
  parameter int unsigned LAST  = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       addr,
  input  logic [LAST:FIRST] we,
  input  logic             din,
  output logic [LAST:FIRST] rbit,
  output logic [LAST:FIRST][WORD_BITS-1:0] words
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      words <= '0;
    end else begin
      for (int w = FIRST; w <= LAST; w++)
        if (we[w]) words[w][addr] <= din;
    end
  end

  always_comb
    for (int w = FIRST; w <= LAST; w++) rbit[w] = words[w][addr];
endmodule
