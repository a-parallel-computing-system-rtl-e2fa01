// assoc_detector -- associative flip-flops and cell-address priority
// detector for content-addressed search.
//
// Each cell has an associative flip-flop.  An ASC operation (one clock)
// loads it, in every enabled cell, with the condition the cell's inhibit
// multiplexer selects (for instance "AC1 = 0" or "sign negative" after a
// subtraction of a search key), so it reads 1 where the cell matched.  The
// detector then finds the matching cell of highest priority, where lower
// row number wins and, within a row, lower column number wins: a row
// encoder looks at the OR of each row's flip-flops and picks the first row
// that has any; that row's flip-flops alone are passed to the column
// encoder, which picks the first column.  The host reads the address
// (found flag, row, column) and then pulses `clr`, which resets the
// reported cell's flip-flop so the next match appears.
//
// Interface: `cap` (per cell, capture enable for this clock) and `cond`
// (per cell, the condition), `clr` (reset the reported cell), outputs
// `found`, `row_addr`, `col_addr`.  Addresses are given as the decoder line
// numbers of the cell addressing system (1..63), so they can be written
// straight into the BAR.  Flip-flops change on the clock edge; the address
// outputs are combinational from the flip-flops.
//
// Following the document: the flip-flop per cell set from the inhibit
// condition, the two-level row-then-column priority scheme and the reset
// of the reported cell.  The document draws it for 8 x 8 with eight-level
// priority encoder chips and says it extends to 63 x 63; here it is written
// for any ROWS x COLS up to 63.
module assoc_detector #(
  parameter int unsigned ROWS = 63,
  parameter int unsigned COLS = 63
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [ROWS-1:0][COLS-1:0] cap,
  input  logic [ROWS-1:0][COLS-1:0] cond,
  input  logic                      clr,
  output logic                      found,
  output logic [5:0]                row_addr,
  output logic [5:0]                col_addr,
  output logic [ROWS-1:0][COLS-1:0] flags
);
  logic [ROWS-1:0] row_any;
  logic [COLS-1:0] in_row;
  logic [5:0]      r_sel, c_sel;

  for (genvar r = 0; r < ROWS; r++) begin : g_any
    assign row_any[r] = |flags[r];
  end

  // row encoder: first row with a match
  always_comb begin
    r_sel = '0;
    for (int r = ROWS - 1; r >= 0; r--)
      if (row_any[r]) r_sel = 6'(r);
  end
  assign in_row = flags[r_sel];

  // column encoder, fed only by the selected row
  always_comb begin
    c_sel = '0;
    for (int c = COLS - 1; c >= 0; c--)
      if (in_row[c]) c_sel = 6'(c);
  end

  assign found    = |row_any;
  assign row_addr = found ? r_sel + 6'd1 : 6'd0;
  assign col_addr = found ? c_sel + 6'd1 : 6'd0;

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                                     flags[r][c] <= 1'b0;
        else if (cap[r][c])                             flags[r][c] <= cond[r][c];
        else if (clr && found && r_sel == 6'(r) && c_sel == 6'(c)) flags[r][c] <= 1'b0;
      end
    end
  end
endmodule
