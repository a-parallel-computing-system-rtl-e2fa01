// cell_array -- the planar array of cells with its common row/column buffer.
//
// ROWS x COLS cells form a planar rectangular mesh: each cell's north,
// south, east and west inputs carry the D_B output of the neighbouring cell,
// and 0 at the array's edges (no neighbour there).  Cell (r, c), counted
// from 0 at the north-west corner, sits at point (c+1, r+1) of the
// addressing matrix, so row and column lines 1..63 address real cells and
// line 0 stands for "all".
//
// A single buffer of max(ROWS, COLS) cells serves as both the row buffer and
// the column buffer (the document notes the two are never used at once).
// Buffer cell k is an ordinary cell.  For a transfer to the buffer its ROW
// input collects the output of the selected cell in column k and its COL
// input the output of the selected cell in row k; only the buffer cells are
// then enabled.  For a transfer from the buffer each array cell reads buffer
// cell c on its ROW input or buffer cell r on its COL input.  The central
// buffer bit (the data register) reaches every cell's external input; the
// outputs of the cells enabled for data out are ORed towards the data
// register, and the convergence pulses of all cells are ORed towards the
// control unit.  The document fixes the planar configuration, the
// buffers and the central buffer; sharing one buffer cell per index is its
// suggestion, adopted here.  The associative flip-flops and the
// cell-address priority detector (assoc_detector) also sit here, loaded from
// each cell's selected inhibit condition on an ASC operation.
//
// Timing: combinational wiring around the cells' registers.
module cell_array
  import hpcs_pkg::*;
#(
  parameter int unsigned ROWS = 63,
  parameter int unsigned COLS = 63
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dec_t        dec,
  input  tim_t        tim,
  input  logic [63:0] row_line,
  input  logic [63:0] col_line,
  input  logic        all_cells,
  input  logic        even_rows,
  input  logic        odd_rows,
  input  logic        ext,        // central buffer bit
  output logic        dr_din,     // output of the cell(s) enabled for data out
  output logic        cnv_any,
  // associative search
  input  logic        asc_clr,    // reset the reported cell's associative flip-flop
  output logic        asc_found,
  output logic [5:0]  asc_row,
  output logic [5:0]  asc_col
);
  localparam int unsigned NBUF = (ROWS > COLS) ? ROWS : COLS;

  logic [ROWS-1:0][COLS-1:0] db, cei, ceo, cnv, cond, cap;
  logic [NBUF-1:0]           bdb, brow, bcol;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      cell_enable #(.ROW_ODD(((r + 1) % 2) == 1)) u_en (
        .kind(dec.kind), .buf_col(dec.buf_col),
        .row_j(row_line[r+1]), .row_0(row_line[0]),
        .col_i(col_line[c+1]), .col_0(col_line[0]),
        .all_cells, .even_rows, .odd_rows,
        .cei(cei[r][c]), .ceo(ceo[r][c])
      );
      array_cell u_cell (
        .clk, .rst_n, .dec, .tim, .cei(cei[r][c]),
        .n  ((r > 0)        ? db[(r > 0) ? r-1 : 0][c] : 1'b0),
        .s  ((r < ROWS - 1) ? db[(r < ROWS - 1) ? r+1 : r][c] : 1'b0),
        .e  ((c < COLS - 1) ? db[r][(c < COLS - 1) ? c+1 : c] : 1'b0),
        .w  ((c > 0)        ? db[r][(c > 0) ? c-1 : 0] : 1'b0),
        .row(bdb[c]), .col(bdb[r]), .ext,
        .db(db[r][c]), .cnv_diff(cnv[r][c]), .cond(cond[r][c]),
        .ac1_q(), .ac2_q(), .mem_q(), .ctl_bits()
      );
    end
  end

  // Buffer inputs: output of the CEO-enabled cell in column k / row k.
  logic [ROWS-1:0][COLS-1:0] sel_out;
  assign sel_out = ceo & db;
  for (genvar k = 0; k < NBUF; k++) begin : g_bin
    logic [ROWS-1:0] in_col;
    logic [COLS-1:0] in_row;
    for (genvar r = 0; r < ROWS; r++) begin : g_r
      assign in_col[r] = (k < COLS) ? sel_out[r][(k < COLS) ? k : 0] : 1'b0;
    end
    for (genvar c = 0; c < COLS; c++) begin : g_c
      assign in_row[c] = (k < ROWS) ? sel_out[(k < ROWS) ? k : 0][c] : 1'b0;
    end
    assign brow[k] = |in_col;
    assign bcol[k] = |in_row;
  end

  for (genvar k = 0; k < NBUF; k++) begin : g_buf
    array_cell u_bcell (
      .clk, .rst_n, .dec, .tim, .cei(dec.kind == K_TTB),
      .n(1'b0), .s(1'b0), .e(1'b0), .w(1'b0),
      .row(brow[k]), .col(bcol[k]), .ext,
      .db(bdb[k]), .cnv_diff(), .cond(),
      .ac1_q(), .ac2_q(), .mem_q(), .ctl_bits()
    );
  end

  // associative flip-flops load in the enabled cells on the ASC clock
  assign cap = (dec.kind == K_ASC && tim.bitclk) ? cei : '0;
  assoc_detector #(.ROWS(ROWS), .COLS(COLS)) u_assoc (
    .clk, .rst_n, .cap, .cond, .clr(asc_clr),
    .found(asc_found), .row_addr(asc_row), .col_addr(asc_col), .flags()
  );

  assign dr_din  = |sel_out;
  assign cnv_any = |cnv;
endmodule
