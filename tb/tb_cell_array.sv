// tb_cell_array -- self-checking test of the cell array with its buffer,
// on a small non-square 3 x 4 array so the buffer is longer than one side.
// The control unit drives it (tested separately); the bench plays the
// data register on the serial side.  Checked: direct loading of each cell;
// neighbour transfers in all four directions with zeros entering at the
// open edges; row-to-buffer and buffer-to-column transfers (transposition
// of a row into a column) and column-to-buffer / buffer-to-row; that the
// buffer positions with no cell behind them receive zeros; and the OR of
// the output-enabled cells back to the data register.
module tb_cell_array;
  import hpcs_pkg::*;
  localparam int R = 3, C = 4;
  logic clk = 0, rst_n = 0, start = 0, bar_load = 0;
  logic [31:0] ir;
  logic [15:0] bar_wdata, drq;
  dec_t dec;
  tim_t tim;
  logic [63:0] row_line, col_line;
  logic all_cells, even_rows, odd_rows, busy, cnv_flag, dr_wr, dr_din, cnv_any;
  int checks = 0, failures = 0;
  logic [15:0] model [R][C][16];

  control_unit u_cu (.clk, .rst_n, .ir, .start, .bar_load, .bar_wdata, .cnv_any, .dec, .tim,
    .row_line, .col_line, .all_cells, .even_rows, .odd_rows, .busy, .cnv_flag, .dr_wr);
  cell_array #(.ROWS(R), .COLS(C)) dut (.clk, .rst_n, .dec, .tim, .row_line, .col_line,
    .all_cells, .even_rows, .odd_rows, .ext(drq[tim.addr]), .dr_din, .cnv_any,
    .asc_clr(1'b0), .asc_found(), .asc_row(), .asc_col());
  always #5 clk = ~clk;
  always @(posedge clk) if (dr_wr) drq[tim.addr] <= dr_din;

  task automatic check(input string name, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", name, got, exp); end
  endtask
  task automatic exec(input logic [31:0] i);
    @(negedge clk) begin ir = i; start = 1; end
    @(negedge clk) start = 0;
    while (busy) @(negedge clk);
  endtask
  task automatic bar(input int row, col, cmr);
    @(negedge clk) begin bar_wdata = 16'(col) | 16'(row) << 6 | 16'(cmr) << 12; bar_load = 1; end
    @(negedge clk) bar_load = 0;
  endtask
  function automatic logic [31:0] ccc(input int op, w, row, col);
    return 32'(op) | 32'(w) << 4 | 32'(row) << 10 | 32'(col) << 13 | 32'h10000;
  endfunction
  task automatic check_word(input string name, input int w);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        exec(ccc(CC_DOU, w, r + 1, c + 1));
        check($sformatf("%s (%0d,%0d) M%0d", name, r, c, w), drq, model[r][c][w]);
      end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ir = 0; bar_wdata = 0; drq = 0;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int w = 0; w < 16; w++)
      model[r][c][w] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        drq = 16'($urandom); model[r][c][3] = drq;
        exec(ccc(CC_DIN, 3, r + 1, c + 1));
      end
    check_word("load", 3);
    // neighbours: M4 <- N, M5 <- S, M6 <- E, M7 <- W
    exec(32'(OP_MOV) | 32'd4 << 4 | 32'd3 << 12 | 32'(NB_N) << 17);
    exec(32'(OP_MOV) | 32'd5 << 4 | 32'd3 << 12 | 32'(NB_S) << 17);
    exec(32'(OP_MOV) | 32'd6 << 4 | 32'd3 << 12 | 32'(NB_E) << 17);
    exec(32'(OP_MOV) | 32'd7 << 4 | 32'd3 << 12 | 32'(NB_W) << 17);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      model[r][c][4] = r > 0     ? model[r-1][c][3] : 16'h0;
      model[r][c][5] = r < R - 1 ? model[r+1][c][3] : 16'h0;
      model[r][c][6] = c < C - 1 ? model[r][c+1][3] : 16'h0;
      model[r][c][7] = c > 0     ? model[r][c-1][3] : 16'h0;
    end
    for (int w = 4; w < 8; w++) check_word("neighbour", w);
    // row k -> buffer -> column k (M8)
    for (int k = 0; k < R; k++) begin
      bar(k + 1, 0, 1);
      exec(32'(CC_BUF) | 32'd3 << 12 | 32'h10000);
      bar(0, k + 1, 1);
      exec(32'(CC_BUF) | 32'd1 << 3 | 32'd8 << 4 | 32'd1 << 11 | 32'd3 << 12 | 32'h10000);
      for (int i = 0; i < R; i++) model[i][k][8] = model[k][i][3];
    end
    check_word("row->column", 8);
    // column k -> buffer -> row k (M9); buffer position 3 has no cell behind it
    for (int k = 0; k < R; k++) begin
      bar(0, k + 1, 1);
      exec(32'(CC_BUF) | 32'd1 << 11 | 32'd3 << 12 | 32'h10000);
      bar(k + 1, 0, 1);
      exec(32'(CC_BUF) | 32'd1 << 3 | 32'd9 << 4 | 32'd3 << 12 | 32'h10000);
      for (int j = 0; j < C; j++) model[k][j][9] = j < R ? model[j][k][3] : 16'h0;
    end
    check_word("column->row", 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
