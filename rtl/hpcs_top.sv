// hpcs_top -- the parallel computing system seen from the host bus.
//
// A host computer writes instructions and data into the interface
// registers; the control unit decodes each instruction and steps the whole
// array of bit-serial cells through it in lock-step, one bit per clock,
// while the host may prepare the next instruction.  The host polls the
// status register for the busy and convergence flags and reads results
// back through the data register one cell word at a time.
//
// Ports: the host bus (18-bit word address, write strobe, 16-bit write and
// read data) and two status outputs for convenience.  ROWS x COLS sets the
// array size; the addressing system is built for up to 63 x 63 cells, the
// size the document designs it for, which is the default.
module hpcs_top
  import hpcs_pkg::*;
#(
  parameter int unsigned ROWS = 63,
  parameter int unsigned COLS = 63
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [17:0] bus_addr,
  input  logic        bus_wr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  output logic        busy,
  output logic        cnv_flag
);
  dec_t        dec;
  tim_t        tim;
  logic [31:0] ir;
  logic        start, bar_load, cnv_any, dr_wr, dr_din, dr_bit;
  logic [15:0] bar_wdata, dr_q;
  logic [63:0] row_line, col_line;
  logic        all_cells, even_rows, odd_rows;
  logic        asc_found, asc_clr;
  logic [5:0]  asc_row, asc_col;

  interface_unit u_if (
    .clk, .rst_n, .bus_addr, .bus_wr, .bus_wdata, .bus_rdata,
    .ir, .start, .bar_load, .bar_wdata, .busy, .cnv_flag,
    .dr_addr(tim.addr), .dr_wr, .dr_din, .dr_bit, .dr_q,
    .asc_found, .asc_row, .asc_col, .asc_clr
  );

  control_unit u_cu (
    .clk, .rst_n, .ir, .start, .bar_load, .bar_wdata, .cnv_any,
    .dec, .tim, .row_line, .col_line, .all_cells, .even_rows, .odd_rows,
    .busy, .cnv_flag, .dr_wr
  );

  cell_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n, .dec, .tim, .row_line, .col_line,
    .all_cells, .even_rows, .odd_rows, .ext(dr_bit),
    .dr_din, .cnv_any, .asc_clr, .asc_found, .asc_row, .asc_col
  );

  // The host must not start an instruction while one is running.
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);
endmodule
