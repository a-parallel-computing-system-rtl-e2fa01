// control_unit -- decodes each instruction and drives the whole array.
//
// Made of the instruction decoder, the clock unit/sequencer and the cell
// addressing system.  On a start pulse the decoded instruction is latched
// and broadcast (`dec`) together with the per-clock timing (`tim`); the
// addressing system turns the basic address and cell mode registers and the
// instruction into row/column selection lines.  The convergence pulses of
// all cells arrive already ORed (`cnv_any`); if the instruction asked for a
// convergence test and no cell reported a difference, the convergence flag
// is set at the end of the operation, otherwise it is cleared.  Instructions
// without a test leave the flag alone.  `busy` is the busy/free flag; it
// drops on the clock after the sequencer's end pulse.  Data-out and
// control-out route the selected cell's output into the data register
// (`dr_wr`).  Following the document, except that the flag update rule for
// untested instructions is this implementation's choice.
module control_unit
  import hpcs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] ir,
  input  logic        start,
  input  logic        bar_load,
  input  logic [15:0] bar_wdata,
  input  logic        cnv_any,
  output dec_t        dec,
  output tim_t        tim,
  output logic [63:0] row_line,
  output logic [63:0] col_line,
  output logic        all_cells,
  output logic        even_rows,
  output logic        odd_rows,
  output logic        busy,
  output logic        cnv_flag,
  output logic        dr_wr
);
  dec_t dec_in;
  logic fin, diff_seen;

  instruction_decoder u_id (.ir(ir), .dec(dec_in));

  sequencer u_seq (
    .clk, .rst_n, .start, .dec_in, .dec, .tim, .busy, .fin
  );

  cell_addressing u_cas (
    .clk, .rst_n, .bar_load, .bar_wdata, .dec, .step(fin),
    .row_line, .col_line, .all_cells, .even_rows, .odd_rows,
    .bar_row(), .bar_col(), .cmr()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff_seen <= 1'b0;
      cnv_flag  <= 1'b0;
    end else begin
      if (tim.start)    diff_seen <= cnv_any;
      else if (cnv_any) diff_seen <= 1'b1;
      if (fin && dec.cnv != 4'd0) cnv_flag <= !(diff_seen || cnv_any);
    end
  end

  assign dr_wr = tim.bitclk && tim.mem_ok && dec.kind inside {K_DOU, K_COU};
endmodule
