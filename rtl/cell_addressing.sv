// cell_addressing -- the cell addressing system (BAR, CMR and decoders).
//
// The array is addressed as a 64 x 64 selection matrix whose row 0 and
// column 0 are special: cell (column i, row j) is point (i, j) with
// i, j >= 1; point (0, j) means all of row j, (i, 0) all of column i and
// (0, 0) the whole array.  Two 6-bit decoders drive one row line and one
// column line.  Their inputs come from:
//   * computer-cell instructions: direct mode uses the instruction's 3-bit
//     row and column fields (upper bits 0), concatenation mode puts the
//     upper 3 bits of the basic address register (BAR) in front of them,
//     automatic mode uses the BAR itself;
//   * any other instruction when the cell mode register (CMR) is 1: the BAR.
// Otherwise the decoders are off and the CMR alone selects all cells (0),
// the even rows (2) or the odd rows (3).  The BAR is two 6-bit up/down
// counters loaded from the host.  In automatic mode the counters step after
// each computer-cell operation: for the row counter IR[11] enables and
// IR[12] selects down, for the column counter IR[14] and IR[15]; a row
// counter wrapping past 63 (or below 0) carries into the column counter.
// The document gives this structure; the counter stepping at the end of the
// operation and the host register layout (column in bits 5:0, row in 11:6,
// CMR in 13:12) are this implementation's choices.
//
// Timing: the decoder lines are combinational from the latched instruction
// and the BAR/CMR registers; the BAR changes on a clock edge.
module cell_addressing
  import hpcs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bar_load,
  input  logic [15:0] bar_wdata,
  input  dec_t        dec,
  input  logic        step,          // end of a computer-cell operation
  output logic [63:0] row_line,
  output logic [63:0] col_line,
  output logic        all_cells,
  output logic        even_rows,
  output logic        odd_rows,
  output logic [5:0]  bar_row,
  output logic [5:0]  bar_col,
  output logic [1:0]  cmr
);
  logic       ccc, dec_on;
  logic [5:0] r_addr, c_addr;

  assign ccc = dec.kind inside {K_DIN, K_DOU, K_CIN, K_COU};

  always_comb begin
    unique case (dec.amode)
      2'd0:    begin r_addr = {3'b000, dec.ir_row};       c_addr = {3'b000, dec.ir_col};       end
      2'd1:    begin r_addr = {bar_row[5:3], dec.ir_row}; c_addr = {bar_col[5:3], dec.ir_col}; end
      default: begin r_addr = bar_row;                    c_addr = bar_col;                    end
    endcase
    if (!ccc) begin
      r_addr = bar_row;
      c_addr = bar_col;
    end
    dec_on    = ccc || cmr == 2'd1;
    row_line  = dec_on ? (64'd1 << r_addr) : 64'd0;
    col_line  = dec_on ? (64'd1 << c_addr) : 64'd0;
    all_cells = !ccc && cmr == 2'd0;
    even_rows = !ccc && cmr == 2'd2;
    odd_rows  = !ccc && cmr == 2'd3;
  end

  logic       r_en, r_dn, c_en, c_dn, r_wrap;
  logic [5:0] r_nxt, c_nxt;
  always_comb begin
    r_en   = dec.ir_row[1];
    r_dn   = dec.ir_row[2];
    c_en   = dec.ir_col[1];
    c_dn   = dec.ir_col[2];
    r_nxt  = bar_row;
    c_nxt  = bar_col;
    r_wrap = 1'b0;
    if (r_en) begin
      r_nxt  = r_dn ? bar_row - 6'd1 : bar_row + 6'd1;
      r_wrap = r_dn ? bar_row == 6'd0 : bar_row == 6'd63;
    end
    if (c_en)   c_nxt = c_dn ? c_nxt - 6'd1 : c_nxt + 6'd1;
    if (r_wrap) c_nxt = r_dn ? c_nxt - 6'd1 : c_nxt + 6'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bar_row <= '0;
      bar_col <= '0;
      cmr     <= '0;
    end else if (bar_load) begin
      bar_col <= bar_wdata[5:0];
      bar_row <= bar_wdata[11:6];
      cmr     <= bar_wdata[13:12];
    end else if (step && ccc && dec.amode[1]) begin
      bar_row <= r_nxt;
      bar_col <= c_nxt;
    end
  end
endmodule
