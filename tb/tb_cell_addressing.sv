// tb_cell_addressing -- self-checking test of the cell addressing system.
// Random BAR/CMR loads and random communication and computing operations
// are applied; the bench keeps its own copy of the BAR and checks the
// selected row and column lines (one-hot, line 0 meaning "all"), the
// whole/even/odd flags, and the automatic stepping of the BAR at the end of
// an AUT-mode transfer (row up/down, column up/down, carry from the row
// into the column at the ends).  The BAR mode of computing operations
// (CMR = 1) and the concatenated mode (upper BAR bits with the lower
// instruction bits) are covered.
module tb_cell_addressing;
  import hpcs_pkg::*;
  logic clk = 0, rst_n = 0, bar_load = 0, step = 0;
  logic [15:0] bar_wdata;
  dec_t dec;
  logic [63:0] row_line, col_line;
  logic all_cells, even_rows, odd_rows;
  logic [5:0] bar_row, bar_col;
  logic [1:0] cmr;
  int checks = 0, failures = 0, n_aut = 0, n_conc = 0;
  logic [5:0] m_row, m_col;
  logic [1:0] m_cmr;
  cell_addressing dut (.*);
  always #5 clk = ~clk;

  task automatic check(input string name, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", name, got, exp); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    kind_e kinds[6] = '{K_DIN, K_DOU, K_CIN, K_COU, K_ALU, K_TTB};
    dec = '0; bar_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m_row = 0; m_col = 0; m_cmr = 0;
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 3) == 0) begin
        bar_wdata = 16'($urandom);
        if ($urandom_range(0, 3) == 0) bar_wdata[11:6] = 6'($urandom_range(0, 1) ? 63 : 0);
        bar_load = 1;
        @(negedge clk) bar_load = 0;
        {m_cmr, m_row, m_col} = bar_wdata[13:0];
      end
      dec = '0;
      dec.kind = kinds[$urandom_range(0, 5)];
      dec.amode = 2'($urandom);
      dec.ir_row = 3'($urandom);
      dec.ir_col = 3'($urandom);
      #1;
      if (dec.kind inside {K_DIN, K_DOU, K_CIN, K_COU}) begin
        logic [5:0] r, c;
        case (dec.amode)
          0: begin r = 6'(dec.ir_row); c = 6'(dec.ir_col); end
          1: begin r = {m_row[5:3], dec.ir_row}; c = {m_col[5:3], dec.ir_col}; n_conc++; end
          default: begin r = m_row; c = m_col; end
        endcase
        check("ccc row line", row_line, 64'd1 << r);
        check("ccc col line", col_line, 64'd1 << c);
        check("ccc flags", {all_cells, even_rows, odd_rows}, 0);
      end else begin
        check("cco row line", row_line, m_cmr == 1 ? 64'd1 << m_row : 64'd0);
        check("cco col line", col_line, m_cmr == 1 ? 64'd1 << m_col : 64'd0);
        check("cco flags", {all_cells, even_rows, odd_rows},
              {m_cmr == 0, m_cmr == 2, m_cmr == 3});
      end
      // end of operation
      step = 1;
      @(negedge clk) step = 0;
      if (dec.kind inside {K_DIN, K_DOU, K_CIN, K_COU} && dec.amode[1]) begin
        automatic logic wrap = 0;
        n_aut++;
        if (dec.ir_row[1]) begin
          wrap = dec.ir_row[2] ? m_row == 0 : m_row == 63;
          m_row = dec.ir_row[2] ? m_row - 1 : m_row + 1;
        end
        if (dec.ir_col[1]) m_col = dec.ir_col[2] ? m_col - 1 : m_col + 1;
        if (wrap)          m_col = dec.ir_row[2] ? m_col - 1 : m_col + 1;
      end
      check("BAR row", bar_row, m_row);
      check("BAR col", bar_col, m_col);
      check("CMR", cmr, m_cmr);
    end
    check("AUT exercised", n_aut > 100, 1);
    check("CONC exercised", n_conc > 100, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
