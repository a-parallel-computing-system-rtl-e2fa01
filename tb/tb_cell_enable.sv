// tb_cell_enable -- exhaustive self-checking test of the cell enable logic.
// Both variants (odd and even row) are instantiated and driven with every
// combination of the seven selection inputs, the buffer direction and
// every operation kind.  The reference: a cell is selected by its own
// point (row j, column i), by its whole row or column (the other line 0),
// by the whole-array point (0,0), or by the whole/even/odd flags; the input
// enable CEI follows the selection except for operations that only read
// out of the cell; the output enable CEO is its exact point for data and
// control-bit output and its row or column for transfers to the buffer.
module tb_cell_enable;
  import hpcs_pkg::*;
  logic [7:0] v;
  kind_e kind;
  logic cei_o, ceo_o, cei_e, ceo_e;
  int checks = 0, failures = 0;
  cell_enable #(.ROW_ODD(1'b1)) u_odd (.kind, .buf_col(v[7]), .row_j(v[0]), .row_0(v[1]),
    .col_i(v[2]), .col_0(v[3]), .all_cells(v[4]), .even_rows(v[5]), .odd_rows(v[6]),
    .cei(cei_o), .ceo(ceo_o));
  cell_enable #(.ROW_ODD(1'b0)) u_even (.kind, .buf_col(v[7]), .row_j(v[0]), .row_0(v[1]),
    .col_i(v[2]), .col_0(v[3]), .all_cells(v[4]), .even_rows(v[5]), .odd_rows(v[6]),
    .cei(cei_e), .ceo(ceo_e));

  task automatic check(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s v=%b kind=%s got %b", name, v, kind.name(), got); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++)
      for (int n = 0; n < 256; n++) begin
        logic rj, r0, ci, c0, pt, rd_only, ceo_x;
        kind = kind_e'(k); v = 8'(n);
        #1;
        {c0, ci, r0, rj} = v[3:0];
        pt = (rj || r0) && (ci || c0);
        rd_only = kind inside {K_DOU, K_COU, K_TTB, K_NOP};
        ceo_x = kind inside {K_DOU, K_COU} ? rj && ci :
                kind == K_TTB ? (v[7] ? r0 && ci : rj && c0) : 1'b0;
        check("cei odd",  cei_o, !rd_only && (pt || v[4] || v[6]));
        check("cei even", cei_e, !rd_only && (pt || v[4] || v[5]));
        check("ceo odd",  ceo_o, ceo_x);
        check("ceo even", ceo_e, ceo_x);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
