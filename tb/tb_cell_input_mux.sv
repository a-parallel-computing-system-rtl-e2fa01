// tb_cell_input_mux -- checks that MPX C passes exactly the selected one of
// its eight inputs (own, N, S, E, W, row, column, external) and gives 0 when
// disabled.
module tb_cell_input_mux;
  import hpcs_pkg::*;
  nbr_e sel; logic en, own, n, s, e, w, row, col, ext, y;
  int checks = 0, failures = 0;
  cell_input_mux dut (.*);
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] v; logic exp;
    for (int t = 0; t < 40; t++)
      for (int k = 0; k < 8; k++) begin
        v = 8'($urandom); en = (t % 4) != 0;
        {ext, col, row, w, e, s, n, own} = v;
        sel = nbr_e'(k);
        exp = en & v[k];
        #1 checks++;
        if (y !== exp) begin failures++; $display("FAIL sel %0d", k); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
