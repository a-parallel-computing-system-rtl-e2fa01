// tb_cell_dmpx -- exhaustive check of the destination demultiplexer:
// every address with enable and inhibit in all combinations.
module tb_cell_dmpx;
  logic [3:0] sel; logic en, inhibit; logic [15:1] we, exp;
  int checks = 0, failures = 0;
  cell_dmpx dut (.*);
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int s = 0; s < 16; s++)
      for (int c = 0; c < 4; c++) begin
        sel = 4'(s); en = c[0]; inhibit = c[1];
        exp = '0;
        if (en && !inhibit) exp = (s == 0) ? 15'h7fff : 15'(1 << (s - 1));
        #1 checks++;
        if (we !== exp) begin failures++; $display("FAIL sel %0d en %b inh %b got %h", s, en, inhibit, we); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
