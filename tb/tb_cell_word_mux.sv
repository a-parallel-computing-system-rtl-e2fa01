// tb_cell_word_mux -- checks the 16-to-1 word selector on random inputs for
// every selection, including "none" (0) and a disabled multiplexer.
module tb_cell_word_mux;
  logic [3:0] sel; logic en; logic [15:1] bits; logic y;
  int checks = 0, failures = 0;
  cell_word_mux dut (.*);
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic e;
    for (int t = 0; t < 50; t++)
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s); en = (t % 5) != 0; bits = 15'($urandom);
        e = en && s != 0 && bits[s];
        #1 checks++;
        if (y !== e) begin failures++; $display("FAIL sel %0d", s); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
