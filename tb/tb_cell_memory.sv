// tb_cell_memory -- self-checking test of the thirteen bit-addressed words.
// Writes random words bit by bit into chosen words (one, several, all),
// reads them back bit by bit and compares with a model kept in the bench.
module tb_cell_memory;
  import hpcs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] addr;
  logic [15:3] we, rbit;
  logic din;
  logic [15:3][15:0] words, model;
  int checks = 0, failures = 0;

  cell_memory dut (.clk, .rst_n, .addr, .we, .din, .rbit, .words);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v, r;
    logic [15:3] mask;
    addr = 0; we = 0; din = 0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      v = 16'($urandom);
      mask = (t % 10 == 0) ? '1 : 13'(1 << ($urandom % 13));
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        addr = 4'(i); din = v[i]; we = mask;
        @(negedge clk);
      end
      we = '0;
      for (int w = 3; w <= 15; w++) if (mask[w]) model[w] = v;
      for (int w = 3; w <= 15; w++) begin
        for (int i = 0; i < 16; i++) begin addr = 4'(i); #1 r[i] = rbit[w]; end
        checks++;
        if (r !== model[w]) begin failures++; $display("FAIL word %0d got %h exp %h", w, r, model[w]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
