// tb_assoc_detector -- self-checking test of the associative flip-flops and
// the cell-address priority detector, on a 9 x 11 array.
// Random capture enables and conditions load the flip-flops; the bench keeps
// its own copy and, after every change, checks the found flag and the
// reported address against a plain scan in priority order (row by row from
// the top, left to right within a row; addresses are line numbers, 1-based).
// It then drains the matches by pulsing the reset and checks that they come
// out one by one in exactly that order, followed by "none found".  The
// document's own example (two matches in different rows; the lower row is
// reported first) is included.
module tb_assoc_detector;
  localparam int R = 9, C = 11;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [R-1:0][C-1:0] cap, cond, flags, model;
  logic found;
  logic [5:0] row_addr, col_addr;
  int checks = 0, failures = 0;
  assoc_detector #(.ROWS(R), .COLS(C)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input string name, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d expected %0d", name, got, exp); end
  endtask
  task automatic expect_first();
    int fr = -1, fc = -1;
    for (int r = R - 1; r >= 0; r--)
      for (int c = C - 1; c >= 0; c--)
        if (model[r][c] && (fr < 0 || r < fr || (r == fr && c < fc))) begin fr = r; fc = c; end
    check("found", found, fr >= 0);
    check("row", row_addr, fr >= 0 ? fr + 1 : 0);
    check("col", col_addr, fr >= 0 ? fc + 1 : 0);
  endtask
  task automatic drain();
    int n = 0;
    while (found && n < R * C + 1) begin
      expect_first();
      model[row_addr - 1][col_addr - 1] = 1'b0;
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      n++;
    end
    check("drained", model, '0);
    expect_first();
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cap = '0; cond = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("empty after reset", found, 0);
    // the document's example: matches at (row 1, column 6) and (row 5, column 2)
    cap = '1; cond = '0;
    cond[0][5] = 1; cond[4][1] = 1;
    @(negedge clk) cap = '0;
    model = cond;
    check("example first row", row_addr, 1);
    check("example first col", col_addr, 6);
    drain();
    for (int t = 0; t < 60; t++) begin
      for (int k = 0; k < 4; k++) begin
        for (int r = 0; r < R; r++) begin
          cap[r]  = C'({$urandom, $urandom});
          cond[r] = C'({$urandom, $urandom}) & C'({$urandom, $urandom});
        end
        if (t % 3 == 0) cap = '1;
        @(negedge clk);
        model = (model & ~cap) | (cond & cap);
        cap = '0;
        #1 expect_first();
      end
      drain();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
