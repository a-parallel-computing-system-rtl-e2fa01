// tb_laplace -- workload test: Laplace's equation on a 6 x 6 mesh, one mesh
// point per cell, solved by Jacobi iteration the way the array is meant to
// be used.  Boundary cells hold fixed values and have their I control bit
// set, so the unconditional-inhibit bit of the update instruction leaves
// them alone; interior cells have their C bit set and take part in the
// convergence test.  One iteration is:
//   M15 <- M3                      (old value, for the convergence compare)
//   M4  <- M3(N) ; M4 += M3(S) ; M4 += M3(E) ; M4 += M3(W)
//   AC1 <- M4 ; shift AC1 right twice                 (divide by 4)
//   M3  <- AC1, inhibited by I, convergence tested from bit 1 upward
// and the host repeats it until the status register shows convergence.
// The bench iterates the same integer arithmetic in a model and checks the
// number of iterations and the final value of every cell.  Mesh size and
// boundary values are this test's own choice.
module tb_laplace;
  import hpcs_pkg::*;
  localparam int N = 6;
  localparam logic [17:0] A_IR1 = 18'o767770, A_IR2 = 18'o767772,
                          A_DR = 18'o767774, A_DSR = 18'o767776, A_BAR = 18'o767760;
  logic clk = 0, rst_n = 0;
  logic [17:0] bus_addr;
  logic bus_wr;
  logic [15:0] bus_wdata, bus_rdata;
  logic busy, cnv_flag;
  int checks = 0, failures = 0;
  logic [15:0] m [N][N];

  hpcs_top #(.ROWS(N), .COLS(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic bwr(input logic [17:0] a, input logic [15:0] d);
    @(negedge clk) begin bus_addr = a; bus_wdata = d; bus_wr = 1; end
    @(negedge clk) bus_wr = 0;
  endtask
  task automatic brd(input logic [17:0] a, output logic [15:0] d);
    @(negedge clk) bus_addr = a;
    #1 d = bus_rdata;
  endtask
  task automatic check(input string name, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d expected %0d", name, got, exp); end
  endtask
  task automatic exec(input logic [31:0] i);
    logic [15:0] st;
    bwr(A_IR2, i[31:16]);
    bwr(A_IR1, i[15:0]);
    repeat (2) @(negedge clk);
    do brd(A_DSR, st); while (st[7]);
  endtask
  function automatic logic [31:0] alo(input int op, d, a, b, nbr = 0, ui = 0, cnv = 0);
    return 32'(op) | 32'(d) << 4 | 32'(a) << 8 | 32'(b) << 12 | 32'(nbr) << 17 |
           32'(ui) << 23 | 32'(cnv) << 27;
  endfunction
  function automatic logic [31:0] ccc(input int op, w, row, col);
    return 32'(op) | 32'(w) << 4 | 32'(row) << 10 | 32'(col) << 13 | 32'h10000;
  endfunction
  function automatic bit on_edge(input int r, c);
    return r == 0 || c == 0 || r == N - 1 || c == N - 1;
  endfunction

  initial begin
    #50000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] v, st;
    logic [15:0] nm [N][N];
    int model_iters, iters;
    bit done;
    bus_addr = 0; bus_wr = 0; bus_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // boundary: top edge hot, left edge warm, rest 0; interior starts at 0
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        m[r][c] = (r == 0) ? 16'd4000 : (c == 0) ? 16'(1000 + 200 * r) : 16'd0;
        bwr(A_DR, m[r][c]);
        exec(ccc(CC_DIN, 3, r + 1, c + 1));
        bwr(A_DR, on_edge(r, c) ? 16'b0100 : 16'b1000);   // {C, I, S, Z}
        exec(ccc(CC_CIN, 0, r + 1, c + 1));
      end
    // model
    model_iters = 0;
    do begin
      done = 1;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          if (on_edge(r, c)) nm[r][c] = m[r][c];
          else begin
            nm[r][c] = 16'((m[r-1][c] + m[r+1][c] + m[r][c+1] + m[r][c-1]) >> 2);
            if (nm[r][c][15:1] != m[r][c][15:1]) done = 0;
          end
        end
      m = nm;
      model_iters++;
    end while (!done && model_iters < 500);
    // the array
    iters = 0;
    do begin
      exec(alo(OP_MOV, 15, 0, 3));
      exec(alo(OP_MOV, 4, 0, 3, NB_N));
      exec(alo(OP_ADD, 4, 4, 3, NB_S));
      exec(alo(OP_ADD, 4, 4, 3, NB_E));
      exec(alo(OP_ADD, 4, 4, 3, NB_W));
      exec(alo(OP_MOV, 1, 0, 4));
      exec(32'(OP_SHR) | 32'd2 << 4);
      exec(32'(OP_SHR) | 32'd2 << 4);
      exec(alo(OP_MOV, 3, 0, 1, 0, 1, 1));
      brd(A_DSR, st);
      iters++;
    end while (!st[15] && iters < 500);
    $display("converged after %0d iterations (model %0d)", iters, model_iters);
    check("iterations", iters, model_iters);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        exec(ccc(CC_DOU, 3, r + 1, c + 1));
        brd(A_DR, v);
        check($sformatf("cell(%0d,%0d)", r, c), v, m[r][c]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
