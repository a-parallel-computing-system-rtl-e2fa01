// tb_hpcs_top_large -- the system on a 16 x 16 array (the largest size
// that builds quickly under verilator; the design's default is 63 x 63 and
// the code below works unchanged for it).  A short host program drives the
// bus: loads words into the four corner cells and the centre through the
// BAR, broadcasts a constant to every cell, adds whole-array, moves data
// from the southern neighbour, transposes the last row into the last
// column through the buffer, and reads the results back, checking them
// against a model kept for the cells it touches.  Busy-clock counts are
// checked against the bit-serial timing (18 clocks for a 16-bit operation).
module tb_hpcs_top_large;
  import hpcs_pkg::*;
  localparam int N = 16;
  localparam logic [17:0] A_IR1 = 18'o767770, A_IR2 = 18'o767772,
                          A_DR = 18'o767774, A_DSR = 18'o767776, A_BAR = 18'o767760;
  logic clk = 0, rst_n = 0;
  logic [17:0] bus_addr;
  logic bus_wr;
  logic [15:0] bus_wdata, bus_rdata;
  logic busy, cnv_flag;
  int checks = 0, failures = 0, busy_clocks;

  hpcs_top #(.ROWS(N), .COLS(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (busy) busy_clocks++;

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
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", name, got, exp); end
  endtask
  task automatic exec(input logic [31:0] i);
    logic [15:0] st;
    bwr(A_IR2, i[31:16]);
    bwr(A_IR1, i[15:0]);
    busy_clocks = 0;
    repeat (2) @(negedge clk);
    do brd(A_DSR, st); while (st[7]);
  endtask
  function automatic logic [31:0] alo(input int op, d, a, b, nbr = 0);
    return 32'(op) | 32'(d) << 4 | 32'(a) << 8 | 32'(b) << 12 | 32'(nbr) << 17;
  endfunction
  // Direct addressing reaches rows/columns 1..7; the BAR (automatic mode
  // without stepping) reaches every cell.
  task automatic din_bar(input int r, c, w, input logic [15:0] v);
    bwr(A_BAR, 16'(c + 1) | 16'(r + 1) << 6 | 16'(1) << 12);
    bwr(A_DR, v);
    exec(32'(CC_DIN) | 32'(w) << 4 | 32'd2 << 8 | 32'h10000);   // BAR address, no stepping
  endtask
  task automatic dou_bar(input int r, c, w, output logic [15:0] v);
    bwr(A_BAR, 16'(c + 1) | 16'(r + 1) << 6 | 16'(1) << 12);
    exec(32'(CC_DOU) | 32'(w) << 4 | 32'd2 << 8 | 32'h10000);
    brd(A_DR, v);
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int rr[5], cc[5];
    logic [15:0] val[5], v, k;
    rr = '{0, 0, N-1, N-1, N/2}; cc = '{0, N-1, 0, N-1, N/2};
    bus_addr = 0; bus_wr = 0; bus_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // whole-array broadcast of a constant into M4 (point 0,0, CMR 0)
    k = 16'($urandom);
    bwr(A_DR, k);
    exec(32'(CC_DIN) | 32'd4 << 4 | 32'h10000);
    check("broadcast duration", busy_clocks, 18);
    for (int i = 0; i < 5; i++) begin
      val[i] = 16'($urandom);
      din_bar(rr[i], cc[i], 3, val[i]);
    end
    // whole-array M5 = M3 + M4
    bwr(A_BAR, 16'h0000);
    exec(alo(OP_ADD, 5, 3, 4));
    check("ADD duration", busy_clocks, 18);
    for (int i = 0; i < 5; i++) begin
      dou_bar(rr[i], cc[i], 5, v);
      check($sformatf("ADD cell(%0d,%0d)", rr[i], cc[i]), v, 16'(val[i] + k));
    end
    dou_bar(1, 2, 5, v);
    check("ADD untouched cell", v, k);
    // M6 = M3 of the southern neighbour; the last row sees the open edge
    bwr(A_BAR, 16'h0000);
    exec(alo(OP_MOV, 6, 0, 3, NB_S));
    dou_bar(N-2, 0, 6, v);  check("south of (61,0)", v, val[2]);
    dou_bar(N/2 - 1, N/2, 6, v);  check("south of centre-1", v, val[4]);
    dou_bar(N-1, 0, 6, v);  check("south edge", v, 16'h0);
    // transpose the last row into the last column through the buffer
    bwr(A_BAR, 16'(N) << 6 | 16'(1) << 12);
    exec(32'(CC_BUF) | 32'd3 << 4 | 32'd3 << 12 | 32'h10000);
    bwr(A_BAR, 16'(N) | 16'(1) << 12);
    exec(32'(CC_BUF) | 32'd1 << 3 | 32'd7 << 4 | 32'd1 << 11 | 32'd3 << 12 | 32'h10000);
    dou_bar(0, N-1, 7, v);    check("transpose (0,N-1)", v, val[2]);
    dou_bar(N-1, N-1, 7, v);  check("transpose (N-1,N-1)", v, val[3]);
    dou_bar(5, N-1, 7, v);    check("transpose (5,N-1)", v, 16'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
