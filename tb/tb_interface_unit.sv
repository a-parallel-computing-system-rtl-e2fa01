// tb_interface_unit -- self-checking test of the host interface.
// Plays the host bus against the interface alone, with the bench standing
// in for the control unit (busy, convergence, serial data-register side).
// Checked: the address selector (upper five bits all ones, jumper field
// 0777 for the four device registers and 0776 for the BAR/CMR register;
// random other addresses must not hit); writing IR1 produces exactly one
// start pulse one clock later and IR2/IR1 form the 32-bit instruction;
// IR1 and BAR writes are ignored while busy; DR parallel read/write;
// DSR carries busy in bit 7 and convergence in bit 15; the serial side
// reads and writes DR one bit at a time at the bit address.
module tb_interface_unit;
  logic clk = 0, rst_n = 0;
  logic [17:0] bus_addr;
  logic bus_wr = 0;
  logic [15:0] bus_wdata, bus_rdata;
  logic [31:0] ir;
  logic start, bar_load, busy = 0, cnv_flag = 0, dr_wr = 0, dr_din = 0, dr_bit;
  logic [15:0] bar_wdata, dr_q;
  logic [3:0] dr_addr = 0;
  logic asc_found = 0, asc_clr;
  logic [5:0] asc_row = 0, asc_col = 0;
  int checks = 0, failures = 0, starts = 0, bar_loads = 0, asc_clrs = 0;
  localparam logic [17:0] A_IR1 = 18'o767770, A_IR2 = 18'o767772,
                          A_DR = 18'o767774, A_DSR = 18'o767776, A_BAR = 18'o767760;
  interface_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (start) starts++;
    if (bar_load) bar_loads++;
    if (asc_clr) asc_clrs++;
  end

  task automatic check(input string name, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", name, got, exp); end
  endtask
  task automatic bwr(input logic [17:0] a, input logic [15:0] d);
    @(negedge clk) begin bus_addr = a; bus_wdata = d; bus_wr = 1; end
    @(negedge clk) bus_wr = 0;
  endtask
  task automatic brd(input logic [17:0] a, output logic [15:0] d);
    @(negedge clk) bus_addr = a;
    #1 d = bus_rdata;
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] d, lo, hi;
    bus_addr = 0; bus_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      lo = 16'($urandom); hi = 16'($urandom);
      bwr(A_IR2, hi);
      check("no start from IR2", starts, n);
      bus_addr = A_IR1; bus_wdata = lo; bus_wr = 1;
      @(posedge clk); #1 check("start one clock after IR1 write", start, 1);
      @(negedge clk) bus_wr = 0;
      @(negedge clk) check("single start", starts, n + 1);
      check("IR", ir, {hi, lo});
    end
    // writes ignored while busy
    busy = 1;
    bwr(A_IR1, 16'h1234);
    bwr(A_BAR, 16'h0555);
    check("no start while busy", starts, 200);
    check("no BAR load while busy", bar_loads, 0);
    check("IR kept while busy", ir[15:0], lo);
    cnv_flag = 1;
    brd(A_DSR, d); check("DSR busy/cnv", d, 16'h8080);
    busy = 0; cnv_flag = 0;
    brd(A_DSR, d); check("DSR free", d, 16'h0000);
    bwr(A_BAR, 16'h2abc);
    check("BAR load", bar_loads, 1);
    // associative address register at BAR + 2
    asc_found = 1; asc_row = 6'd5; asc_col = 6'd41;
    brd(A_BAR + 18'd2, d); check("ASC read", d, 16'h8000 | 16'd5 << 6 | 16'd41);
    asc_found = 0; asc_row = 0; asc_col = 0;
    brd(A_BAR + 18'd2, d); check("ASC read none", d, 16'h0000);
    bwr(A_BAR + 18'd2, 16'h0);
    check("ASC reset pulse", asc_clrs, 1);
    check("ASC write is not a BAR load", bar_loads, 1);
    // DR parallel and serial sides
    for (int n = 0; n < 50; n++) begin
      automatic logic [15:0] w = 16'($urandom), w2;
      bwr(A_DR, w);
      brd(A_DR, d); check("DR read back", d, w);
      for (int b = 0; b < 16; b++) begin
        dr_addr = 4'(b); #1 check("DR serial bit", dr_bit, w[b]);
      end
      w2 = 16'($urandom);
      for (int b = 0; b < 16; b++) begin
        @(negedge clk) begin dr_addr = 4'(b); dr_din = w2[b]; dr_wr = 1; end
      end
      @(negedge clk) dr_wr = 0;
      brd(A_DR, d); check("DR serial write", d, w2);
    end
    // address selector: random addresses only hit the five registers
    for (int n = 0; n < 2000; n++) begin
      automatic logic [17:0] a = 18'($urandom);
      automatic logic hit;
      if (n % 3 == 0) a[17:13] = 5'h1f;
      if (n % 9 == 0) a[12:4] = 9'o77;
      if (n < 75) begin                       // near misses: one address bit flipped
        a = (n % 5 == 0) ? A_IR1 : (n % 5 == 1) ? A_IR2 : (n % 5 == 2) ? A_DR :
            (n % 5 == 3) ? A_DSR : A_BAR;
        a[3 + n / 5] = !a[3 + n / 5];
      end
      hit = &a[17:13] && (a[12:3] == 10'o777 || a[12:3] == 10'o776);
      if (!hit) begin
        bwr(a, 16'($urandom));
        brd(a, d);
        check("no hit: read 0", d, 0);
      end
    end
    check("stray writes: no start", starts, 200);
    check("stray writes: no BAR", bar_loads, 1);
    check("stray writes: no ASC reset", asc_clrs, 1);
    brd(A_DR, d); check("stray writes: DR kept", d, dr_q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
