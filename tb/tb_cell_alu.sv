// tb_cell_alu -- self-checking test of the one-bit serial ALU.
// Runs each of the ten serial operations over 16 bit cycles on random
// operands (LSB first, after the two-clock preset cycle) and compares the
// assembled 16-bit result with the arithmetic computed here.  Also checks
// the exponent-mode sign bit and carry linking without clearing.
module tb_cell_alu;
  import hpcs_pkg::*;
  logic clk = 0, rst_n = 0;
  alu_ctl_t ctl;
  logic clr_car, preset1, preset2, bitclk, cyc_end, ex15, x, y, z, carry;
  int checks = 0, failures = 0;

  cell_alu dut (.*);
  always #5 clk = ~clk;

  localparam alu_ctl_t A_ADD = '{0,1,0,1,0,1,1};
  localparam alu_ctl_t A_SUB = '{1,1,0,1,1,1,1};
  localparam alu_ctl_t A_AND = '{0,0,1,0,0,1,1};
  localparam alu_ctl_t A_EXO = '{0,1,0,0,0,1,1};
  localparam alu_ctl_t A_LOR = '{0,1,1,0,0,1,1};
  localparam alu_ctl_t A_COM = '{1,1,0,0,0,0,1};
  localparam alu_ctl_t A_TCM = '{1,1,0,1,1,0,1};
  localparam alu_ctl_t A_INC = '{0,1,0,1,1,0,1};
  localparam alu_ctl_t A_DEC = '{1,1,0,1,0,1,0};
  localparam alu_ctl_t A_MOV = '{0,1,0,0,0,0,1};

  task automatic run(input alu_ctl_t c, input logic [15:0] a, input logic [15:0] b,
                     input logic clr, output logic [15:0] r);
    ctl = c; clr_car = clr;
    @(negedge clk) preset1 = 1;
    @(negedge clk) begin preset1 = 0; preset2 = 1; end
    @(negedge clk) preset2 = 0;
    for (int i = 0; i < 16; i++) begin
      x = a[i]; y = b[i]; bitclk = 1;
      #1 r[i] = z;
      @(negedge clk);
    end
    bitclk = 0;
  endtask

  task automatic check(input string name, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", name, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a, b, r, lo;
    logic [31:0] w1, w2;
    preset1 = 0; preset2 = 0; bitclk = 0; cyc_end = 0; ex15 = 0; x = 0; y = 0;
    ctl = A_ADD; clr_car = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      a = 16'($urandom); b = 16'($urandom);
      if (t == 0) begin a = 16'hffff; b = 16'h0001; end
      run(A_ADD, a, b, 1, r); check("ADD", r, a + b);
      run(A_SUB, a, b, 1, r); check("SUB", r, a - b);
      run(A_AND, a, b, 1, r); check("AND", r, a & b);
      run(A_EXO, a, b, 1, r); check("EXO", r, a ^ b);
      run(A_LOR, a, b, 1, r); check("LOR", r, a | b);
      run(A_COM, a, b, 1, r); check("COM", r, ~b);
      run(A_TCM, a, b, 1, r); check("TCM", r, -b);
      run(A_INC, a, b, 1, r); check("INC", r, b + 16'd1);
      run(A_DEC, a, b, 1, r); check("DEC", r, a - 16'd1);
      run(A_MOV, a, b, 1, r); check("MOV", r, b);
    end
    // double precision: low words clear the carry, high words keep it
    for (int t = 0; t < 10; t++) begin
      w1 = $urandom; w2 = $urandom;
      run(A_ADD, w1[15:0], w2[15:0], 1, lo);
      run(A_ADD, w1[31:16], w2[31:16], 0, r);
      check("ADD32", r, 16'((w1 + w2) >> 16));
      check("ADD32lo", lo, 16'(w1 + w2));
    end
    // exponent-mode sign bit: plain exclusive-or, carry ignored
    ctl = A_ADD; ex15 = 1; x = 1; y = 1; #1 check("EX15 xor", {15'd0, z}, 16'd0);
    x = 1; y = 0; #1 check("EX15 xor2", {15'd0, z}, 16'd1);
    ex15 = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
