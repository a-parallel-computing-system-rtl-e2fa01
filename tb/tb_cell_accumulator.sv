// tb_cell_accumulator -- self-checking test of the accumulator register.
// Checks non-destructive serial reading (16 and 24-bit rings), serial
// writing, logical and rotating parallel shifts left and right in both
// widths, the 1 detectors, and that AC2 (ALLOW_LEFT = 0) never shifts left.
// Expected values are computed with plain shift operators in the bench.
module tb_cell_accumulator;
  logic clk = 0, rst_n = 0;
  logic flt, ser_clk, wr, din, par_clk, left, rot;
  logic dout1, m16_1, m24_1, dout2, m16_2, m24_2;
  logic [23:0] q1, q2;
  int checks = 0, failures = 0;

  cell_accumulator #(.ALLOW_LEFT(1'b1)) ac1 (.clk, .rst_n, .flt, .ser_clk, .wr, .din,
    .par_clk, .left, .rot, .dout(dout1), .msb16(m16_1), .msb24(m24_1), .q(q1));
  cell_accumulator #(.ALLOW_LEFT(1'b0)) ac2 (.clk, .rst_n, .flt, .ser_clk, .wr, .din,
    .par_clk, .left, .rot, .dout(dout2), .msb16(m16_2), .msb24(m24_2), .q(q2));
  always #5 clk = ~clk;

  task automatic check(input string name, input logic [23:0] got, input logic [23:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", name, got, exp); end
  endtask

  // serially write a value of n bits (LSB first) with ring width w
  task automatic swrite(input logic [23:0] v, input int n, input logic f);
    flt = f; wr = 1;
    for (int i = 0; i < n; i++) begin
      @(negedge clk) begin ser_clk = 1; din = v[i]; end
    end
    @(negedge clk) begin ser_clk = 0; wr = 0; end
  endtask

  task automatic sread(input int n, input logic f, output logic [23:0] v);
    flt = f; wr = 0; v = '0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk) ser_clk = 1;
      #1 v[i] = dout1;
    end
    @(negedge clk) ser_clk = 0;
  endtask

  task automatic pshift(input int n, input logic l, input logic r, input logic f);
    flt = f; left = l; rot = r;
    repeat (n) @(negedge clk) par_clk = 1;
    @(negedge clk) par_clk = 0;
  endtask

  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] v, r, e;
    flt = 0; ser_clk = 0; wr = 0; din = 0; par_clk = 0; left = 0; rot = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      v = 24'($urandom);
      // INT: 16-bit ring, upper byte untouched
      swrite(v, 16, 0);
      check("int write", q1, {8'h00, v[15:0]} | (q1 & 24'hff0000));
      e = q1;
      sread(16, 0, r);
      check("int read value", r, {8'h00, e[15:0]});
      check("int read keeps", q1, e);
      check("det16", {23'd0, m16_1}, {23'd0, e[15]});
      // FLT: 24-bit ring
      swrite(v, 24, 1);
      check("flt write", q1, v);
      check("det24", {23'd0, m24_1}, {23'd0, v[23]});
      // left logical 1 and 8, INT
      e = q1;
      pshift(1, 1, 0, 0);
      check("shl1 int", q1, {e[23:16], e[14:0], 1'b0});
      e = q1;
      pshift(8, 1, 1, 0);
      check("rol8 int", q1, {e[23:16], e[7:0], e[15:8]});
      e = q1;
      pshift(8, 0, 0, 1);
      check("shr8 flt", q1, {8'h00, e[23:8]});
      e = q1;
      pshift(1, 0, 1, 1);
      check("ror1 flt", q1, {e[0], e[23:1]});
      e = q2;
      pshift(3, 1, 0, 1);
      check("ac2 no left", q2, {3'b000, e[23:3]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
