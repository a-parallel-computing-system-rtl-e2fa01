// tb_cell_control_bits -- self-checking test of the control flip-flops.
// Loads {C, I, S, Z} through the shift chain, reads them back
// non-destructively, watches AC1 writes set Z and S, and checks all eight
// conditional-inhibit codes plus unconditional inhibit and the convergence
// gate against a model written in the bench.
module tb_cell_control_bits;
  logic clk = 0, rst_n = 0;
  logic clr_zero, ac1_wr, ac1_bit, sign_clk, unc_inh, flt, det16, det24;
  logic [2:0] cond_inh;
  logic inhibit, cnv_check, incoming, m15_bit, cnv_diff, sh_clk, sh_rot, sh_in, ctl_out;
  logic [3:0] bits;
  int checks = 0, failures = 0;

  cell_control_bits dut (.*);
  always #5 clk = ~clk;

  task automatic check(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", name, got, exp); end
  endtask

  task automatic load(input logic [3:0] v);
    sh_rot = 0;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk) begin sh_clk = 1; sh_in = v[i]; end
    end
    @(negedge clk) sh_clk = 0;
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [3:0] v, r;
    logic cond, exp;
    {clr_zero, ac1_wr, ac1_bit, sign_clk, unc_inh, flt, det16, det24} = '0;
    cond_inh = 0; cnv_check = 0; incoming = 0; m15_bit = 0; sh_clk = 0; sh_rot = 0; sh_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      v = 4'($urandom);
      load(v);
      check("load", bits == v, 1'b1);
      // non-destructive read out
      sh_rot = 1;
      for (int i = 0; i < 4; i++) begin
        @(negedge clk) sh_clk = 1;
        #1 r[i] = ctl_out;
      end
      @(negedge clk) begin sh_clk = 0; sh_rot = 0; end
      check("read value", r == v, 1'b1);
      check("read keeps", bits == v, 1'b1);
      // inhibit codes
      for (int c = 0; c < 8; c++)
        for (int u = 0; u < 2; u++) begin
          cond_inh = 3'(c); unc_inh = u[0]; flt = $urandom; det16 = $urandom; det24 = $urandom;
          case (c / 2)
            0: cond = 0;
            1: cond = v[0];
            2: cond = v[1];
            default: cond = flt ? det24 : det16;
          endcase
          exp = (cond ^ c[0]) | (unc_inh & v[2]);
          #1 check("inhibit", inhibit, exp);
        end
      // convergence gate
      cnv_check = 1; incoming = $urandom; m15_bit = $urandom;
      #1 check("cnv", cnv_diff, v[3] & (incoming ^ m15_bit));
      cnv_check = 0;
    end
    // Z/S watch: write 0x8000 then 0x0000 into AC1
    @(negedge clk) clr_zero = 1;
    @(negedge clk) clr_zero = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin ac1_wr = 1; ac1_bit = (i == 15); sign_clk = (i == 15); end
    end
    @(negedge clk) begin ac1_wr = 0; sign_clk = 0; end
    check("Z after 8000", bits[0], 1'b1);
    check("S after 8000", bits[1], 1'b1);
    @(negedge clk) clr_zero = 1;
    @(negedge clk) clr_zero = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) begin ac1_wr = 1; ac1_bit = 0; sign_clk = (i == 15); end
    end
    @(negedge clk) begin ac1_wr = 0; sign_clk = 0; end
    check("Z after 0", bits[0], 1'b0);
    check("S after 0", bits[1], 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
