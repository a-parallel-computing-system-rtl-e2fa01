// tb_control_unit -- self-checking test of the control unit (instruction
// decoder, sequencer and cell addressing together, plus the convergence
// flip-flop).  The bench writes instructions and start pulses as the
// interface would and stands in for the array's convergence line.
// Checked: busy-clock counts of whole instructions; the broadcast decoded
// instruction stays stable while busy; the data-register write strobe
// fires once per bit for data output (16) and control-bit output (4) and
// never otherwise; the point selected for a direct-addressed transfer; and
// the convergence flag: set at the end of a tested operation when no cell
// reported a difference, cleared when any did (at any bit, including the
// first one and the last one), untouched by operations without a
// convergence field.
module tb_control_unit;
  import hpcs_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, bar_load = 0, cnv_any = 0;
  logic [31:0] ir;
  logic [15:0] bar_wdata = 0;
  dec_t dec;
  tim_t tim;
  logic [63:0] row_line, col_line;
  logic all_cells, even_rows, odd_rows, busy, cnv_flag, dr_wr;
  int checks = 0, failures = 0;
  control_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(input string name, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", name, got, exp); end
  endtask

  // run one instruction; diff_at < 0 means no difference reported
  task automatic run(input logic [31:0] i, input int diff_at, output int clocks, output int wrs);
    dec_t d0;
    @(negedge clk) begin ir = i; start = 1; end
    @(negedge clk) begin start = 0; ir = $urandom; end    // IR may change while busy
    d0 = dec; clocks = 0; wrs = 0;
    while (busy) begin
      clocks++;
      cnv_any = tim.bitclk && (tim.cnt == 5'(diff_at));
      if (dr_wr) wrs++;
      check("dec stable", dec, d0);
      @(negedge clk);
    end
    cnv_any = 0;
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int clocks, wrs;
    ir = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(32'h0000_3421, -1, clocks, wrs);                   // ADD M2 = M4 + M3
    check("ADD clocks", clocks, 18); check("ADD no DR write", wrs, 0);
    run(32'h0001_0052, -1, clocks, wrs);                   // DOU M5
    check("DOU clocks", clocks, 18); check("DOU DR writes", wrs, 16);
    run(32'h0001_0004, -1, clocks, wrs);                   // COU
    check("COU clocks", clocks, 4); check("COU DR writes", wrs, 4);
    run(32'h0000_0318, -1, clocks, wrs);                   // MPY
    check("MPY clocks", clocks, 138);
    // direct-addressed point (row 3, column 5) for a DIN
    @(negedge clk) begin ir = 32'(CC_DIN) | 32'd7 << 4 | 32'd3 << 10 | 32'd5 << 13 | 32'h10000; start = 1; end
    @(negedge clk) start = 0;
    check("DIN row line", row_line, 64'd1 << 3);
    check("DIN col line", col_line, 64'd1 << 5);
    while (busy) @(negedge clk);
    // convergence flag
    for (int n = 0; n < 40; n++) begin
      automatic int at = (n % 4 == 0) ? -1 : $urandom_range(0, 15);
      automatic logic prev = cnv_flag;
      if (n % 8 == 7) begin
        run(32'h0000_3421, at, clocks, wrs);              // no convergence field
        check("flag untouched", cnv_flag, prev);
      end else begin
        if (n == 1) at = 0;
        if (n == 2) at = 15;
        run(32'h0800_3421 | 32'($urandom_range(0, 7)) << 28, at, clocks, wrs);
        check("flag", cnv_flag, at < 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
