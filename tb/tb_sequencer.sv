// tb_sequencer -- self-checking test of the clock unit / sequencer.
// For each kind of operation and each arithmetic mode it starts the
// sequencer and records, clock by clock, the timing outputs.  Checked:
// the number of busy clocks (2 preset clocks plus one clock per bit: 18
// for a 16-bit operation, 10 for the 8-bit floating-point fields, 17 for
// the 15-bit absolute-value mode, 2 + 8 x 17 = 138 for an integer multiply,
// 2 + 8 x 25 for a floating multiply, 1 or 8 for a parallel shift, 4 for a
// control-bit transfer); that the two preset pulses come first and only for
// operations that have them; the sequence of bit addresses (ascending,
// descending for the sign-spreading operation, offset for the first
// floating field); a single fin pulse on the last busy clock; and that the
// multiplier-interrogation pulse falls where the bit counter equals the
// cycle counter, once per cycle.
module tb_sequencer;
  import hpcs_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  dec_t dec_in, dec;
  tim_t tim;
  logic busy, fin;
  int checks = 0, failures = 0;
  sequencer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input string name, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d expected %0d", name, got, exp); end
  endtask

  task automatic run(input string name, input kind_e k, input mode_e m, input bit flt,
                     input bit sh8, input int exp_clocks, input int first_addr,
                     input int nbits, input bit pre);
    int clocks, fins, pres, mpys, bits;
    int addr_exp;
    dec_in = '0; dec_in.kind = k; dec_in.mode = m; dec_in.flt = flt; dec_in.shr_8 = sh8;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check({name, " start"}, tim.start, 1);
    clocks = 0; fins = 0; pres = 0; mpys = 0; bits = 0; addr_exp = first_addr;
    while (busy) begin
      clocks++;
      if (tim.preset1) begin check({name, " preset1 position"}, clocks, 1); pres++; end
      if (tim.preset2) begin check({name, " preset2 position"}, clocks, 2); pres++; end
      if (fin) fins++;
      if (tim.mpy_clk) begin mpys++; check({name, " mpy_clk"}, tim.cnt, (mpys - 1)); end
      if (tim.bitclk && k != K_MPY) begin
        bits++;
        check({name, " addr"}, tim.addr, addr_exp & 15);
        addr_exp += (k == K_SSR) ? -1 : 1;
      end
      if (fin) check({name, " fin on last clock"}, clocks, exp_clocks);
      @(negedge clk);
    end
    check({name, " clocks"}, clocks, exp_clocks);
    check({name, " fin pulses"}, fins, 1);
    check({name, " presets"}, pres, pre ? 2 : 0);
    if (k == K_MPY) check({name, " mpy pulses"}, mpys, 8);
    else            check({name, " bit clocks"}, bits, nbits);
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    dec_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run("ADD INT", K_ALU, MD_INT, 0, 0, 18, 0, 16, 1);
    run("ADD FB",  K_ALU, MD_FB,  1, 0, 10, 0, 8, 1);
    run("ADD SB",  K_ALU, MD_SB,  1, 0, 10, 8, 8, 1);
    run("ADD EX",  K_ALU, MD_EX,  1, 0, 10, 8, 8, 1);
    run("ADD AV",  K_ALU, MD_AV,  0, 0, 17, 0, 15, 1);
    run("ADD INF", K_ALU, MD_INF, 1, 0, 18, 0, 16, 1);
    run("SSR",     K_SSR, MD_INT, 0, 0, 18, 15, 16, 1);
    run("DIN",     K_DIN, MD_INT, 0, 0, 18, 0, 16, 1);
    run("TTB",     K_TTB, MD_INT, 0, 0, 18, 0, 16, 1);
    run("MAI",     K_MAI, MD_AV,  0, 0, 17, 0, 15, 1);
    run("MPY INT", K_MPY, MD_INT, 0, 0, 138, 0, 0, 1);
    run("MPY FLT", K_MPY, MD_INT, 1, 0, 2 + 8 * 25, 0, 0, 1);
    run("SHR 1",   K_SHR, MD_INT, 0, 0, 1, 0, 1, 0);
    run("SHR 8",   K_SHR, MD_INT, 0, 1, 8, 0, 8, 0);
    run("MSG",     K_MSG, MD_INT, 0, 0, 1, 0, 1, 0);
    run("ASC",     K_ASC, MD_INT, 0, 0, 1, 0, 1, 0);
    run("CIN",     K_CIN, MD_INT, 0, 0, 4, 0, 4, 0);
    run("COU",     K_COU, MD_INT, 0, 0, 4, 0, 4, 0);
    run("CTR",     K_CTR, MD_INT, 0, 0, 4, 0, 4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
