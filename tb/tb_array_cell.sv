// tb_array_cell -- instruction-level test of one cell.
// The cell is driven by the real instruction decoder and sequencer, the
// bench plays the data register (external input) and the north neighbour.
// Every instruction family is executed on random data and the cell's words
// are compared with results computed here: the ten serial ALU operations,
// byte/exponent/absolute-value modes, serial right shift, multiplication
// (and its 2 + 8 x 17 clock duration), parallel shifts, move-sign,
// interchange, inverted move of AC2, conditional and unconditional
// inhibit, control-bit load/read/transfer, neighbour input and the
// convergence pulse.
module tb_array_cell;
  import hpcs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] ir;
  logic start, busy, fin;
  dec_t dec_in, dec;
  tim_t tim;
  logic cei, nb, db, cnv_diff;
  logic [23:0] ac1_q, ac2_q;
  logic [15:3][15:0] mem_q;
  logic [3:0] ctl_bits;
  logic [15:0] dr, nval, dout;
  int checks = 0, failures = 0, cnv_pulses = 0, clocks;

  instruction_decoder u_id (.ir, .dec(dec_in));
  sequencer u_seq (.clk, .rst_n, .start, .dec_in, .dec, .tim, .busy, .fin);
  array_cell dut (
    .clk, .rst_n, .dec, .tim, .cei, .n(nb), .s(1'b0), .e(1'b0), .w(1'b0),
    .row(1'b0), .col(1'b0), .ext(dr[tim.addr]), .db, .cnv_diff, .cond(),
    .ac1_q, .ac2_q, .mem_q, .ctl_bits
  );
  always #5 clk = ~clk;
  assign nb = dec.kind == K_CTR ? nval[tim.cnt[1:0]] : nval[tim.addr];
  always @(posedge clk) begin
    if (cnv_diff) cnv_pulses++;
    if ((dec.kind inside {K_DOU, K_COU}) && tim.bitclk) dout[tim.addr] <= db;
  end

  function automatic logic [31:0] alo(input int op, d, a, b, nbr = 0, mode = 0,
                                      ui = 0, ci = 0, cnv = 0, wcc = 0);
    return 32'(op) | 32'(d) << 4 | 32'(a) << 8 | 32'(b) << 12 | 32'(nbr) << 17 |
           32'(mode) << 20 | 32'(ui) << 23 | 32'(ci) << 24 | 32'(cnv) << 27 | 32'(wcc) << 31;
  endfunction
  function automatic logic [31:0] ccc(input int op, w);
    return 32'(op) | 32'(w) << 4 | 32'h10000;
  endfunction

  task automatic exec(input logic [31:0] i);
    @(negedge clk) begin ir = i; start = 1; end
    @(negedge clk) start = 0;
    clocks = 0;
    while (busy) begin clocks++; @(negedge clk); end
  endtask

  function automatic logic [15:0] word(input int w);
    if (w == 1) return ac1_q[15:0];
    if (w == 2) return ac2_q[15:0];
    return mem_q[w];
  endfunction

  task automatic load(input int w, input logic [15:0] v);
    dr = v; exec(ccc(CC_DIN, w));
  endtask

  task automatic check(input string name, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", name, got, exp); end
  endtask

  task automatic wcheck(input string name, input logic [15:0] got, input logic [15:0] exp);
    check(name, 32'(got), 32'(exp));
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] a, b, e, m;
    logic [23:0] e24;
    int d, sa, sb;
    ir = 0; start = 0; cei = 1; dr = 0; nval = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- data in on every word, checked directly
    for (int w = 1; w <= 15; w++) begin
      a = 16'($urandom); load(w, a); wcheck($sformatf("DIN M%0d", w), word(w), a);
    end
    check("DIN clocks", clocks, 2 + 16);

    // ---- serial ALU operations, integer mode
    for (int t = 0; t < 30; t++) begin
      a = 16'($urandom); b = 16'($urandom);
      sa = 3 + $urandom % 4; sb = 7 + $urandom % 4; d = 11 + $urandom % 5;
      if (t % 5 == 0) sa = 1;            // AC1 as source
      if (t % 7 == 0) d = 2;             // AC2 as destination
      load(sa, a); load(sb, b);
      exec(alo(OP_ADD, d, sa, sb)); wcheck("ADD", word(d), a + b);
      check("ALU clocks", clocks, 2 + 16);
      exec(alo(OP_SUB, d, sa, sb)); wcheck("SUB", word(d), a - b);
      exec(alo(OP_AND, d, sa, sb)); wcheck("AND", word(d), a & b);
      exec(alo(OP_EXO, d, sa, sb)); wcheck("EXO", word(d), a ^ b);
      exec(alo(OP_LOR, d, sa, sb)); wcheck("LOR", word(d), a | b);
      exec(alo(OP_COM, d, 0, sb));  wcheck("COM", word(d), ~b);
      exec(alo(OP_TCM, d, 0, sb));  wcheck("TCM", word(d), -b);
      exec(alo(OP_INC, d, 0, sb));  wcheck("INC", word(d), b + 1);
      exec(alo(OP_DEC, d, sa, 0));  wcheck("DEC", word(d), a - 1);
      exec(alo(OP_MOV, d, 0, sb));  wcheck("MOV", word(d), b);
      exec(alo(OP_SSR, sb, sb, 0)); wcheck("SSR", word(sb), b >> 1);
    end

    // ---- modes
    a = 16'($urandom); b = 16'($urandom);
    load(3, a); load(4, b); load(5, 16'h5a5a);
    exec(alo(OP_ADD, 5, 3, 4, 0, MD_FB)); wcheck("FB", word(5), {16'h5a5a >> 8, 8'(a[7:0] + b[7:0])});
    check("FB clocks", clocks, 2 + 8);
    load(5, 16'h5a5a);
    exec(alo(OP_ADD, 5, 3, 4, 0, MD_SB)); wcheck("SB", word(5), {8'(a[15:8] + b[15:8]), 8'h5a});
    load(5, 16'h5a5a);
    exec(alo(OP_ADD, 5, 3, 4, 0, MD_EX));
    wcheck("EX", word(5), {a[15] ^ b[15], 7'(a[14:8] + b[14:8]), 8'h5a});
    load(5, 16'h8000);
    exec(alo(OP_TCM, 5, 0, 5, 0, MD_AV)); wcheck("AV TCM", word(5), {1'b1, 15'h0});
    load(5, 16'h8003);
    exec(alo(OP_TCM, 5, 0, 5, 0, MD_AV)); wcheck("AV TCM2", word(5), {1'b1, 15'(-15'd3)});
    check("AV clocks", clocks, 2 + 15);

    // ---- neighbour input
    nval = 16'($urandom); load(3, a);
    exec(alo(OP_ADD, 6, 3, 4, NB_N)); wcheck("ADD north", word(6), a + nval);

    // ---- multiplication: AC1 x M7[7:0] added into M8
    for (int t = 0; t < 6; t++) begin
      a = 16'($urandom); m = 16'($urandom);
      load(1, a); load(7, m); load(8, 0);
      exec(alo(OP_MPY, 8, 7, 0));
      wcheck("MPY", word(8), 16'(a * m[7:0]));
      check("MPY clocks", clocks, 2 + 8 * 17);
      wcheck("MPY AC1 shifted", word(1), a << 8);
    end

    // ---- parallel shifts
    a = 16'($urandom); load(1, a); load(2, 16'hc381);
    exec(alo(OP_SHR, 1, 0, 0));              wcheck("SHF AC1L", word(1), a << 1);
    check("SHR clocks", clocks, 1);
    exec(alo(OP_SHR, 1 | 4 | 8, 0, 0));      wcheck("ROT AC1L 8", word(1), {a[6:0], 1'b0, a[14:7]});
    exec(alo(OP_SHR, 2, 0, 0));              wcheck("SHF AC1R", word(1), {a[6:0], 1'b0, a[14:7]} >> 1);
    exec(alo(OP_SHR, 3 | 4, 0, 0));          wcheck("ROT AC2R", word(2), 16'hc381 >> 1 | 16'h8000);

    // ---- special operations
    load(5, 16'h1234); a = 16'($urandom); load(1, a);
    exec(alo(OP_SPC, 5, 2, 0));              // ICH with M5
    wcheck("ICH M5", word(5), a);
    wcheck("ICH AC1", word(1), 16'h1234);
    load(1, 16'h8000);                       // sign flip-flop = 1
    load(2, 16'h0000);
    exec(alo(OP_SPC, 0, 1, 0));              // MSG
    wcheck("MSG", word(2), 16'h8000);
    load(2, 16'h00f0); load(9, 16'h8000);
    exec(alo(OP_SPC, 9, 4, 0));              // MAI into M9
    wcheck("MAI", word(9), 16'h8000 | (~16'h00f0 & 16'h7fff));

    // ---- conditional inhibit: inhibit if AC1 = 0 (code 3)
    load(1, 0); load(3, 16'h1111); load(4, 16'h2222);
    exec(alo(OP_MOV, 3, 0, 4, 0, 0, 0, 3));  wcheck("INH AC1=0", word(3), 16'h1111);
    load(1, 5);
    exec(alo(OP_MOV, 3, 0, 4, 0, 0, 0, 3));  wcheck("no INH AC1!=0", word(3), 16'h2222);
    load(1, 16'hfff0);                        // negative: code 4 inhibits
    exec(alo(OP_MOV, 3, 0, 1, 0, 0, 0, 4));  wcheck("INH AC1<0", word(3), 16'h2222);

    // ---- control bits: load {C,I,S,Z} = 4'b0100 (I set), read back, transfer
    dr = 16'h0004; exec(ccc(CC_CIN, 0));
    check("CIN", ctl_bits, 4'b0100);
    check("CIN clocks", clocks, 4);
    exec(ccc(CC_COU, 0)); check("COU", dout[3:0], 4'b0100);
    check("COU keeps", ctl_bits, 4'b0100);
    load(4, 16'h3333);
    exec(alo(OP_MOV, 3, 0, 4, 0, 0, 1, 0));  wcheck("UI blocks", word(3), 16'h2222);
    nval = 16'h0009; exec(ccc(CC_CTR, 0) | 32'(NB_N) << 17);
    check("CTR from north", ctl_bits, 4'b1001);

    // ---- convergence: C bit set now; compare writes with M15
    load(15, 16'h00ff); load(3, 16'h00ff);
    cnv_pulses = 0;
    exec(alo(OP_MOV, 4, 0, 3, 0, 0, 0, 0, 1)); check("CNV equal", cnv_pulses, 0);
    load(3, 16'h01ff);
    exec(alo(OP_MOV, 4, 0, 3, 0, 0, 0, 0, 1)); check("CNV differ", cnv_pulses, 1);
    exec(alo(OP_MOV, 4, 0, 3, 0, 0, 0, 0, 9)); check("CNV out of range", cnv_pulses, 1);
    // ---- cell not enabled: nothing changes
    cei = 0; load(3, 16'hdead); wcheck("CEI off", word(3), 16'h01ff); cei = 1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
