// tb_hpcs_top -- end-to-end test of the whole system through the host bus.
// Plays the host: writes instructions, data and addressing registers, polls
// the status register and reads results back from the data register.  A
// model array of words kept in the bench predicts every result.  Exercised:
// direct, concatenated and automatic cell addressing; broadcast loading;
// whole-array, single-cell/row/column (CMR = 1), even-row and odd-row
// operation; neighbour transfers with the planar edges; transposition
// through the row/column buffer; conditional inhibit; multiplication;
// control-bit loading and transfer; convergence detection setting and
// clearing the flag; associative search with the priority address readout.  Each mechanism is counted and one that never
// happened is a failure.  Instruction durations are checked against the
// sequencer's bit-cycle counts.
module tb_hpcs_top;
  import hpcs_pkg::*;
  localparam int R = 4, C = 5;
  localparam logic [17:0] A_IR1 = 18'o767770, A_IR2 = 18'o767772,
                          A_DR = 18'o767774, A_DSR = 18'o767776, A_BAR = 18'o767760;
  logic clk = 0, rst_n = 0;
  logic [17:0] bus_addr;
  logic bus_wr;
  logic [15:0] bus_wdata, bus_rdata;
  logic busy, cnv_flag;
  int checks = 0, failures = 0, busy_clocks;
  logic [15:0] model [R][C][16];
  int n_direct, n_conc, n_aut, n_all, n_bar, n_even, n_odd, n_nbr, n_ttb, n_tfb,
      n_inh, n_mpy, n_ctr, n_cnv_set, n_cnv_clr, n_assoc;

  hpcs_top #(.ROWS(R), .COLS(C)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (busy) busy_clocks++;   // clocks the array was busy

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

  function automatic logic [31:0] alo(input int op, d, a, b, nbr = 0, mode = 0,
                                      ui = 0, ci = 0, cnv = 0);
    return 32'(op) | 32'(d) << 4 | 32'(a) << 8 | 32'(b) << 12 | 32'(nbr) << 17 |
           32'(mode) << 20 | 32'(ui) << 23 | 32'(ci) << 24 | 32'(cnv) << 27;
  endfunction
  function automatic logic [31:0] ccc(input int op, w, am, row, col);
    return 32'(op) | 32'(w) << 4 | 32'(am) << 8 | 32'(row) << 10 | 32'(col) << 13 | 32'h10000;
  endfunction
  task automatic set_bar(input int row, col, cmr);
    bwr(A_BAR, 16'(col) | 16'(row) << 6 | 16'(cmr) << 12);
  endtask

  task automatic din(input int r, c, w, input logic [15:0] v);
    bwr(A_DR, v);
    exec(ccc(CC_DIN, w, 0, r + 1, c + 1));
    model[r][c][w] = v;
    n_direct++;
  endtask
  task automatic dou(input int r, c, w, output logic [15:0] v);
    exec(ccc(CC_DOU, w, 0, r + 1, c + 1));
    brd(A_DR, v);
  endtask
  task automatic check_word(input string name, input int w);
    logic [15:0] v;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        dou(r, c, w, v);
        check($sformatf("%s cell(%0d,%0d) M%0d", name, r, c, w), v, model[r][c][w]);
      end
  endtask

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] v, st;
    bus_addr = 0; bus_wr = 0; bus_wdata = 0;
    {n_direct, n_conc, n_aut, n_all, n_bar, n_even, n_odd, n_nbr, n_ttb, n_tfb,
     n_inh, n_mpy, n_ctr, n_cnv_set, n_cnv_clr, n_assoc} = '0;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) for (int w = 0; w < 16; w++)
      model[r][c][w] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- direct loading of M3, one cell at a time
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) din(r, c, 3, 16'($urandom));
    check("DIN duration", busy_clocks, 18);
    check_word("direct DIN", 3);

    // ---- broadcast to the whole array (point 0,0)
    bwr(A_DR, 16'h0123);
    exec(ccc(CC_DIN, 4, 0, 0, 0));
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) model[r][c][4] = 16'h0123;
    // ---- whole-array addition, CMR = 0
    set_bar(0, 0, 0);
    exec(alo(OP_ADD, 5, 3, 4)); n_all++;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
      model[r][c][5] = model[r][c][3] + model[r][c][4];
    check_word("ADD all", 5);

    // ---- neighbours: M6 = M3 of north neighbour + M3 of east neighbour
    exec(alo(OP_MOV, 6, 0, 3, NB_N));
    exec(alo(OP_ADD, 6, 6, 3, NB_E)); n_nbr++;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
      model[r][c][6] = (r > 0 ? model[r-1][c][3] : 16'h0) + (c < C-1 ? model[r][c+1][3] : 16'h0);
    check_word("neighbour", 6);

    // ---- half-array operations: INC M5 in even rows, DEC in odd rows
    set_bar(0, 0, 2); exec(alo(OP_INC, 5, 0, 5)); n_even++;
    set_bar(0, 0, 3); exec(alo(OP_DEC, 5, 5, 0)); n_odd++;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
      model[r][c][5] = ((r + 1) % 2 == 0) ? model[r][c][5] + 1 : model[r][c][5] - 1;
    check_word("even/odd", 5);

    // ---- single cell / row / column through the BAR (CMR = 1)
    set_bar(2, 3, 1); exec(alo(OP_COM, 7, 0, 3)); n_bar++;
    model[1][2][7] = ~model[1][2][3];
    set_bar(0, 2, 1); exec(alo(OP_MOV, 8, 0, 3)); n_bar++;      // column 2
    for (int r = 0; r < R; r++) model[r][1][8] = model[r][1][3];
    set_bar(3, 0, 1); exec(alo(OP_MOV, 8, 0, 4)); n_bar++;      // row 3
    for (int c = 0; c < C; c++) model[2][c][8] = model[2][c][4];
    check_word("BAR cell", 7);
    check_word("BAR row/col", 8);

    // ---- transpose the top-left 4x4 of M3 into M9 through the buffer
    for (int k = 0; k < R; k++) begin
      set_bar(k + 1, 0, 1);
      exec(32'(CC_BUF) | 32'd3 << 4 | 32'd3 << 12 | 32'h10000); n_ttb++;   // row k -> buffer M3
      check("TTB duration", busy_clocks, 18);
      set_bar(0, k + 1, 1);
      exec(32'(CC_BUF) | 32'd1 << 3 | 32'd9 << 4 | 32'd1 << 11 | 32'd3 << 12 | 32'h10000); n_tfb++;
      for (int i = 0; i < R; i++) model[i][k][9] = model[k][i][3];
    end
    check_word("transpose", 9);

    // ---- concatenated addressing (upper BAR bits are 0 here) and automatic
    set_bar(0, 0, 0);
    bwr(A_DR, 16'h7777);
    exec(ccc(CC_DIN, 10, 1, 2, 2)); n_conc++;
    model[1][1][10] = 16'h7777;
    // automatic: walk along row 3 with column-up steps
    set_bar(3, 1, 0);
    for (int c = 0; c < C; c++) begin
      bwr(A_DR, 16'(16'h100 + c));
      exec(ccc(CC_DIN, 10, 2, 0, 3'b010)); n_aut++;
      model[2][c][10] = 16'(16'h100 + c);
    end
    check_word("CONC/AUT", 10);

    // ---- conditional inhibit: copy M3 into AC1, then MOV only where AC1 >= 0
    set_bar(0, 0, 0);
    exec(alo(OP_MOV, 1, 0, 3));
    exec(alo(OP_MOV, 11, 0, 4, 0, 0, 0, 4)); n_inh++;   // inhibit if AC1 < 0
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      model[r][c][1] = model[r][c][3];
      if (!model[r][c][3][15]) model[r][c][11] = model[r][c][4];
    end
    check_word("inhibit", 11);

    // ---- multiplication AC1 x M12 -> M13 (M13 starts at 0)
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) din(r, c, 12, 16'($urandom));
    exec(alo(OP_MPY, 13, 12, 0)); n_mpy++;
    check("MPY duration", busy_clocks, 2 + 8 * 17);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
      model[r][c][13] = 16'(model[r][c][1] * model[r][c][12][7:0]);
    check_word("MPY", 13);

    // ---- control bits: load C = 1 into cell (1,1) only, copy west->east
    bwr(A_DR, 16'h0008);
    exec(ccc(CC_CIN, 0, 0, 2, 2));
    check("CIN duration", busy_clocks, 4);
    exec(32'(CC_CTR) | 32'(NB_W) << 17 | 32'h10000); n_ctr++;   // every cell takes its west neighbour's bits
    exec(ccc(CC_COU, 0, 0, 2, 3));
    brd(A_DR, v);
    check("CTR moved C bit east", v[3:0], 4'b1000);
    exec(ccc(CC_COU, 0, 0, 2, 2));
    brd(A_DR, v);
    check("CTR west edge brought 0", v[3], 1'b0);

    // ---- convergence: only cell (1,2) has C set now
    exec(alo(OP_MOV, 15, 0, 3));                           // M15 = M3 everywhere
    exec(alo(OP_MOV, 14, 0, 3, 0, 0, 0, 0, 1));            // same data: converged
    brd(A_DSR, st); check("CNV set", st[15], 1'b1); if (st[15]) n_cnv_set++;
    exec(alo(OP_MOV, 14, 0, 4, 0, 0, 0, 0, 1));            // different data
    brd(A_DSR, st);
    check("CNV clear", st[15], (model[1][2][3] == model[1][2][4]));
    if (!st[15]) n_cnv_clr++;

    // ---- associative search: which cells hold the key in M3?
    //      key planted in cells (2,3) and (0,4); AC1 = M3 - key; capture "AC1 = 0"
    begin
      logic [15:0] key = 16'hbeef;
      int exp_r[$], exp_c[$];
      din(2, 3, 3, key); din(0, 4, 3, key);
      bwr(A_DR, key);
      exec(alo(OP_SUB, 1, 3, 0, NB_EXT));
      exec(32'(OP_SPC) | 32'd1 << 11 | 32'd3 << 24);   // ASC, condition "AC1 = 0"
      check("ASC duration", busy_clocks, 1);
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
        if (model[r][c][3] == key) begin exp_r.push_back(r + 1); exp_c.push_back(c + 1); end
      foreach (exp_r[i]) begin
        brd(A_BAR + 18'd2, v);
        check("ASC found", v[15], 1);
        check("ASC row", v[11:6], exp_r[i]);
        check("ASC col", v[5:0], exp_c[i]);
        bwr(A_BAR + 18'd2, 16'h0);                      // reset the reported cell
        n_assoc++;
      end
      brd(A_BAR + 18'd2, v);
      check("ASC none left", v, 16'h0);
    end

    check("mech direct", n_direct > 0, 1);
    check("mech assoc", n_assoc > 0, 1);
    check("mech conc", n_conc > 0, 1);
    check("mech aut", n_aut > 0, 1);
    check("mech all", n_all > 0, 1);
    check("mech bar", n_bar > 0, 1);
    check("mech even", n_even > 0, 1);
    check("mech odd", n_odd > 0, 1);
    check("mech nbr", n_nbr > 0, 1);
    check("mech ttb", n_ttb > 0, 1);
    check("mech tfb", n_tfb > 0, 1);
    check("mech inh", n_inh > 0, 1);
    check("mech mpy", n_mpy > 0, 1);
    check("mech ctr", n_ctr > 0, 1);
    check("mech cnv set", n_cnv_set > 0, 1);
    check("mech cnv clear", n_cnv_clr > 0, 1);
    $display("mechanisms: direct=%0d conc=%0d aut=%0d all=%0d bar=%0d even=%0d odd=%0d nbr=%0d ttb=%0d tfb=%0d inh=%0d mpy=%0d ctr=%0d cnv_set=%0d cnv_clr=%0d assoc=%0d",
             n_direct, n_conc, n_aut, n_all, n_bar, n_even, n_odd, n_nbr, n_ttb, n_tfb,
             n_inh, n_mpy, n_ctr, n_cnv_set, n_cnv_clr, n_assoc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
