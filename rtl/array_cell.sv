// array_cell -- one processing cell of the array.
//
// A bit-serial 16-bit processor with fifteen words: the accumulators AC1 and
// AC2 (24-bit shift registers with shift, rotate and detector hardware) and
// the thirteen direct-address memories M3..M15.  Every clock is one bit
// cycle: MPX A and MPX B read the current bit of two words, MPX C picks the
// Y operand from the cell itself, a neighbour, a buffer or the central
// buffer, the one-bit ALU combines them, and the destination demultiplexer
// writes the result bit.  Multiplication uses the add/shift/inhibit method
// with AC1 as the multiplicand; division and floating point are left to
// software, as in the document.  The control bits decide whether the cell
// obeys the broadcast instruction (inhibit) and report differences against
// M15 (convergence).
//
// Interface: `dec` is the decoded instruction and `tim` the per-clock timing
// from the control unit, both broadcast to every cell.  `cei` is this cell's
// enable from the cell addressing system.  `db` is the D_B output seen by
// neighbours and buffers; during control-bit transfers it carries the
// control chain instead.  `cnv_diff` is the convergence pulse.
//
// Departures from the document: one clock replaces the read/write half
// cycles, so D_B is combinational and only D_A (the multiplier bit) is a
// flip-flop; the inhibit condition is sampled on the first clock of an
// operation and held, so that an operation writing AC1 cannot change its own
// inhibit; SSR works on memories M3..M15 only, because an accumulator is
// always read from its right end.
module array_cell
  import hpcs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  dec_t dec,
  input  tim_t tim,
  input  logic cei,
  input  logic n, s, e, w, row, col, ext,
  output logic db,
  output logic cnv_diff,
  output logic cond,          // selected inhibit condition (associative search)
  // observation
  output logic [ACC_BITS-1:0]  ac1_q,
  output logic [ACC_BITS-1:0]  ac2_q,
  output logic [15:3][WORD_BITS-1:0] mem_q,
  output logic [3:0]           ctl_bits
);
  logic [15:3] rbit;
  logic [15:1] rd;
  logic        ac1_out, ac2_out, det16, det24, det16_2, det24_2;
  logic        a_bit, b_bit, y_bit, x_bit, z, wdata, carry;
  logic        inh_c, inh_q, inh, locked, da, mpy_ok;
  logic [15:1] we;
  logic        ctl_out;
  logic        is_ctl, is_mpy;

  assign is_mpy = dec.kind == K_MPY;
  assign is_ctl = dec.kind inside {K_CIN, K_COU, K_CTR};

  // ---------------------------------------------------------------- reads
  always_comb begin
    rd       = '0;
    rd[1]    = ac1_out;
    rd[2]    = ac2_out;
    if (tim.mem_ok) rd[15:3] = rbit;
  end

  cell_word_mux u_mpx_a (.sel(dec.sel_a), .en(1'b1), .bits(rd), .y(a_bit));
  cell_word_mux u_mpx_b (.sel(dec.sel_b), .en(1'b1), .bits(rd), .y(b_bit));

  cell_input_mux u_mpx_c (
    .sel(dec.nbr), .en(1'b1), .own(b_bit), .n(n), .s(s), .e(e), .w(w),
    .row(row), .col(col), .ext(ext), .y(y_bit)
  );

  assign x_bit = is_mpy ? ac1_out : a_bit;

  cell_alu u_alu (
    .clk, .rst_n, .ctl(dec.alu), .clr_car(dec.clr_car),
    .preset1(tim.preset1), .preset2(tim.preset2), .bitclk(tim.bitclk),
    .cyc_end(tim.cyc_end), .ex15(tim.ex15), .x(x_bit), .y(y_bit),
    .z(z), .carry(carry)
  );

  // ---------------------------------------------------------------- inhibit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         inh_q <= 1'b0;
    else if (tim.start) inh_q <= inh_c;
  end
  assign inh    = tim.start ? inh_c : inh_q;
  assign locked = !cei || inh;
  assign cond   = inh_c;

  // Multiplier flip-flop D_A: zero until the multiplier bit of this add
  // cycle is interrogated, then holds it for the rest of the cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           da <= 1'b0;
    else if (tim.preset2 || tim.cyc_end)  da <= 1'b0;
    else if (is_mpy && tim.mpy_clk)       da <= a_bit;
  end
  assign mpy_ok = !is_mpy || (tim.mpy_clk ? a_bit : da);

  // ---------------------------------------------------------------- writes
  always_comb begin
    unique case (dec.kind)
      K_ICH:   wdata = ac1_out;
      K_MAI:   wdata = !ac2_out;
      default: wdata = z;
    endcase
  end

  cell_dmpx u_dmpx (
    .sel(dec.sel_d), .en(dec.dmpx_en && tim.bitclk),
    .inhibit(locked || !mpy_ok), .we(we)
  );

  cell_memory u_mem (
    .clk, .rst_n, .addr(tim.addr), .we(we[15:3] & {13{tim.mem_ok}}),
    .din(wdata), .rbit(rbit), .words(mem_q)
  );

  // ---------------------------------------------------------------- accumulators
  logic ac1_sel, ac2_sel, ac1_ser, ac2_ser, ac1_par, ac2_par;
  logic dall;
  assign dall    = dec.dmpx_en && dec.sel_d == 4'd0;
  assign ac1_sel = dec.sel_a == W_AC1 || dec.sel_b == W_AC1 ||
                   (dec.dmpx_en && dec.sel_d == W_AC1) || dall ||
                   is_mpy || dec.kind == K_ICH;
  assign ac2_sel = dec.sel_a == W_AC2 || dec.sel_b == W_AC2 ||
                   (dec.dmpx_en && dec.sel_d == W_AC2) || dall ||
                   dec.kind inside {K_MAI, K_MSG};
  assign ac1_ser = tim.bitclk && !locked && ac1_sel && !is_ctl && dec.kind != K_SHR;
  assign ac2_ser = tim.bitclk && !locked && ac2_sel && !is_ctl && dec.kind != K_SHR;
  assign ac1_par = !locked && ((dec.kind == K_SHR && tim.bitclk &&
                   dec.shr_rd inside {2'd1, 2'd2}) || (is_mpy && tim.cyc_end));
  assign ac2_par = !locked && dec.kind == K_SHR && tim.bitclk && dec.shr_rd == 2'd3;

  cell_accumulator #(.ALLOW_LEFT(1'b1)) u_ac1 (
    .clk, .rst_n, .flt(dec.flt), .ser_clk(ac1_ser),
    .wr(we[1] || dec.kind == K_ICH), .din(dec.kind == K_ICH ? b_bit : wdata),
    .par_clk(ac1_par), .left(is_mpy || dec.shr_rd == 2'd1),
    .rot(!is_mpy && dec.shr_rot),
    .dout(ac1_out), .msb16(det16), .msb24(det24), .q(ac1_q)
  );

  cell_accumulator #(.ALLOW_LEFT(1'b0)) u_ac2 (
    .clk, .rst_n, .flt(dec.flt), .ser_clk(ac2_ser),
    .wr(we[2] || dec.kind == K_MSG), .din(dec.kind == K_MSG ? ctl_bits[1] : wdata),
    .par_clk(ac2_par), .left(1'b0), .rot(dec.shr_rot),
    .dout(ac2_out), .msb16(det16_2), .msb24(det24_2), .q(ac2_q)
  );

  // ---------------------------------------------------------------- control bits
  cell_control_bits u_cb (
    .clk, .rst_n,
    .clr_zero(tim.preset2 && !locked && dec.dmpx_en &&
              (dec.sel_d == W_AC1 || dec.sel_d == 4'd0)),
    .ac1_wr(we[1] && ac1_ser), .ac1_bit(wdata), .sign_clk(tim.sign_clk),
    .unc_inh(dec.unc_inh), .cond_inh(dec.cond_inh), .flt(dec.flt),
    .det16(det16), .det24(det24), .inhibit(inh_c),
    .cnv_check(tim.cnv_en && (|we)), .incoming(wdata),
    .m15_bit(tim.mem_ok && rbit[15]), .cnv_diff(cnv_diff),
    .sh_clk(tim.bitclk && is_ctl && (dec.kind == K_COU || cei)),
    .sh_rot(dec.kind == K_COU), .sh_in(y_bit),
    .ctl_out(ctl_out), .bits(ctl_bits)
  );

  assign db = is_ctl ? ctl_out : b_bit;
endmodule
