// sequencer -- clock unit and sequencer of the control unit.
//
// On a start pulse it latches the decoded instruction (which then stays on
// the control bus for the whole operation) and produces, one clock per bit
// cycle, the timing pulses every cell needs:
//   * a two-clock preset cycle (clear carry and load the bit counter; then
//     reset D_A, clear the zero flip-flop and preset the carry), skipped for
//     parallel shifts, move-sign and control-bit transfers;
//   * the bit counter, which runs 0..15 for integer and integer-with-
//     floating-input modes, 8..15 for the byte and exponent modes (with the
//     memory bit address forced to 0..7 in first-byte mode), 0..14 for
//     absolute-value mode and the inverted-AC2 move, downwards 15..0 for the
//     serial right shift, 0 or 0..7 for one- or eight-bit parallel shifts,
//     and 0..3 for control-bit transfers;
//   * for multiplication, eight add cycles of 16 (integer) or 24 (floating)
//     bit cycles, each followed by one clock that shifts AC1 left, resets
//     D_A and clears the carry; the multiplier bit is interrogated when the
//     bit counter equals the cycle counter;
//   * the sign-interrogation pulse (bit 15, or bit 14 in exponent and
//     absolute-value modes), the exponent-mode sign-bit pulse and the
//     convergence-range window.
// `fin` pulses on the last clock of the operation and `busy` is the
// busy/free state.  The counting scheme follows the document; collapsing
// its master clock and two phase clocks into one clock per bit cycle (so the
// preset cycle lasts two clocks instead of one and a half bit cycles) is
// this implementation's choice.
module sequencer
  import hpcs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  dec_t dec_in,
  output dec_t dec,       // latched instruction, broadcast to the array
  output tim_t tim,
  output logic busy,
  output logic fin
);
  typedef enum logic [2:0] {S_IDLE, S_PRE1, S_PRE2, S_RUN, S_SHIFT} st_e;
  st_e        st;
  logic [4:0] cnt, first, last;
  logic [2:0] cyc;
  logic       started;

  function automatic logic has_preset(kind_e k);
    return !(k inside {K_SHR, K_MSG, K_ASC, K_CIN, K_COU, K_CTR, K_NOP});
  endfunction

  // first and last bit-counter values of one pass
  always_comb begin
    first = 5'd0;
    last  = 5'd15;
    unique case (dec.kind)
      K_SSR: begin first = 5'd15; last = 5'd0; end
      K_MPY: last = dec.flt ? 5'd23 : 5'd15;
      K_SHR: last = dec.shr_8 ? 5'd7 : 5'd0;
      K_MSG, K_ASC: last = 5'd0;
      K_CIN, K_COU, K_CTR: last = 5'd3;
      default: begin
        unique case (dec.mode)
          MD_FB, MD_SB, MD_EX: first = 5'd8;
          MD_AV:               last  = 5'd14;
          default: ;
        endcase
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      dec     <= '0;
      cnt     <= '0;
      cyc     <= '0;
      started <= 1'b0;
    end else begin
      started <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          dec     <= dec_in;
          cyc     <= '0;
          started <= 1'b1;
          st      <= has_preset(dec_in.kind) ? S_PRE1 : S_RUN;
          cnt     <= dec_in.kind == K_SSR ? 5'd15 :
                     (dec_in.kind inside {K_ALU, K_DIN, K_DOU, K_TTB, K_TFB, K_ICH} &&
                      dec_in.mode inside {MD_FB, MD_SB, MD_EX}) ? 5'd8 : 5'd0;
        end
        S_PRE1: st <= S_PRE2;
        S_PRE2: st <= S_RUN;
        S_RUN: begin
          if (cnt == last) begin
            if (dec.kind == K_MPY) st <= S_SHIFT;
            else                   st <= S_IDLE;
          end else if (dec.kind == K_SSR) begin
            cnt <= cnt - 5'd1;
          end else begin
            cnt <= cnt + 5'd1;
          end
        end
        S_SHIFT: begin
          cnt <= first;
          cyc <= cyc + 3'd1;
          st  <= (cyc == 3'd7) ? S_IDLE : S_RUN;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    tim         = '0;
    tim.start   = started;
    tim.preset1 = st == S_PRE1;
    tim.preset2 = st == S_PRE2;
    tim.bitclk  = st == S_RUN;
    tim.cyc_end = st == S_SHIFT;
    tim.cnt     = cnt;
    tim.addr    = (dec.mode == MD_FB && dec.kind != K_MPY) ? cnt[3:0] - 4'd8 : cnt[3:0];
    tim.mem_ok  = cnt < 5'd16;
    tim.mpy_clk = st == S_RUN && dec.kind == K_MPY && cnt == {2'b00, cyc};
    tim.sign_clk = st == S_RUN &&
                   cnt == ((dec.mode inside {MD_EX, MD_AV}) ? 5'd14 : 5'd15);
    tim.ex15    = st == S_RUN && dec.mode == MD_EX && cnt == 5'd15;
    tim.cnv_en  = st == S_RUN && dec.cnv != 4'd0 && cnt < 5'd16 &&
                  {1'b0, tim.addr} >= {1'b0, dec.cnv};
    busy = st != S_IDLE;
    fin  = (st == S_RUN && cnt == last && dec.kind != K_MPY) ||
           (st == S_SHIFT && cyc == 3'd7);
  end
endmodule
