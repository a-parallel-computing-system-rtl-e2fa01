// cell_control_bits -- control flip-flops, inhibit system and convergence
// gate of a cell.
//
// Four control bits: Z (the last value written into AC1 was non-zero),
// S (it was negative), I (the cell takes part in unconditional inhibit) and
// C (the cell takes part in convergence tests).  Z is cleared before an
// operation that writes AC1 and set by any 1 written into AC1; S latches the
// sign bit as it is written.  The inhibit multiplexer picks 0, Z, S or the
// AC1 "1 detector" (bit 23 in FLT mode, bit 15 otherwise); the low bit of the
// 3-bit code complements the choice, so the eight codes read: none, always,
// AC1!=0, AC1=0, AC1<0, AC1>=0, detector=1, detector=0.  The inhibit output
// is that condition ORed with I when unconditional inhibit is requested.
// The convergence gate compares each incoming bit with the same bit of M15
// and reports a difference when C is set.  All of this follows the
// document; the encoding of the inhibit code into select and complement
// bits is this implementation's reading of the instruction table.
//
// The four bits also form a shift chain {C, I, S, Z} that is shifted four
// times to load them from outside (sh_in), to copy them from a neighbour, or
// to read them out non-destructively (sh_rot).  ctl_out is the bit leaving
// the chain.
//
// Timing: inhibit and cnv_diff are combinational; the flip-flops change on
// the clock edge.
module cell_control_bits (
  input  logic       clk,
  input  logic       rst_n,
  // AC1 data watch
  input  logic       clr_zero,
  input  logic       ac1_wr,
  input  logic       ac1_bit,
  input  logic       sign_clk,
  // inhibit selection
  input  logic       unc_inh,
  input  logic [2:0] cond_inh,
  input  logic       flt,
  input  logic       det16,
  input  logic       det24,
  output logic       inhibit,
  // convergence
  input  logic       cnv_check,
  input  logic       incoming,
  input  logic       m15_bit,
  output logic       cnv_diff,
  // control transfer chain
  input  logic       sh_clk,
  input  logic       sh_rot,
  input  logic       sh_in,
  output logic       ctl_out,
  output logic [3:0] bits       // {C, I, S, Z}
);
  logic cond;

  always_comb begin
    unique case (cond_inh[2:1])
      2'd0: cond = 1'b0;
      2'd1: cond = bits[0];
      2'd2: cond = bits[1];
      default: cond = flt ? det24 : det16;
    endcase
    inhibit  = (cond ^ cond_inh[0]) | (unc_inh & bits[2]);
    cnv_diff = cnv_check & bits[3] & (incoming ^ m15_bit);
    ctl_out  = bits[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0;
    end else if (sh_clk) begin
      bits <= {sh_rot ? bits[0] : sh_in, bits[3:1]};
    end else begin
      if (clr_zero)                 bits[0] <= 1'b0;
      else if (ac1_wr && ac1_bit)   bits[0] <= 1'b1;
      if (ac1_wr && sign_clk)       bits[1] <= ac1_bit;
    end
  end
endmodule
