// cell_alu -- one-bit serial arithmetic-logic unit of a cell.
//
// A one-bit full adder whose B input is the Y operand passed through an
// exclusive-or (the COM line), a carry flip-flop that feeds the carry out of
// one bit into the next, and a two-way output selector.  Selecting the sum
// gives X xor Y (or the arithmetic sum when the carry is clocked), selecting
// the carry output gives X and Y, selecting both gives X or Y.  With the X or
// Y input disabled the same hardware yields move, complement, two's
// complement, increment and decrement; the control levels for every
// operation come from the decoder (hpcs_pkg::alu_ctl_t).  All of this follows
// the document's ALU description.
//
// Timing: z is combinational from x, y and the carry flip-flop.  The carry
// flip-flop is cleared on the first preset clock when clr_car is set, preset
// on the second preset clock for operations that need "+1", and loaded with
// the carry out on every bit cycle whose operation clocks the carry.  In
// exponent mode the sign bit (ex15) is the plain exclusive-or of X and Y, and
// cyc_end clears the carry between the add cycles of a multiplication (both
// are choices of this implementation).
module cell_alu
  import hpcs_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  alu_ctl_t ctl,
  input  logic     clr_car,   // instruction asks for the carry to be cleared
  input  logic     preset1,
  input  logic     preset2,
  input  logic     bitclk,
  input  logic     cyc_end,
  input  logic     ex15,
  input  logic     x,
  input  logic     y,
  output logic     z,
  output logic     carry
);
  logic a, b, sum, cout;

  always_comb begin
    a    = x & ctl.x_en;
    b    = (y & ctl.y_en) ^ ctl.com;
    sum  = a ^ b ^ carry;
    cout = (a & b) | (a & carry) | (b & carry);
    if (ex15)
      z = a ^ (y & ctl.y_en);
    else
      z = (ctl.sel1 & sum) | (ctl.sel2 & cout);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            carry <= 1'b0;
    else if (preset1 && clr_car)           carry <= 1'b0;
    else if (preset2 && clr_car && ctl.preset) carry <= 1'b1;
    else if (cyc_end)                      carry <= 1'b0;
    else if (bitclk && ctl.car_clk && !ex15) carry <= cout;
  end
endmodule
