// cell_accumulator -- 24-bit accumulator shift register (AC1 or AC2).
//
// Serial access works like the hardware's circulating shift register: on
// every bit cycle in which the accumulator is clocked, the register shifts
// one place to the right, the bit leaving the right end (bit 0) is the read
// output, and the bit entering at the left is either new data (when the
// accumulator is the destination) or the bit that just left (ROT, a
// non-destructive read).  With the INT input the ring is the 16 low bits and
// the upper byte holds still; with the FLT input the ring is all 24 bits, so
// byte-wide transfers assemble a 24-bit mantissa.  Parallel shifts move the
// 16- or 24-bit ring by one place per clock, logically (zero fill) or as a
// rotation; only AC1 (ALLOW_LEFT = 1) can shift left.  The two "1 detectors"
// report the most significant bit of the 16-bit and of the 24-bit register.
// Behaviour follows the document's accumulator description; the clock-enable
// style (one synchronous clock, ser_clk / par_clk as enables) is this
// implementation's.
//
// Timing: q and dout change on the clock edge after an enable; the detectors
// are combinational from q.
module cell_accumulator
  import hpcs_pkg::*;
#(
  parameter bit ALLOW_LEFT = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flt,      // 24-bit ring when set, 16-bit otherwise
  input  logic                ser_clk,  // serial bit cycle
  input  logic                wr,       // write din instead of recirculating
  input  logic                din,
  input  logic                par_clk,  // one parallel shift step
  input  logic                left,     // parallel shift direction
  input  logic                rot,      // parallel rotation instead of logical shift
  output logic                dout,
  output logic                msb16,    // 1 detector, INT
  output logic                msb24,    // 1 detector, FLT
  output logic [ACC_BITS-1:0] q
);
  logic [ACC_BITS-1:0] nxt;
  logic                fill;

  always_comb begin
    nxt  = q;
    fill = 1'b0;
    if (ser_clk) begin
      fill = wr ? din : q[0];
      if (flt) nxt = {fill, q[23:1]};
      else     nxt = {q[23:16], fill, q[15:1]};
    end else if (par_clk) begin
      if (left && ALLOW_LEFT) begin
        if (flt) nxt = {q[22:0], rot & q[23]};
        else     nxt = {q[23:16], q[14:0], rot & q[15]};
      end else begin
        if (flt) nxt = {rot & q[0], q[23:1]};
        else     nxt = {q[23:16], rot & q[0], q[15:1]};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= nxt;
  end

  assign dout  = q[0];
  assign msb16 = q[15];
  assign msb24 = q[23];
endmodule
