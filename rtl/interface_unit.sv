// interface_unit -- the host interface: device registers on the host bus.
//
// To the host the array is a device with word registers at these bus
// addresses (octal): 167770 first half of the instruction register
// (IR[15:0]), 167772 second half (IR[31:16]), 167774 data register (DR),
// 167776 device status register (DSR), plus 167760 for the basic address
// and cell mode registers of the cell addressing system.  The address
// decoder checks that bus address bits 17:13 are all ones and bits 12:3
// match the jumper value 0777 (0776 for the addressing register), and uses
// bits 2:1 to pick the register.  Writing the first instruction half also
// produces the start pulse, so the host loads the second half first and can
// leave it unchanged between similar instructions.
//
// The DR is the parallel/serial converter between host and array and also
// the central buffer: the array reads bit `dr_addr` of it on its external
// input, and data-out / control-out operations write the selected cell's
// output into bit `dr_addr`.  The DSR holds busy (bit 7, 1 = busy) and
// convergence (bit 15, 1 = all tested cells agreed with M15).
//
// Following the document: the register set, its addresses and the start
// pulse.  This implementation's choices: a synchronous single-clock bus
// (one-clock write strobe, combinational read data, byte control ignored),
// the DSR bit positions, the extra register's address and bit-addressed
// serial access to the DR.  A start written while busy is ignored.
// The associative detector's result is read at 167762 (bit 15 found,
// bits 11:6 row line, bits 5:0 column line) and a write there resets the
// reported cell; the document proposes that the host reads these addresses
// and pulses the reset, and this address is this implementation's choice.
module interface_unit #(
  parameter logic [9:0] DEV_JUMPER = 10'o777,
  parameter logic [9:0] BAR_JUMPER = 10'o776
) (
  input  logic        clk,
  input  logic        rst_n,
  // host bus
  input  logic [17:0] bus_addr,
  input  logic        bus_wr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  // to the control unit
  output logic [31:0] ir,
  output logic        start,
  output logic        bar_load,
  output logic [15:0] bar_wdata,
  input  logic        busy,
  input  logic        cnv_flag,
  // serial side of the data register
  input  logic [3:0]  dr_addr,
  input  logic        dr_wr,
  input  logic        dr_din,
  output logic        dr_bit,
  output logic [15:0] dr_q,
  // associative search
  input  logic        asc_found,
  input  logic [5:0]  asc_row,
  input  logic [5:0]  asc_col,
  output logic        asc_clr
);
  logic dev_hit, bar_hit;
  logic [15:0] dsr;

  assign dev_hit = &bus_addr[17:13] && bus_addr[12:3] == DEV_JUMPER;
  assign bar_hit = &bus_addr[17:13] && bus_addr[12:3] == BAR_JUMPER;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir    <= '0;
      dr_q  <= '0;
      start <= 1'b0;
    end else begin
      start <= 1'b0;
      if (bus_wr && dev_hit) begin
        unique case (bus_addr[2:1])
          2'd0: if (!busy) begin ir[15:0] <= bus_wdata; start <= 1'b1; end
          2'd1: ir[31:16] <= bus_wdata;
          2'd2: dr_q      <= bus_wdata;
          default: ;   // DSR is read-only
        endcase
      end else if (dr_wr) begin
        dr_q[dr_addr] <= dr_din;
      end
    end
  end

  assign bar_load  = bus_wr && bar_hit && bus_addr[2:1] == 2'd0 && !busy;
  assign asc_clr   = bus_wr && bar_hit && bus_addr[2:1] == 2'd1 && !busy;
  assign bar_wdata = bus_wdata;
  assign dr_bit    = dr_q[dr_addr];

  always_comb begin
    dsr     = '0;
    dsr[7]  = busy;
    dsr[15] = cnv_flag;
    bus_rdata = '0;
    if (dev_hit) begin
      unique case (bus_addr[2:1])
        2'd2:    bus_rdata = dr_q;
        2'd3:    bus_rdata = dsr;
        default: bus_rdata = '0;   // instruction registers are write-only
      endcase
    end else if (bar_hit && bus_addr[2:1] == 2'd1) begin
      bus_rdata = {asc_found, 3'b000, asc_row, asc_col};
    end
  end
endmodule
