// hpcs_pkg -- shared types and constants of the parallel computing system.
//
// The array is a single-instruction, many-data machine: one control unit
// broadcasts the same decoded instruction and the same bit-cycle timing to
// every cell, and each cell works bit-serially on its own sixteen words.
// This package holds the instruction-word fields (the 32-bit instruction
// register layout), the opcode values, the decoded instruction that travels
// on the control bus (dec_t) and the per-clock timing pulses (tim_t).
//
// Instruction bit n of the 32-bit register is IR[n]; a field that spans bits
// a..b is read as a binary number with bit a as its least significant bit.
// One clock of this implementation is one bit cycle of the cell.
package hpcs_pkg;

  // ---------------------------------------------------------------- opcodes
  // Arithmetic/logic opcodes (IR[3:0] when IR[16] = 0).
  localparam logic [3:0] OP_ADD = 4'd1;
  localparam logic [3:0] OP_SUB = 4'd2;
  localparam logic [3:0] OP_SSR = 4'd3;
  localparam logic [3:0] OP_DEC = 4'd4;
  localparam logic [3:0] OP_LOR = 4'd5;
  localparam logic [3:0] OP_EXO = 4'd6;
  localparam logic [3:0] OP_AND = 4'd7;
  localparam logic [3:0] OP_MPY = 4'd8;
  localparam logic [3:0] OP_COM = 4'd9;
  localparam logic [3:0] OP_TCM = 4'd10;
  localparam logic [3:0] OP_INC = 4'd11;
  localparam logic [3:0] OP_MOV = 4'd12;
  localparam logic [3:0] OP_SHR = 4'd13;   // parallel shifting
  localparam logic [3:0] OP_SPC = 4'd14;   // special operations

  // Communication opcodes (IR[2:0] when IR[16] = 1).
  localparam logic [2:0] CC_DIN = 3'd1;
  localparam logic [2:0] CC_DOU = 3'd2;
  localparam logic [2:0] CC_CIN = 3'd3;
  localparam logic [2:0] CC_COU = 3'd4;
  localparam logic [2:0] CC_CTR = 3'd5;
  localparam logic [2:0] CC_BUF = 3'd6;    // TTB / TFB

  // Word addresses: 0 = all (destination) or none (source), 1 = AC1, 2 = AC2.
  localparam logic [3:0] W_AC1 = 4'd1;
  localparam logic [3:0] W_AC2 = 4'd2;

  // MPX C (neighbour) codes, IR[19:17].
  typedef enum logic [2:0] {
    NB_INT = 3'd0, NB_N = 3'd1, NB_S = 3'd2, NB_E = 3'd3,
    NB_W = 3'd4, NB_ROW = 3'd5, NB_COL = 3'd6, NB_EXT = 3'd7
  } nbr_e;

  // Mode codes, IR[22:20].
  typedef enum logic [2:0] {
    MD_INT = 3'd0, MD_FB = 3'd1, MD_SB = 3'd2, MD_EX = 3'd3,
    MD_AV = 3'd4, MD_INF = 3'd5
  } mode_e;

  // Operation class seen by the cells and the sequencer.
  typedef enum logic [3:0] {
    K_NOP, K_ALU, K_SSR, K_MPY, K_SHR, K_MSG, K_ICH, K_MAI,
    K_DIN, K_DOU, K_CIN, K_COU, K_CTR, K_TTB, K_TFB, K_ASC
  } kind_e;

  // ALU control levels and carry pulses (columns of the ALU table).
  typedef struct packed {
    logic com;      // complement the Y input
    logic sel1;     // select the sum output
    logic sel2;     // select the carry output
    logic car_clk;  // clock the carry flip-flop each bit
    logic preset;   // preset the carry before the cycle
    logic x_en;     // X input enabled
    logic y_en;     // Y input enabled
  } alu_ctl_t;

  // Decoded instruction, constant for the duration of one operation.
  typedef struct packed {
    kind_e      kind;
    alu_ctl_t   alu;
    logic [3:0] sel_a;     // MPX A selection
    logic [3:0] sel_b;     // MPX B selection
    logic [3:0] sel_d;     // DMPX selection
    logic       dmpx_en;   // destination demultiplexer enabled
    nbr_e       nbr;       // MPX C selection
    mode_e      mode;
    logic       flt;       // accumulators use their 24-bit (FLT) input
    logic       unc_inh;   // interrogate the unconditional inhibit bit
    logic [2:0] cond_inh;  // conditional inhibit code
    logic [3:0] cnv;       // convergence range, 0 = no check
    logic       clr_car;   // clear the carry before the operation
    logic [1:0] shr_rd;    // parallel shift: 1 AC1 left, 2 AC1 right, 3 AC2 right
    logic       shr_rot;   // parallel shift: rotate instead of logical shift
    logic       shr_8;     // parallel shift: 8 bits instead of 1
    logic       buf_col;   // buffer transfer uses the column direction
    logic [1:0] amode;     // computer-cell addressing mode
    logic [2:0] ir_row;    // row field of a computer-cell instruction
    logic [2:0] ir_col;    // column field of a computer-cell instruction
  } dec_t;

  // Per-clock timing pulses from the sequencer.
  typedef struct packed {
    logic       start;     // first clock of an operation
    logic       preset1;   // preset cycle, first clock: clear carry
    logic       preset2;   // preset cycle, second clock: preset carry, clear zero, reset D_A
    logic       bitclk;    // an operating bit cycle
    logic [4:0] cnt;       // bit counter value
    logic [3:0] addr;      // bit address of the direct-address memories
    logic       mem_ok;    // addr is a real memory bit (not beyond bit 15)
    logic       mpy_clk;   // multiplier interrogation (bit counter = cycle counter)
    logic       cyc_end;   // last bit of a multiplication add cycle
    logic       sign_clk;  // latch the written bit into the sign flip-flop
    logic       ex15;      // exponent mode, bit 15: exclusive-or of the signs
    logic       cnv_en;    // bit lies in the convergence range
  } tim_t;

  localparam int unsigned WORD_BITS = 16;
  localparam int unsigned ACC_BITS  = 24;

endpackage
