// instruction_decoder -- turns the 32-bit instruction register into the
// control levels broadcast to the cells and the other control-unit parts.
//
// Bit 16 separates the two instruction families.  With IR[16] = 0 the word
// is an arithmetic/logic operation: opcode IR[3:0], destination IR[7:4],
// source A IR[11:8], source B IR[15:12], neighbour IR[19:17], mode
// IR[22:20], unconditional inhibit IR[23], conditional inhibit IR[26:24],
// convergence range IR[30:27] and "keep carry" IR[31] (0 clears the carry,
// so an all-zero upper half means the common in-cell integer case).  With
// IR[16] = 1 it is a communication operation: opcode IR[2:0] selects data
// in/out, control in/out, control transfer or buffer transfer.  The ALU
// levels per operation follow the document's ALU table; which source field
// feeds a single-operand operation follows its multiplexer table (MPX B/C
// for complement, two's complement, increment and move; MPX A for
// decrement; both multiplexers on the same word for the serial right
// shift; MPX B on the destination for multiply and interchange).
//
// The bit assignments inside the parallel-shift and special-operation
// words, and the buffer-transfer direction bit, are given by the document;
// the numeric codes of the shift register/direction field (1 AC1 left,
// 2 AC1 right, 3 AC2 right) and of the transfer direction (IR[3] = 0 to the
// buffer) are this implementation's choice.  Special-word bit 11 (ASC,
// capture the inhibit condition into the associative flip-flops) is this
// implementation's encoding of the associative search the document proposes
// as an extension.  Purely combinational.
module instruction_decoder
  import hpcs_pkg::*;
(
  input  logic [31:0] ir,
  output dec_t        dec
);
  localparam alu_ctl_t A_NONE = '{com:0, sel1:0, sel2:0, car_clk:0, preset:0, x_en:0, y_en:0};
  localparam alu_ctl_t A_ADD  = '{com:0, sel1:1, sel2:0, car_clk:1, preset:0, x_en:1, y_en:1};
  localparam alu_ctl_t A_SUB  = '{com:1, sel1:1, sel2:0, car_clk:1, preset:1, x_en:1, y_en:1};
  localparam alu_ctl_t A_AND  = '{com:0, sel1:0, sel2:1, car_clk:0, preset:0, x_en:1, y_en:1};
  localparam alu_ctl_t A_EXO  = '{com:0, sel1:1, sel2:0, car_clk:0, preset:0, x_en:1, y_en:1};
  localparam alu_ctl_t A_LOR  = '{com:0, sel1:1, sel2:1, car_clk:0, preset:0, x_en:1, y_en:1};
  localparam alu_ctl_t A_COM  = '{com:1, sel1:1, sel2:0, car_clk:0, preset:0, x_en:0, y_en:1};
  localparam alu_ctl_t A_TCM  = '{com:1, sel1:1, sel2:0, car_clk:1, preset:1, x_en:0, y_en:1};
  localparam alu_ctl_t A_INC  = '{com:0, sel1:1, sel2:0, car_clk:1, preset:1, x_en:0, y_en:1};
  localparam alu_ctl_t A_DEC  = '{com:1, sel1:1, sel2:0, car_clk:1, preset:0, x_en:1, y_en:0};
  localparam alu_ctl_t A_MOV  = '{com:0, sel1:1, sel2:0, car_clk:0, preset:0, x_en:0, y_en:1};

  logic [3:0] op, fd, fa, fb;
  assign op = ir[3:0];
  assign fd = ir[7:4];
  assign fa = ir[11:8];
  assign fb = ir[15:12];

  always_comb begin
    dec          = '0;
    dec.kind     = K_NOP;
    dec.alu      = A_NONE;
    dec.nbr      = NB_INT;
    dec.mode     = MD_INT;
    dec.clr_car  = 1'b1;
    dec.amode    = ir[9:8];
    dec.ir_row   = ir[12:10];
    dec.ir_col   = ir[15:13];
    if (!ir[16]) begin
      // -------- arithmetic and logic operations
      dec.nbr      = nbr_e'(ir[19:17]);
      dec.mode     = mode_e'(ir[22:20]);
      dec.unc_inh  = ir[23];
      dec.cond_inh = ir[26:24];
      dec.cnv      = ir[30:27];
      dec.clr_car  = !ir[31];
      dec.flt      = dec.mode inside {MD_FB, MD_SB, MD_EX, MD_INF};
      dec.sel_d    = fd;
      dec.dmpx_en  = 1'b1;
      dec.kind     = K_ALU;
      unique case (op)
        OP_ADD: begin dec.alu = A_ADD; dec.sel_a = fa; dec.sel_b = fb; end
        OP_SUB: begin dec.alu = A_SUB; dec.sel_a = fa; dec.sel_b = fb; end
        OP_LOR: begin dec.alu = A_LOR; dec.sel_a = fa; dec.sel_b = fb; end
        OP_EXO: begin dec.alu = A_EXO; dec.sel_a = fa; dec.sel_b = fb; end
        OP_AND: begin dec.alu = A_AND; dec.sel_a = fa; dec.sel_b = fb; end
        OP_COM: begin dec.alu = A_COM; dec.sel_b = fb; end
        OP_TCM: begin dec.alu = A_TCM; dec.sel_b = fb; end
        OP_INC: begin dec.alu = A_INC; dec.sel_b = fb; end
        OP_MOV: begin dec.alu = A_MOV; dec.sel_b = fb; end
        OP_DEC: begin dec.alu = A_DEC; dec.sel_a = fa; end
        OP_SSR: begin
          dec.kind  = K_SSR; dec.alu = A_ADD;
          dec.sel_a = fa; dec.sel_b = fa; dec.nbr = NB_INT;
        end
        OP_MPY: begin
          dec.kind  = K_MPY; dec.alu = A_ADD;
          dec.sel_a = fa; dec.sel_b = fd; dec.nbr = NB_INT;
          dec.mode  = MD_INT; dec.flt = ir[20];
          dec.clr_car = 1'b1;
        end
        OP_SHR: begin
          dec.kind    = K_SHR; dec.dmpx_en = 1'b0; dec.sel_d = '0;
          dec.shr_rd  = ir[5:4]; dec.shr_rot = ir[6]; dec.shr_8 = ir[7];
          dec.flt     = ir[8]; dec.mode = MD_INT; dec.cnv = '0;
        end
        OP_SPC: begin
          dec.mode = MD_INT; dec.flt = 1'b0; dec.cnv = '0;
          if (ir[8]) begin
            dec.kind = K_MSG; dec.dmpx_en = 1'b0; dec.sel_d = '0;
          end else if (ir[9]) begin
            dec.kind = K_ICH; dec.sel_b = fd;
          end else if (ir[11]) begin
            dec.kind = K_ASC; dec.dmpx_en = 1'b0; dec.sel_d = '0;
            dec.unc_inh = 1'b0;
          end else if (ir[10]) begin
            dec.kind = K_MAI; dec.mode = MD_AV;
          end else begin
            dec.kind = K_NOP; dec.dmpx_en = 1'b0;
          end
        end
        default: begin dec.kind = K_NOP; dec.dmpx_en = 1'b0; dec.sel_d = '0; end
      endcase
    end else begin
      // -------- communication operations
      unique case (ir[2:0])
        CC_DIN: begin
          dec.kind = K_DIN; dec.alu = A_MOV; dec.nbr = NB_EXT;
          dec.sel_d = fd; dec.dmpx_en = 1'b1;
        end
        CC_DOU: begin dec.kind = K_DOU; dec.sel_b = fd; end
        CC_CIN: begin dec.kind = K_CIN; dec.nbr = NB_EXT; end
        CC_COU: dec.kind = K_COU;
        CC_CTR: begin dec.kind = K_CTR; dec.nbr = nbr_e'(ir[19:17]); end
        CC_BUF: begin
          dec.kind    = ir[3] ? K_TFB : K_TTB;
          dec.alu     = A_MOV;
          dec.buf_col = ir[11];
          dec.nbr     = ir[11] ? NB_COL : NB_ROW;
          dec.sel_d   = fd; dec.sel_b = fb; dec.dmpx_en = 1'b1;
        end
        default: dec.kind = K_NOP;
      endcase
    end
  end
endmodule
