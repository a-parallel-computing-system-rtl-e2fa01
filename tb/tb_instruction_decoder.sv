// tb_instruction_decoder -- self-checking test of the instruction decoder.
// Random 32-bit instruction words are decoded and every field that matters
// for the opcode is compared with an independent reference written from
// the instruction formats: operation kind, operand selections (D, A, B
// fields), neighbour, mode, inhibit, convergence and carry-keep fields for
// arithmetic/logic words; transfer kind, word and buffer direction for
// communication words.  The ALU controls are checked by their effect (does
// the operation complement Y, clock the carry, preset the carry).
// Every opcode of both formats is covered by construction.
module tb_instruction_decoder;
  import hpcs_pkg::*;
  logic [31:0] ir;
  dec_t dec;
  int checks = 0, failures = 0;
  instruction_decoder dut (.ir, .dec);

  task automatic check(input string name, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s ir=%h got %h expected %h", name, ir, got, exp);
    end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      ir = $urandom;
      if (n < 32) ir[16] = n[4];            // make sure every opcode appears
      if (n < 32) ir[3:0] = n[3:0];
      #1;
      if (!ir[16]) begin
        automatic logic [3:0] op = ir[3:0];
        check("flt", dec.flt, op == OP_MPY ? ir[20] : op == OP_SHR ? ir[8] :
                              op == OP_SPC ? 0 : ir[22:20] inside {MD_FB, MD_SB, MD_EX, MD_INF});
        if (op inside {[1:12]}) begin
          check("kind", dec.kind, op == OP_SSR ? K_SSR : op == OP_MPY ? K_MPY : K_ALU);
          check("sel_d", dec.sel_d, ir[7:4]);
          check("unc_inh", dec.unc_inh, ir[23]);
          check("cond_inh", dec.cond_inh, ir[26:24]);
          check("dmpx_en", dec.dmpx_en, 1);
        end
        if (op inside {[1:12]} && op != OP_MPY) begin
          check("cnv", dec.cnv, ir[30:27]);
          check("clr_car", dec.clr_car, !ir[31]);
          check("mode", dec.mode, ir[22:20]);
        end
        case (op)
          OP_ADD, OP_SUB, OP_LOR, OP_EXO, OP_AND: begin
            check("sel_a", dec.sel_a, ir[11:8]); check("sel_b", dec.sel_b, ir[15:12]);
            check("nbr", dec.nbr, ir[19:17]);
            check("com", dec.alu.com, op == OP_SUB);
            check("carry", dec.alu.car_clk, op inside {OP_ADD, OP_SUB});
            check("preset", dec.alu.preset, op == OP_SUB);
          end
          OP_COM, OP_TCM, OP_INC, OP_MOV: begin
            check("sel_b", dec.sel_b, ir[15:12]); check("x_en", dec.alu.x_en, 0);
            check("com", dec.alu.com, op inside {OP_COM, OP_TCM});
            check("preset", dec.alu.preset, op inside {OP_TCM, OP_INC});
          end
          OP_DEC: begin
            check("sel_a", dec.sel_a, ir[11:8]); check("y_en", dec.alu.y_en, 0);
            check("com", dec.alu.com, 1); check("preset", dec.alu.preset, 0);
          end
          OP_SSR: begin check("sel_a", dec.sel_a, ir[11:8]); check("sel_b", dec.sel_b, ir[11:8]); end
          OP_MPY: begin
            check("multiplier", dec.sel_a, ir[11:8]); check("partial", dec.sel_b, ir[7:4]);
            check("mpy clr", dec.clr_car, 1);
          end
          OP_SHR: begin
            check("kind", dec.kind, K_SHR); check("shr_rd", dec.shr_rd, ir[5:4]);
            check("rot", dec.shr_rot, ir[6]); check("8", dec.shr_8, ir[7]);
            check("no write", dec.dmpx_en, 0);
          end
          OP_SPC: check("kind", dec.kind, ir[8] ? K_MSG : ir[9] ? K_ICH : ir[11] ? K_ASC :
                                           ir[10] ? K_MAI : K_NOP);
          default: begin check("kind", dec.kind, K_NOP); check("no write", dec.dmpx_en, 0); end
        endcase
      end else begin
        check("amode", dec.amode, ir[9:8]);
        check("row", dec.ir_row, ir[12:10]);
        check("col", dec.ir_col, ir[15:13]);
        case (ir[2:0])
          CC_DIN: begin check("kind", dec.kind, K_DIN); check("nbr", dec.nbr, NB_EXT);
                        check("sel_d", dec.sel_d, ir[7:4]); end
          CC_DOU: begin check("kind", dec.kind, K_DOU); check("sel_b", dec.sel_b, ir[7:4]);
                        check("no write", dec.dmpx_en, 0); end
          CC_CIN: check("kind", dec.kind, K_CIN);
          CC_COU: check("kind", dec.kind, K_COU);
          CC_CTR: begin check("kind", dec.kind, K_CTR); check("nbr", dec.nbr, ir[19:17]); end
          CC_BUF: begin
            check("kind", dec.kind, ir[3] ? K_TFB : K_TTB);
            check("nbr", dec.nbr, ir[11] ? NB_COL : NB_ROW);
            check("sel_d", dec.sel_d, ir[7:4]); check("sel_b", dec.sel_b, ir[15:12]);
          end
          default: check("kind", dec.kind, K_NOP);
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
