// ctrl_gen: the control signal generator.
//
// Combinational. Turns an opcode into the control word that travels with the
// instruction down the pipeline: which unit (ALU or misc ops) makes the result and
// with which operation, whether operand B is the immediate, which source registers
// are read (for hazard detection), whether rd, the flags or data memory are written,
// whether data memory is read, and the jump kind (conditional jumps test Z, C or N),
// CALL, RET and HLT. The set of controlled units follows the published description;
// the opcode table is this design's own (see risc8_pkg).
module ctrl_gen
  import risc8_pkg::*;
(
  input  opcode_t op,
  output ctrl_t   c
);
  always_comb begin
    c = '0;
    c.alu_op  = ALU_ADD;
    c.misc_op = MISC_MOV;
    c.jump    = J_NONE;
    unique case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR: begin
        c.use_rs1 = 1'b1; c.use_rs2 = 1'b1; c.reg_we = 1'b1; c.flag_we = 1'b1;
      end
      OP_CMP: begin
        c.use_rs1 = 1'b1; c.use_rs2 = 1'b1; c.flag_we = 1'b1;
      end
      OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI, OP_XORI: begin
        c.use_rs1 = 1'b1; c.b_imm = 1'b1; c.reg_we = 1'b1; c.flag_we = 1'b1;
      end
      OP_CMPI: begin
        c.use_rs1 = 1'b1; c.b_imm = 1'b1; c.flag_we = 1'b1;
      end
      OP_INC, OP_DEC, OP_NEG: begin
        c.use_misc = 1'b1; c.use_rs1 = 1'b1; c.reg_we = 1'b1; c.flag_we = 1'b1;
      end
      OP_MOV: begin
        c.use_misc = 1'b1; c.use_rs1 = 1'b1; c.reg_we = 1'b1;
      end
      OP_MOVI: begin
        c.b_imm = 1'b1; c.reg_we = 1'b1;
      end
      OP_SETF:  begin c.use_misc = 1'b1; c.flag_we = 1'b1; end
      OP_PUSHF: begin c.use_misc = 1'b1; c.reg_we = 1'b1; end
      OP_LD:    begin c.reg_we = 1'b1; c.mem_re = 1'b1; end
      OP_ST:    begin c.use_rs2 = 1'b1; c.mem_we = 1'b1; end
      OP_JMP:   c.jump = J_ALWAYS;
      OP_JZ:    c.jump = J_Z;
      OP_JNZ:   c.jump = J_NZ;
      OP_JC:    c.jump = J_C;
      OP_JNC:   c.jump = J_NC;
      OP_JN:    c.jump = J_N;
      OP_CALL:  begin c.jump = J_ALWAYS; c.call = 1'b1; end
      OP_RET:   begin c.jump = J_ALWAYS; c.ret = 1'b1; end
      OP_HLT:   c.halt = 1'b1;
      default:  c = c;  // NOP
    endcase
    // operation selects
    unique case (op)
      OP_SUB, OP_SUBI, OP_CMP, OP_CMPI: c.alu_op = ALU_SUB;
      OP_AND, OP_ANDI:                  c.alu_op = ALU_AND;
      OP_OR,  OP_ORI:                   c.alu_op = ALU_OR;
      OP_XOR, OP_XORI:                  c.alu_op = ALU_XOR;
      OP_MOVI:                          c.alu_op = ALU_PASSB;
      default:                          c.alu_op = ALU_ADD;
    endcase
    unique case (op)
      OP_INC:   c.misc_op = MISC_INC;
      OP_DEC:   c.misc_op = MISC_DEC;
      OP_NEG:   c.misc_op = MISC_NEG;
      OP_SETF:  c.misc_op = MISC_SETF;
      OP_PUSHF: c.misc_op = MISC_PUSHF;
      default:  c.misc_op = MISC_MOV;
    endcase
  end
endmodule
