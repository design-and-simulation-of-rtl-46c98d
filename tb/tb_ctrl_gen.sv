// tb_ctrl_gen: self-checking test of the control signal generator. For every one of
// the 32 opcodes the expected control word is written out here from the instruction
// table and compared field by field.
module tb_ctrl_gen;
  import risc8_pkg::*;
  int checks = 0, failures = 0;
  opcode_t op;
  ctrl_t c;

  ctrl_gen dut (.op, .c);

  function automatic ctrl_t expect_of(input opcode_t o);
    ctrl_t e = '0;
    e.alu_op = ALU_ADD; e.misc_op = MISC_MOV; e.jump = J_NONE;
    case (o)
      OP_ADD:  begin e.use_rs1=1; e.use_rs2=1; e.reg_we=1; e.flag_we=1; end
      OP_SUB:  begin e.use_rs1=1; e.use_rs2=1; e.reg_we=1; e.flag_we=1; e.alu_op=ALU_SUB; end
      OP_AND:  begin e.use_rs1=1; e.use_rs2=1; e.reg_we=1; e.flag_we=1; e.alu_op=ALU_AND; end
      OP_OR:   begin e.use_rs1=1; e.use_rs2=1; e.reg_we=1; e.flag_we=1; e.alu_op=ALU_OR; end
      OP_XOR:  begin e.use_rs1=1; e.use_rs2=1; e.reg_we=1; e.flag_we=1; e.alu_op=ALU_XOR; end
      OP_CMP:  begin e.use_rs1=1; e.use_rs2=1; e.flag_we=1; e.alu_op=ALU_SUB; end
      OP_ADDI: begin e.use_rs1=1; e.b_imm=1; e.reg_we=1; e.flag_we=1; end
      OP_SUBI: begin e.use_rs1=1; e.b_imm=1; e.reg_we=1; e.flag_we=1; e.alu_op=ALU_SUB; end
      OP_ANDI: begin e.use_rs1=1; e.b_imm=1; e.reg_we=1; e.flag_we=1; e.alu_op=ALU_AND; end
      OP_ORI:  begin e.use_rs1=1; e.b_imm=1; e.reg_we=1; e.flag_we=1; e.alu_op=ALU_OR; end
      OP_XORI: begin e.use_rs1=1; e.b_imm=1; e.reg_we=1; e.flag_we=1; e.alu_op=ALU_XOR; end
      OP_CMPI: begin e.use_rs1=1; e.b_imm=1; e.flag_we=1; e.alu_op=ALU_SUB; end
      OP_INC:  begin e.use_misc=1; e.use_rs1=1; e.reg_we=1; e.flag_we=1; e.misc_op=MISC_INC; end
      OP_DEC:  begin e.use_misc=1; e.use_rs1=1; e.reg_we=1; e.flag_we=1; e.misc_op=MISC_DEC; end
      OP_NEG:  begin e.use_misc=1; e.use_rs1=1; e.reg_we=1; e.flag_we=1; e.misc_op=MISC_NEG; end
      OP_MOV:  begin e.use_misc=1; e.use_rs1=1; e.reg_we=1; end
      OP_MOVI: begin e.b_imm=1; e.reg_we=1; e.alu_op=ALU_PASSB; end
      OP_SETF: begin e.use_misc=1; e.flag_we=1; e.misc_op=MISC_SETF; end
      OP_PUSHF:begin e.use_misc=1; e.reg_we=1; e.misc_op=MISC_PUSHF; end
      OP_LD:   begin e.reg_we=1; e.mem_re=1; end
      OP_ST:   begin e.use_rs2=1; e.mem_we=1; end
      OP_JMP:  e.jump = J_ALWAYS;
      OP_JZ:   e.jump = J_Z;
      OP_JNZ:  e.jump = J_NZ;
      OP_JC:   e.jump = J_C;
      OP_JNC:  e.jump = J_NC;
      OP_JN:   e.jump = J_N;
      OP_CALL: begin e.jump = J_ALWAYS; e.call = 1; end
      OP_RET:  begin e.jump = J_ALWAYS; e.ret = 1; end
      OP_HLT:  e.halt = 1;
      default: ;
    endcase
    return e;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t e;
    for (int i = 0; i < 32; i++) begin
      op = opcode_t'(i); #1;
      e = expect_of(op);
      checks++;
      if (c !== e) begin failures++; $display("FAIL op %0d got %h exp %h", i, c, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
