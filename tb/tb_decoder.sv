// tb_decoder: self-checking test of the instruction decoder. Builds random
// instructions of every format from independently chosen fields and checks that each
// field comes back at its place, that ST presents its rd field as rs2 and that the
// reserved opcode decodes as NOP.
module tb_decoder;
  import risc8_pkg::*;
  int checks = 0, failures = 0;
  instr_t ins;
  dec_t d;

  decoder dut (.ins, .d);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s ins=%h", what, ins); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] op, rd, r1, r2;
    logic [7:0] imm;
    logic [13:0] a;
    repeat (3000) begin
      op = 5'($urandom); rd = 5'($urandom); r1 = 5'($urandom); r2 = 5'($urandom);
      imm = 8'($urandom); a = 14'($urandom);
      // R-type layout
      ins = {op, rd, r1, r2, 4'b0}; #1;
      chk(d.op === ((op === 5'h1E) ? OP_NOP : opcode_t'(op)), "op");
      chk(d.rd === rd, "rd");
      chk(d.rs1 === r1, "rs1");
      chk(d.rs2 === ((op === 5'h15) ? rd : r2), "rs2");
      // I-type layout
      ins = {op, rd, r1, 1'b0, imm}; #1;
      chk(d.imm === imm && d.target === imm && d.rs1 === r1, "imm");
      // M-type layout
      ins = {op, rd, a}; #1;
      chk(d.addr === a && d.rd === rd, "addr");
    end
    ins = ins_m(OP_ST, 5'd9, 14'h1234); #1;
    chk(d.op === OP_ST && d.rs2 === 5'd9 && d.addr === 14'h1234, "ST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
