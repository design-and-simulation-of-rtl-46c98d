// tb_misc_ops: self-checking test of the misc-ops unit (INC DEC NEG MOV SETF PUSHF).
// Every operand value 0..255 is applied to each operation with random incoming flags;
// expected results and flags are worked out here in integer arithmetic.
module tb_misc_ops;
  import risc8_pkg::*;
  int checks = 0, failures = 0;
  misc_op_t op;
  word_t a, imm, y;
  flags_t fin, f;

  misc_ops dut (.op, .a, .imm, .flags_in(fin), .y, .flags(f));

  task automatic one(input misc_op_t o, input int ia, input logic [7:0] iimm, input flags_t ifl);
    int r, s;
    logic [7:0] ey;
    flags_t ef;
    op = o; a = 8'(ia); imm = iimm; fin = ifl;
    #1;
    s = (ia > 127) ? ia - 256 : ia;
    ef = ifl;
    ey = 8'h00;
    case (o)
      MISC_INC: begin r = ia + 1; ey = r[7:0]; ef[FC] = (r > 255); ef[FV] = (s + 1 > 127); end
      MISC_DEC: begin r = ia - 1; ey = r[7:0]; ef[FC] = (ia == 0); ef[FV] = (s - 1 < -128); end
      MISC_NEG: begin r = 0 - ia; ey = r[7:0]; ef[FC] = (ia != 0); ef[FV] = (-s > 127); end
      MISC_MOV: ey = 8'(ia);
      MISC_SETF: ef = iimm[3:0];
      default:  ey = {4'b0, ifl};
    endcase
    if (o inside {MISC_INC, MISC_DEC, MISC_NEG}) begin
      ef[FZ] = (ey == 0);
      ef[FN] = ey[7];
    end
    checks++;
    if (y !== ey || f !== ef) begin
      failures++;
      if (failures < 10) $display("FAIL op=%s a=%h y=%h exp %h flags=%b exp %b", o.name(), ia, y, ey, f, ef);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    misc_op_t ops[6] = '{MISC_INC, MISC_DEC, MISC_NEG, MISC_MOV, MISC_SETF, MISC_PUSHF};
    foreach (ops[k])
      for (int i = 0; i < 256; i++)
        one(ops[k], i, 8'($urandom), 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
