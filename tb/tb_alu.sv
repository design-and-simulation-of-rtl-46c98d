// tb_alu: self-checking test of the ALU. Applies 2000 random operand pairs to each
// operation plus corner cases and compares result and {V,N,C,Z} flags with a model
// computed here in integer arithmetic.
module tb_alu;
  import risc8_pkg::*;
  int checks = 0, failures = 0;
  alu_op_t op;
  logic [7:0] a, b, y;
  flags_t f;

  alu dut (.op, .a, .b, .y, .flags(f));

  task automatic ref_model(input alu_op_t o, input int ia, input int ib,
                           output logic [7:0] ey, output flags_t ef);
    int r, sa, sb, sr;
    sa = (ia > 127) ? ia - 256 : ia;
    sb = (ib > 127) ? ib - 256 : ib;
    ef = '0;
    case (o)
      ALU_ADD: begin r = ia + ib; ef[FC] = (r > 255); sr = sa + sb; ef[FV] = (sr > 127 || sr < -128); end
      ALU_SUB: begin r = ia - ib; ef[FC] = (ia < ib); sr = sa - sb; ef[FV] = (sr > 127 || sr < -128); end
      ALU_AND: r = ia & ib;
      ALU_OR:  r = ia | ib;
      ALU_XOR: r = ia ^ ib;
      default: r = ib;
    endcase
    ey = r[7:0];
    ef[FZ] = (ey == 0);
    ef[FN] = ey[7];
  endtask

  task automatic one(input alu_op_t o, input logic [7:0] ia, input logic [7:0] ib);
    logic [7:0] ey; flags_t ef;
    op = o; a = ia; b = ib;
    #1;
    ref_model(o, int'(ia), int'(ib), ey, ef);
    checks++;
    if (y !== ey || f !== ef) begin
      failures++;
      if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h exp %h flags=%b exp %b", o.name(), ia, ib, y, ey, f, ef);
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
    alu_op_t ops[6] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSB};
    foreach (ops[k]) begin
      one(ops[k], 8'h00, 8'h00); one(ops[k], 8'hFF, 8'h01); one(ops[k], 8'h7F, 8'h01);
      one(ops[k], 8'h80, 8'h01); one(ops[k], 8'h80, 8'h80); one(ops[k], 8'h05, 8'h07);
      repeat (2000) one(ops[k], 8'($urandom), 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
