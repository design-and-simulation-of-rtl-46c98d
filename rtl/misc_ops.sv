// misc_ops: the miscellaneous-operation unit beside the ALU.
//
// Combinational. The six operations are the ones printed for this unit in the
// processor's block diagram: INC, DEC, NEG, MOV, SETF and PUSHF. Their exact effect
// is this design's reading of the mnemonics:
//   INC  y = a + 1      flags Z C N V (C = carry out)
//   DEC  y = a - 1      flags Z C N V (C = borrow)
//   NEG  y = 0 - a      flags Z C N V (C = borrow, i.e. a != 0)
//   MOV  y = a          flags passed through unchanged
//   SETF flags = imm[3:0], y = 0 (not written back)
//   PUSHF y = {0000, flags_in}, flags unchanged (copies the flags into a register)
// Flags are {V,N,C,Z}.
module misc_ops
  import risc8_pkg::*;
(
  input  misc_op_t op,
  input  word_t    a,
  input  word_t    imm,
  input  flags_t   flags_in,
  output word_t    y,
  output flags_t   flags
);
  logic [XLEN:0] t;
  logic          arith;
  logic          v;

  always_comb begin
    t     = '0;
    arith = 1'b0;
    v     = 1'b0;
    flags = flags_in;
    unique case (op)
      MISC_INC: begin
        t = {1'b0, a} + 1'b1;
        arith = 1'b1;
        v = (a == 8'h7F);
      end
      MISC_DEC: begin
        t = {1'b0, a} - 1'b1;
        arith = 1'b1;
        v = (a == 8'h80);
      end
      MISC_NEG: begin
        t = '0 - {1'b0, a};
        arith = 1'b1;
        v = (a == 8'h80);
      end
      MISC_MOV:   t = {1'b0, a};
      MISC_SETF:  flags = imm[FLAG_W-1:0];
      MISC_PUSHF: t = {1'b0, {(XLEN-FLAG_W){1'b0}}, flags_in};
      default:    t = '0;
    endcase
    y = t[XLEN-1:0];
    if (arith) begin
      flags[FZ] = (y == '0);
      flags[FN] = y[XLEN-1];
      flags[FC] = t[XLEN];
      flags[FV] = v;
    end
  end
endmodule
