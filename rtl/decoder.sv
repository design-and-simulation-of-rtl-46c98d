// decoder: the instruction decoder of the ID stage.
//
// Combinational. Cuts the 24-bit instruction into its fields: opcode [23:19],
// rd [18:14], rs1 [13:9], rs2 [8:4], imm8 [7:0], the 14-bit data address [13:0] of
// LD/ST and the 8-bit jump target [7:0]. All fields are produced for every
// instruction; the control signal generator decides which are used. A store reads
// the register named in its rd field, so for ST that field is presented as rs2. An opcode that
// is not defined decodes as NOP. The field layout is this design's own.
module decoder
  import risc8_pkg::*;
(
  input  instr_t ins,
  output dec_t   d
);
  always_comb begin
    d.op     = opcode_t'(ins[23:19]);
    if (d.op == OP_RSVD) d.op = OP_NOP;
    d.rd     = ins[18:14];
    d.rs1    = ins[13:9];
    d.rs2    = (d.op == OP_ST) ? ins[18:14] : ins[8:4];
    d.imm    = ins[7:0];
    d.addr   = ins[13:0];
    d.target = ins[7:0];
  end
endmodule
