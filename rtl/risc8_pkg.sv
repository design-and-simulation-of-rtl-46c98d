// risc8_pkg: shared constants and types of the 8-bit pipelined RISC processor.
//
// The machine is an 8-bit Harvard processor: a 256 x 24-bit instruction memory, a
// 16K x 8-bit data memory, 32 general registers of 8 bits, a 4-bit flag register and
// a five-stage pipeline (IF, ID, EX, MEM, WB). Those sizes are the published ones.
// The instruction encoding below is this design's own, since none was published:
//
//   R-type  op[23:19] rd[18:14] rs1[13:9] rs2[8:4] 0000       ADD SUB AND OR XOR CMP
//   I-type  op        rd        rs1       -  imm8[7:0]         ADDI SUBI ANDI ORI XORI CMPI
//   U-type  op        rd        rs1       -                    INC DEC NEG MOV PUSHF
//           op        rd        -         -  imm8[7:0]         MOVI, SETF (imm[3:0])
//   M-type  op        rd        addr14[13:0]                   LD rd,[a]   ST rd,[a]
//   J-type  op        -                      target[7:0]       JMP JZ JNZ JC JNC JN CALL
//           op        -                                        RET NOP HLT
//
// Flags are {V,N,C,Z}. C is the carry of an addition and the borrow of a subtraction
// (C=1 when a < b unsigned after CMP/SUB).
package risc8_pkg;

  localparam int XLEN     = 8;      // data width
  localparam int ILEN     = 24;     // instruction width
  localparam int NREGS    = 32;     // general registers
  localparam int RAW      = 5;      // register address width
  localparam int IM_DEPTH = 256;    // instruction words
  localparam int IAW      = 8;      // instruction address width
  localparam int DM_DEPTH = 16384;  // data bytes
  localparam int DAW      = 14;     // data address width
  localparam int FLAG_W   = 4;

  // flag bit positions
  localparam int FZ = 0;
  localparam int FC = 1;
  localparam int FN = 2;
  localparam int FV = 3;

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [ILEN-1:0]   instr_t;
  typedef logic [RAW-1:0]    reg_t;
  typedef logic [IAW-1:0]    iaddr_t;
  typedef logic [DAW-1:0]    daddr_t;
  typedef logic [FLAG_W-1:0] flags_t;

  typedef enum logic [4:0] {
    OP_NOP  = 5'h00,
    OP_ADD  = 5'h01, OP_SUB  = 5'h02, OP_AND  = 5'h03, OP_OR   = 5'h04,
    OP_XOR  = 5'h05, OP_CMP  = 5'h06,
    OP_ADDI = 5'h07, OP_SUBI = 5'h08, OP_ANDI = 5'h09, OP_ORI  = 5'h0A,
    OP_XORI = 5'h0B, OP_CMPI = 5'h0C,
    OP_INC  = 5'h0D, OP_DEC  = 5'h0E, OP_NEG  = 5'h0F, OP_MOV  = 5'h10,
    OP_MOVI = 5'h11, OP_SETF = 5'h12, OP_PUSHF = 5'h13,
    OP_LD   = 5'h14, OP_ST   = 5'h15,
    OP_JMP  = 5'h16, OP_JZ   = 5'h17, OP_JNZ  = 5'h18, OP_JC   = 5'h19,
    OP_JNC  = 5'h1A, OP_JN   = 5'h1B, OP_CALL = 5'h1C, OP_RET  = 5'h1D,
    OP_RSVD = 5'h1E, OP_HLT  = 5'h1F
  } opcode_t;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSB
  } alu_op_t;

  typedef enum logic [2:0] {
    MISC_INC, MISC_DEC, MISC_NEG, MISC_MOV, MISC_SETF, MISC_PUSHF
  } misc_op_t;

  typedef enum logic [2:0] {
    J_NONE, J_ALWAYS, J_Z, J_NZ, J_C, J_NC, J_N
  } jump_t;

  // Fields pulled out of an instruction by the decoder.
  typedef struct packed {
    opcode_t op;
    reg_t    rd;
    reg_t    rs1;
    reg_t    rs2;
    word_t   imm;
    daddr_t  addr;
    iaddr_t  target;
  } dec_t;

  // Control word produced by the control signal generator.
  typedef struct packed {
    logic     use_misc;   // result from misc_ops, else from alu
    alu_op_t  alu_op;
    misc_op_t misc_op;
    logic     b_imm;      // ALU operand B is imm8, else register rs2
    logic     use_rs1;    // instruction reads rs1
    logic     use_rs2;    // instruction reads rs2 (ST reads rd through the rs2 port)
    logic     reg_we;     // writes rd
    logic     flag_we;    // updates the flag register
    logic     mem_re;     // LD
    logic     mem_we;     // ST
    jump_t    jump;
    logic     call;
    logic     ret;
    logic     halt;
  } ctrl_t;

  // ID/EX pipeline register
  typedef struct packed {
    logic   valid;
    iaddr_t pc;
    dec_t   d;
    ctrl_t  c;
    word_t  a;            // rs1 value read in ID
    word_t  b;            // rs2 value read in ID
  } idex_t;

  // EX/MEM pipeline register
  typedef struct packed {
    logic   valid;
    reg_t   rd;
    logic   reg_we;
    logic   mem_re;
    logic   mem_we;
    word_t  result;       // ALU / misc result
    word_t  store_data;
    daddr_t addr;
  } exmem_t;

  // MEM/WB pipeline register
  typedef struct packed {
    logic   valid;
    reg_t   rd;
    logic   reg_we;
    logic   mem_re;       // write-back data comes from data memory
    word_t  result;
  } memwb_t;

  // Instruction builders, used by testbenches and program images.
  function automatic instr_t ins_r(opcode_t op, reg_t rd, reg_t rs1, reg_t rs2);
    return {op, rd, rs1, rs2, 4'b0000};
  endfunction
  function automatic instr_t ins_i(opcode_t op, reg_t rd, reg_t rs1, word_t imm);
    return {op, rd, rs1, 1'b0, imm};
  endfunction
  function automatic instr_t ins_m(opcode_t op, reg_t rd, daddr_t a);
    return {op, rd, a};
  endfunction
  function automatic instr_t ins_j(opcode_t op, iaddr_t t);
    return {op, 11'b0, t};
  endfunction

endpackage
