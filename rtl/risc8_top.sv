// risc8_top: an 8-bit RISC processor with a five-stage pipeline and Harvard memories.
//
// Instructions are 24 bits wide and live in a 256-word instruction memory addressed
// by the 8-bit PC; data lives in a separate 16K x 8-bit data memory, so a fetch and a
// load/store never compete. Thirty-two 8-bit registers, an ALU, a misc-ops unit and
// a 4-bit flag register make up the datapath. The pipeline is
//
//   IF   PC -> instruction memory -> IRX (IF/ID register)
//   ID   decoder + control signal generator, register read      -> ID/EX
//   EX   forwarding muxes, ALU or misc ops, flag register update,
//        jump/CALL/RET resolution (PC redirect)                  -> EX/MEM
//   MEM  data memory read or write                               -> MEM/WB
//   WB   register write (ALU result or loaded byte)
//
// With no hazards one instruction completes per cycle. Data hazards are handled by
// forwarding from EX/MEM and MEM/WB into EX plus a one-cycle stall when an
// instruction uses the register loaded by the instruction just before it. Jumps are
// resolved in EX; a taken one flushes the two younger instructions (two-cycle
// penalty). HLT, when it reaches EX, flushes the younger instructions and stops
// fetching; `halted` rises once everything older has written back.
//
// Ports: clk, rst (synchronous, active high); prog_we/prog_addr/prog_data write the
// instruction memory (use while rst is held); pc_out, instruction_out (IRX word),
// alu_result_out (EX result) and jump_taken_out are observation outputs; flags_out is
// the flag register; retire pulses for every instruction that leaves WB.
// Sizes, stage list and unit list follow the published design; the encoding, the
// hazard handling, the load port and HLT are this design's own.
module risc8_top
  import risc8_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   prog_we,
  input  iaddr_t prog_addr,
  input  instr_t prog_data,
  output iaddr_t pc_out,
  output instr_t instruction_out,
  output word_t  alu_result_out,
  output logic   jump_taken_out,
  output flags_t flags_out,
  output logic   retire,
  output logic   halted
);
  // ---------------- IF ----------------
  iaddr_t pc, pcr, pcs;
  instr_t if_ins;
  logic   stall, flush, halted_q;
  logic   ex_taken, ex_halt, ex_push, ex_pop;
  iaddr_t ex_target, ex_ret_addr;

  pcu #(.AW(IAW)) u_pcu (
    .clk, .rst,
    .hold     (stall || halted_q),
    .redirect (ex_taken),
    .target   (ex_target),
    .push     (ex_push),
    .ret_addr (ex_ret_addr),
    .pop      (ex_pop),
    .pc, .pcr, .pcs
  );

  imem #(.DEPTH(IM_DEPTH), .W(ILEN)) u_imem (
    .clk, .addr(pc), .ins(if_ins),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  instr_t id_ins;
  iaddr_t id_pc;
  logic   id_valid;

  irx u_irx (
    .clk, .rst, .stall, .flush,
    .ins_in(if_ins), .pc_in(pc), .valid_in(!halted_q),
    .ins(id_ins), .pc(id_pc), .valid(id_valid)
  );

  // ---------------- ID ----------------
  dec_t  id_dec;
  ctrl_t id_ctrl_raw, id_ctrl;
  word_t rf_rd1, rf_rd2;
  logic  wb_we;
  reg_t  wb_rd;
  word_t wb_data;

  decoder  u_dec  (.ins(id_ins), .d(id_dec));
  ctrl_gen u_ctrl (.op(id_dec.op), .c(id_ctrl_raw));
  assign id_ctrl = id_valid ? id_ctrl_raw : '0;

  regfile #(.NREGS(NREGS), .W(XLEN)) u_rf (
    .clk, .rst,
    .ra1(id_dec.rs1), .ra2(id_dec.rs2), .rd1(rf_rd1), .rd2(rf_rd2),
    .we(wb_we), .wa(wb_rd), .wd(wb_data)
  );

  idex_t idex_d, ex;
  always_comb begin
    idex_d.valid = id_valid;
    idex_d.pc    = id_pc;
    idex_d.d     = id_dec;
    idex_d.c     = id_ctrl;
    idex_d.a     = rf_rd1;
    idex_d.b     = rf_rd2;
  end

  // A load-use stall sends a bubble into EX while IF and ID hold.
  pipe_reg #(.T(idex_t)) u_idex (
    .clk, .rst, .stall(1'b0), .flush(flush || stall), .d(idex_d), .q(ex)
  );

  // ---------------- EX ----------------
  exmem_t exmem_d, mem;
  memwb_t memwb_d, wb;
  logic [1:0] fwd_a, fwd_b;
  word_t  ex_a, ex_b, alu_b, alu_y, misc_y, ex_result;
  flags_t flags, alu_flags, misc_flags, ex_flags;
  logic   cond;

  hazard_unit u_hz (
    .id_valid, .id_rs1(id_dec.rs1), .id_rs2(id_dec.rs2),
    .id_use_rs1(id_ctrl.use_rs1), .id_use_rs2(id_ctrl.use_rs2),
    .ex_valid(ex.valid), .ex_rs1(ex.d.rs1), .ex_rs2(ex.d.rs2),
    .ex_use_rs1(ex.c.use_rs1), .ex_use_rs2(ex.c.use_rs2),
    .ex_rd(ex.d.rd), .ex_mem_re(ex.c.mem_re), .ex_redirect(ex_taken || ex_halt),
    .mem_valid(mem.valid), .mem_rd(mem.rd), .mem_reg_we(mem.reg_we), .mem_mem_re(mem.mem_re),
    .wb_valid(wb.valid), .wb_rd(wb.rd), .wb_reg_we(wb.reg_we),
    .fwd_a, .fwd_b, .stall, .flush
  );

  always_comb begin
    unique case (fwd_a)
      2'd1:    ex_a = mem.result;
      2'd2:    ex_a = wb_data;
      default: ex_a = ex.a;
    endcase
    unique case (fwd_b)
      2'd1:    ex_b = mem.result;
      2'd2:    ex_b = wb_data;
      default: ex_b = ex.b;
    endcase
    alu_b = ex.c.b_imm ? ex.d.imm : ex_b;
  end

  alu #(.W(XLEN)) u_alu (.op(ex.c.alu_op), .a(ex_a), .b(alu_b), .y(alu_y), .flags(alu_flags));

  misc_ops u_misc (
    .op(ex.c.misc_op), .a(ex_a), .imm(ex.d.imm), .flags_in(flags),
    .y(misc_y), .flags(misc_flags)
  );

  assign ex_result = ex.c.use_misc ? misc_y : alu_y;
  assign ex_flags  = ex.c.use_misc ? misc_flags : alu_flags;

  flag_reg #(.W(FLAG_W)) u_flags (
    .clk, .rst, .we(ex.valid && ex.c.flag_we), .d(ex_flags), .q(flags)
  );

  always_comb begin
    unique case (ex.c.jump)
      J_ALWAYS: cond = 1'b1;
      J_Z:      cond = flags[FZ];
      J_NZ:     cond = !flags[FZ];
      J_C:      cond = flags[FC];
      J_NC:     cond = !flags[FC];
      J_N:      cond = flags[FN];
      default:  cond = 1'b0;
    endcase
  end

  assign ex_taken    = ex.valid && cond;
  assign ex_halt     = ex.valid && ex.c.halt;
  assign ex_target   = ex.c.ret ? pcr : ex.d.target;
  assign ex_push     = ex.valid && ex.c.call;
  assign ex_pop      = ex.valid && ex.c.ret;
  assign ex_ret_addr = ex.pc + 1'b1;

  always_ff @(posedge clk) begin
    if (rst)          halted_q <= 1'b0;
    else if (ex_halt) halted_q <= 1'b1;
  end

  always_comb begin
    exmem_d.valid      = ex.valid;
    exmem_d.rd         = ex.d.rd;
    exmem_d.reg_we     = ex.c.reg_we;
    exmem_d.mem_re     = ex.c.mem_re;
    exmem_d.mem_we     = ex.c.mem_we;
    exmem_d.result     = ex_result;
    exmem_d.store_data = ex_b;
    exmem_d.addr       = ex.d.addr;
  end

  pipe_reg #(.T(exmem_t)) u_exmem (
    .clk, .rst, .stall(1'b0), .flush(1'b0), .d(exmem_d), .q(mem)
  );

  // ---------------- MEM ----------------
  word_t dm_rdata;

  dmem #(.DEPTH(DM_DEPTH), .W(XLEN)) u_dmem (
    .clk,
    .we(mem.valid && mem.mem_we),
    .re(mem.valid && mem.mem_re),
    .addr(mem.addr), .wdata(mem.store_data), .rdata(dm_rdata)
  );

  always_comb begin
    memwb_d.valid  = mem.valid;
    memwb_d.rd     = mem.rd;
    memwb_d.reg_we = mem.reg_we;
    memwb_d.mem_re = mem.mem_re;
    memwb_d.result = mem.result;
  end

  pipe_reg #(.T(memwb_t)) u_memwb (
    .clk, .rst, .stall(1'b0), .flush(1'b0), .d(memwb_d), .q(wb)
  );

  // ---------------- WB ----------------
  assign wb_data = wb.mem_re ? dm_rdata : wb.result;
  assign wb_we   = wb.valid && wb.reg_we;
  assign wb_rd   = wb.rd;

  // ---------------- observation ----------------
  assign pc_out          = pc;
  assign instruction_out = id_ins;
  assign alu_result_out  = ex_result;
  assign jump_taken_out  = ex_taken;
  assign flags_out       = flags;
  assign retire          = wb.valid;
  assign halted          = halted_q && !mem.valid && !wb.valid;

  // Halting stops the PC; it never moves while halted.
  assert property (@(posedge clk) disable iff (rst) halted_q |=> $stable(pc))
    else $error("risc8_top: PC moved after HLT");
endmodule
