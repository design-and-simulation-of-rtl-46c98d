// tb_risc8_top: end-to-end test of the pipelined processor at its full size.
//
// Each test loads a program through the load port while reset is held, releases
// reset and runs until `halted`. An instruction-set model written here executes the
// same program one instruction at a time (no pipeline) and gives the expected
// registers, flags, PCR/PCS, data memory and the cycle count:
//     cycle in which HLT writes back = executed (HLT included) + 2 * taken jumps
//                                      + load-use stalls + 4
// The tests are: a run over an all-NOP program memory, the seven-instruction overlap of the five-stage pipeline (instruction
// k must write back in cycle k+4, so seven take 11 cycles), directed programs for
// forwarding, load-use stalls, loops, CALL/RET nesting, SETF/PUSHF and stores, then
// random programs with forward jumps. Every mechanism (both forwarding paths, stall,
// flush on a taken jump, CALL, RET, flag write, load, store, halt) is counted and
// must occur at least once.
module tb_risc8_top;
  import risc8_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic prog_we = 0;
  iaddr_t prog_addr = '0;
  instr_t prog_data = '0;
  iaddr_t pc_out;
  instr_t instruction_out;
  word_t  alu_result_out;
  logic   jump_taken_out, retire, halted;
  flags_t flags_out;

  risc8_top u_dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_fwd_exmem = 0, n_fwd_memwb = 0, n_stall = 0, n_flush = 0, n_call = 0, n_ret = 0;
  int n_flagw = 0, n_load = 0, n_store = 0, n_halt = 0;
  always @(posedge clk) if (!rst) begin
    n_fwd_exmem += int'(u_dut.fwd_a == 2'd1 || u_dut.fwd_b == 2'd1);
    n_fwd_memwb += int'(u_dut.fwd_a == 2'd2 || u_dut.fwd_b == 2'd2);
    n_stall     += int'(u_dut.stall);
    n_flush     += int'(jump_taken_out);
    n_call      += int'(u_dut.ex_push);
    n_ret       += int'(u_dut.ex_pop);
    n_flagw     += int'(u_dut.ex.valid && u_dut.ex.c.flag_we);
    n_load      += int'(u_dut.mem.valid && u_dut.mem.mem_re);
    n_store     += int'(u_dut.mem.valid && u_dut.mem.mem_we);
    n_halt      += int'(u_dut.ex_halt);
  end

  // ---------------- program and reference model ----------------
  instr_t prog [IM_DEPTH];
  word_t  m_regs [NREGS];
  word_t  m_mem  [DM_DEPTH];
  flags_t m_flags;
  iaddr_t m_pcr, m_pcs;
  int     m_exec, m_taken, m_stalls;

  function automatic logic [8:0] add9(input word_t a, input word_t b);
    return {1'b0, a} + {1'b0, b};
  endfunction

  // flags of a + b (sub = 0) or a - b (sub = 1)
  function automatic flags_t arith_flags(input word_t a, input word_t b, input logic sub);
    int sa, sb, sr, r;
    flags_t f;
    sa = $signed(a); sb = $signed(b);
    r  = sub ? int'(a) - int'(b) : int'(a) + int'(b);
    sr = sub ? sa - sb : sa + sb;
    f[FZ] = (r[7:0] == 8'h00);
    f[FN] = r[7];
    f[FC] = sub ? (a < b) : (r > 255);
    f[FV] = (sr > 127) || (sr < -128);
    return f;
  endfunction

  function automatic flags_t logic_flags(input word_t y);
    flags_t f = '0;
    f[FZ] = (y == 0);
    f[FN] = y[7];
    return f;
  endfunction

  // Registers an instruction reads, from the instruction table.
  function automatic logic reads_reg(input instr_t w, input reg_t r);
    logic [4:0] o = w[23:19];
    case (o)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_CMP: return (w[13:9] == r) || (w[8:4] == r);
      OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI, OP_XORI, OP_CMPI,
      OP_INC, OP_DEC, OP_NEG, OP_MOV: return w[13:9] == r;
      OP_ST: return w[18:14] == r;
      default: return 1'b0;
    endcase
  endfunction

  task automatic run_model(input int max_steps);
    int pc = 0;
    instr_t w;
    opcode_t o;
    reg_t rd, rs1, rs2;
    word_t a, b, imm, y;
    logic [13:0] addr;
    logic take;
    for (int i = 0; i < NREGS; i++) m_regs[i] = 0;
    m_flags = 0; m_pcr = 0; m_pcs = 0;
    m_exec = 0; m_taken = 0; m_stalls = 0;
    for (int step = 0; step < max_steps; step++) begin
      w = prog[pc];
      o = (w[23:19] == 5'h1E) ? OP_NOP : opcode_t'(w[23:19]);
      rd = w[18:14]; rs1 = w[13:9]; rs2 = w[8:4]; imm = w[7:0]; addr = w[13:0];
      a = m_regs[rs1]; b = m_regs[rs2];
      m_exec++;
      take = 0;
      case (o)
        OP_ADD:  begin m_flags = arith_flags(a, b, 0); m_regs[rd] = a + b; end
        OP_SUB:  begin m_flags = arith_flags(a, b, 1); m_regs[rd] = a - b; end
        OP_CMP:  m_flags = arith_flags(a, b, 1);
        OP_ADDI: begin m_flags = arith_flags(a, imm, 0); m_regs[rd] = a + imm; end
        OP_SUBI: begin m_flags = arith_flags(a, imm, 1); m_regs[rd] = a - imm; end
        OP_CMPI: m_flags = arith_flags(a, imm, 1);
        OP_AND:  begin y = a & b;   m_flags = logic_flags(y); m_regs[rd] = y; end
        OP_OR:   begin y = a | b;   m_flags = logic_flags(y); m_regs[rd] = y; end
        OP_XOR:  begin y = a ^ b;   m_flags = logic_flags(y); m_regs[rd] = y; end
        OP_ANDI: begin y = a & imm; m_flags = logic_flags(y); m_regs[rd] = y; end
        OP_ORI:  begin y = a | imm; m_flags = logic_flags(y); m_regs[rd] = y; end
        OP_XORI: begin y = a ^ imm; m_flags = logic_flags(y); m_regs[rd] = y; end
        OP_INC:  begin m_flags = arith_flags(a, 8'd1, 0); m_regs[rd] = a + 1; end
        OP_DEC:  begin m_flags = arith_flags(a, 8'd1, 1); m_regs[rd] = a - 1; end
        OP_NEG:  begin m_flags = arith_flags(8'd0, a, 1); m_regs[rd] = 8'd0 - a; end
        OP_MOV:  m_regs[rd] = a;
        OP_MOVI: m_regs[rd] = imm;
        OP_SETF: m_flags = imm[3:0];
        OP_PUSHF: m_regs[rd] = {4'b0, m_flags};
        OP_LD: begin
          m_regs[rd] = m_mem[addr];
          if (reads_reg(prog[(pc + 1) % IM_DEPTH], rd)) m_stalls++;
        end
        OP_ST:   m_mem[addr] = m_regs[rd];
        OP_JMP:  take = 1;
        OP_JZ:   take = m_flags[FZ];
        OP_JNZ:  take = !m_flags[FZ];
        OP_JC:   take = m_flags[FC];
        OP_JNC:  take = !m_flags[FC];
        OP_JN:   take = m_flags[FN];
        OP_CALL: begin take = 1; m_pcs = m_pcr; m_pcr = iaddr_t'(pc + 1); end
        OP_RET:  begin take = 1; end
        OP_HLT:  return;
        default: ;
      endcase
      if (o == OP_RET) begin
        pc = m_pcr; m_pcr = m_pcs; m_pcs = 0; m_taken++;
      end else if (take) begin
        pc = w[7:0]; m_taken++;
      end else begin
        pc = (pc + 1) % IM_DEPTH;
      end
    end
    $display("model did not reach HLT");
    failures++;
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Load prog[] into the processor, run it and compare with the model.
  // Returns the cycle on which each of the first 16 write-backs happened.
  int wb_cycle [16];
  task automatic run_and_compare(input string name);
    int cyc, nret, expect_cycles;
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < IM_DEPTH; i++) begin
      prog_we = 1; prog_addr = iaddr_t'(i); prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 0;
    for (int i = 0; i < DM_DEPTH; i++) m_mem[i] = u_dut.u_dmem.mem[i];
    run_model(5000);
    @(negedge clk);
    rst = 0;             // cycle 1 starts at the next rising edge
    cyc = 0; nret = 0;
    while (!halted && cyc < 20000) begin
      @(posedge clk);
      cyc++;
      if (retire && nret < 16) begin wb_cycle[nret] = cyc; nret++; end
      #1;
    end
    expect_cycles = m_exec + 2 * m_taken + m_stalls + 4;
    chk(halted, $sformatf("%s: did not halt", name));
    chk(cyc === expect_cycles, $sformatf("%s: %0d cycles, expected %0d", name, cyc, expect_cycles));
    for (int i = 0; i < NREGS; i++)
      chk(u_dut.u_rf.regs[i] === m_regs[i],
          $sformatf("%s: r%0d = %h, expected %h", name, i, u_dut.u_rf.regs[i], m_regs[i]));
    chk(flags_out === m_flags, $sformatf("%s: flags %b expected %b", name, flags_out, m_flags));
    chk(u_dut.pcr === m_pcr && u_dut.pcs === m_pcs, $sformatf("%s: PCR/PCS", name));
    for (int i = 0; i < DM_DEPTH; i++)
      if (u_dut.u_dmem.mem[i] != m_mem[i]) begin
        chk(1'b0, $sformatf("%s: mem[%0d] = %h expected %h", name, i, u_dut.u_dmem.mem[i], m_mem[i]));
        break;
      end
    checks++;
  endtask

  task automatic clear_prog;
    for (int i = 0; i < IM_DEPTH; i++) prog[i] = ins_j(OP_HLT, 8'h00);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    // -- 0: run from an instruction memory that holds only NOP words: the PC steps by
    //       one every cycle and wraps, the instruction register and the ALU result stay
    //       zero and nothing jumps --
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 1; i <= 300; i++) begin
      @(posedge clk); #1;
      chk(pc_out === iaddr_t'(i), $sformatf("nop run: pc_out %0d expected %0d", pc_out, i % 256));
      chk(instruction_out === '0 && alu_result_out === '0 && !jump_taken_out && !halted,
          "nop run: idle outputs");
    end

    // -- 1: seven independent instructions overlap in the pipeline --
    clear_prog();
    for (int i = 0; i < 7; i++) prog[i] = ins_i(OP_MOVI, reg_t'(i + 1), 5'd0, word_t'(8'h10 + i));
    run_and_compare("overlap");
    for (int i = 0; i < 7; i++)
      chk(wb_cycle[i] === i + 5, $sformatf("overlap: instruction %0d wrote back in cycle %0d, expected %0d",
                                          i + 1, wb_cycle[i], i + 5));

    // -- 2: forwarding, load-use stall, loop, store --
    clear_prog();
    n = 0;
    prog[n++] = ins_i(OP_MOVI, 5'd1, 5'd0, 8'd10);       // r1 = 10 (counter)
    prog[n++] = ins_i(OP_MOVI, 5'd2, 5'd0, 8'd0);        // r2 = 0  (sum)
    prog[n++] = ins_r(OP_ADD,  5'd2, 5'd2, 5'd1);        // loop: r2 += r1  (EX/MEM forward)
    prog[n++] = ins_i(OP_DEC,  5'd1, 5'd1, 8'd0);        // r1--
    prog[n++] = ins_j(OP_JNZ,  8'd2);                    // until zero
    prog[n++] = ins_m(OP_ST,   5'd2, 14'h3FFF);          // mem[16383] = 55
    prog[n++] = ins_m(OP_LD,   5'd3, 14'h3FFF);          // r3 = 55
    prog[n++] = ins_r(OP_ADD,  5'd4, 5'd3, 5'd3);        // load-use stall, r4 = 110
    prog[n++] = ins_i(OP_MOVI, 5'd5, 5'd0, 8'd7);
    prog[n++] = ins_i(OP_MOVI, 5'd6, 5'd0, 8'd9);
    prog[n++] = ins_r(OP_SUB,  5'd7, 5'd5, 5'd6);        // MEM/WB forward of r5, EX/MEM of r6
    prog[n++] = ins_m(OP_ST,   5'd7, 14'd0);
    prog[n++] = ins_j(OP_HLT,  8'd0);
    run_and_compare("loop");
    chk(u_dut.u_rf.regs[2] === 8'd55 && u_dut.u_rf.regs[4] === 8'd110 && u_dut.u_rf.regs[7] === 8'hFE,
        "loop: hand-computed results");
    chk(u_dut.u_dmem.mem[16383] === 8'd55, "loop: store to last address");

    // -- 3: nested CALL/RET, SETF, PUSHF, NEG, CMP and conditional jumps --
    clear_prog();
    prog[0]  = ins_i(OP_MOVI, 5'd1, 5'd0, 8'd3);
    prog[1]  = ins_j(OP_CALL, 8'd20);
    prog[2]  = ins_i(OP_INC,  5'd1, 5'd1, 8'd0);
    prog[3]  = ins_i(OP_SETF, 5'd0, 5'd0, 8'h0A);
    prog[4]  = ins_i(OP_PUSHF, 5'd9, 5'd0, 8'd0);
    prog[5]  = ins_j(OP_JC,   8'd8);
    prog[6]  = ins_i(OP_MOVI, 5'd10, 5'd0, 8'hEE);         // skipped
    prog[7]  = ins_i(OP_MOVI, 5'd10, 5'd0, 8'hEF);         // skipped
    prog[8]  = ins_i(OP_CMPI, 5'd0, 5'd1, 8'd200);          // 6 - 200: borrow, N
    prog[9]  = ins_j(OP_JN,   8'd11);
    prog[10] = ins_i(OP_MOVI, 5'd11, 5'd0, 8'hEE);         // skipped
    prog[11] = ins_i(OP_NEG,  5'd12, 5'd1, 8'd0);
    prog[12] = ins_j(OP_JZ,   8'd14);                      // not taken
    prog[13] = ins_i(OP_MOVI, 5'd13, 5'd0, 8'h33);
    prog[14] = ins_j(OP_HLT,  8'd0);
    prog[20] = ins_i(OP_ADDI, 5'd1, 5'd1, 8'd1);            // sub1: r1++
    prog[21] = ins_j(OP_CALL, 8'd30);
    prog[22] = ins_j(OP_RET,  8'd0);
    prog[30] = ins_i(OP_ADDI, 5'd1, 5'd1, 8'd1);            // sub2: r1++
    prog[31] = ins_j(OP_RET,  8'd0);
    run_and_compare("call");
    chk(u_dut.u_rf.regs[1] === 8'd6 && u_dut.u_rf.regs[9] === 8'h0A && u_dut.u_rf.regs[10] === 8'd0 &&
        u_dut.u_rf.regs[12] === 8'hFA && u_dut.u_rf.regs[13] === 8'h33, "call: hand-computed results");

    // -- 4: random programs with forward jumps --
    for (int t = 0; t < 150; t++) begin
      int len;
      len = 20 + int'($urandom % 100);
      clear_prog();
      for (int i = 0; i < len; i++) begin
        int k;
        opcode_t o;
        reg_t rd, r1, r2;
        k  = int'($urandom % 100);
        rd = reg_t'($urandom % 6); r1 = reg_t'($urandom % 6); r2 = reg_t'($urandom % 6);
        if (k < 10) begin
          o = opcode_t'(5'h16 + $urandom % 6);             // JMP .. JN
          prog[i] = ins_j(o, iaddr_t'(i + 1 + int'($urandom % 5)));
        end else if (k < 20) begin
          prog[i] = ins_m(($urandom % 2) ? OP_LD : OP_ST, rd, 14'($urandom % 8));
        end else if (k < 25) begin
          prog[i] = ins_i(($urandom % 2) ? OP_SETF : OP_PUSHF, rd, r1, 8'($urandom));
        end else begin
          o = opcode_t'(5'h01 + $urandom % 17);            // ADD .. MOVI
          prog[i] = {o, rd, r1, r2, 4'b0};
          if (o inside {OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI, OP_XORI, OP_CMPI, OP_MOVI})
            prog[i] = ins_i(o, rd, r1, 8'($urandom));
        end
      end
      run_and_compare($sformatf("random %0d", t));
    end

    // every mechanism must have happened
    chk(n_fwd_exmem > 0, "EX/MEM forwarding never happened");
    chk(n_fwd_memwb > 0, "MEM/WB forwarding never happened");
    chk(n_stall > 0,     "load-use stall never happened");
    chk(n_flush > 0,     "taken jump (flush) never happened");
    chk(n_call > 0,      "CALL never happened");
    chk(n_ret > 0,       "RET never happened");
    chk(n_flagw > 0,     "flag write never happened");
    chk(n_load > 0,      "load never happened");
    chk(n_store > 0,     "store never happened");
    chk(n_halt > 0,      "HLT never happened");
    $display("mechanisms: fwd_exmem=%0d fwd_memwb=%0d stall=%0d taken=%0d call=%0d ret=%0d flagw=%0d load=%0d store=%0d halt=%0d",
             n_fwd_exmem, n_fwd_memwb, n_stall, n_flush, n_call, n_ret, n_flagw, n_load, n_store, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
